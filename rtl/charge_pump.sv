// charge_pump - behavioural model of the detector's output stage (not
// synthesizable: analog transistors and resistors, modelled with reals).
//
// Q1 (P-channel) connects DVCC to the Vpoint node through R1 while its gate,
// Vout1, is low. Q2 (N-channel) connects Vpoint to ground through R2 while
// its gate, Vout2, is high. With neither on, Vpoint floats and the stage
// drives no current; with both on (only during a reset in the real circuit)
// it forms a divider. The model reports the stage as a Thevenin source seen
// from Vpoint: voltage v_th behind resistance r_th. A transistor that is off
// is an R_OFF resistor. The circuit values (DVCC, R1, R2) follow the
// schematic; the on-resistances of the transistors and R_OFF are this
// model's own values.
//
// Timing: the outputs follow the gate inputs with no delay.
`timescale 1ns / 1ps
module charge_pump #(
  parameter real DVCC  = 5.0,
  parameter real R1    = 10.0,
  parameter real R2    = 10.0,
  parameter real RON_P = 5.0,
  parameter real RON_N = 2.0,
  parameter real R_OFF = 1.0e9
) (
  input  logic gate_p,   // Vout1, Q1 conducts while low
  input  logic gate_n,   // Vout2, Q2 conducts while high
  output real  v_th,
  output real  r_th
);
  real r_hi, r_lo;

  always_comb begin
    r_hi = R1 + (gate_p ? R_OFF : RON_P);   // Vpoint to DVCC
    r_lo = R2 + (gate_n ? RON_N : R_OFF);   // Vpoint to ground
    v_th = DVCC * r_lo / (r_hi + r_lo);
    r_th = r_hi * r_lo / (r_hi + r_lo);
  end
endmodule
