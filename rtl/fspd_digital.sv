// fspd_digital - all the logic of the frequency sensitive phase detector with
// controllable phase-to-voltage response.
//
// The two inputs pass the XOR stage (edge_select) into the two-flip-flop
// detector (pfd_core). The end of each detector reset toggles the setting
// flip-flop, which inverts both inputs so that the next pair of opposite
// edges is compared too (type 2, twice the output frequency, range -pi..+pi).
// mode_gate ANDs the comparator outputs into the reset of the setting
// flip-flop: while either comparator is low the flip-flop is held at 0, the
// inputs pass unchanged and the detector is type 1 (range -2*pi..+2*pi).
//
// Interface: vin1/vin2 are the input sequences, init_n the start-up preset
// of U1A, vcomp1/vcomp2 the comparator outputs. vout1 (active low) and vout2
// (active high) drive the output transistors. up (Q of U1A), vnand, sel and
// vcomp1and2 are brought out for observation.
//
// The logic and its wiring follow the published circuit gate for gate; the
// extra observation outputs are this design's addition.
//
// Timing: zero-delay, asynchronous; there is no clock other than the inputs.
`timescale 1ns / 1ps
module fspd_digital (
  input  logic vin1,
  input  logic vin2,
  input  logic init_n,
  input  logic vcomp1,
  input  logic vcomp2,
  output logic vout1,
  output logic vout2,
  output logic up,
  output logic vnand,
  output logic sel,
  output logic vcomp1and2
);
  logic clk1, clk2;

  mode_gate u_mode (.vcomp1(vcomp1), .vcomp2(vcomp2), .vcomp1and2(vcomp1and2));

  edge_select u_sel (.vin1(vin1), .vin2(vin2), .vnand(vnand),
                     .mode_n(vcomp1and2), .clk1(clk1), .clk2(clk2), .sel(sel));

  pfd_core u_pfd (.clk1(clk1), .clk2(clk2), .init_n(init_n), .up(up),
                  .vout1(vout1), .vout2(vout2), .vnand(vnand));
endmodule
