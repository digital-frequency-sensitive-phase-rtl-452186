// fspd_controllable - frequency sensitive phase detector with controllable
// phase-to-voltage response: the complete circuit, logic plus behavioural
// models of its analog parts.
//
// The logic (fspd_digital) is a two-flip-flop phase/frequency detector whose
// inputs pass XOR gates driven by a toggling "setting" flip-flop. Its output
// transistors (charge_pump) drive the leaky inverting integrator
// (integrator), whose output Vanalog is the detector's output voltage. Two
// Schmitt comparators watch Vanalog: U5A is high below about VSET1, U5B high
// above about VSET2. While Vanalog lies inside that window (near lock) both
// are high, the setting flip-flop may toggle and the detector works on both
// input edges: type 2, twice the output frequency and twice the slope. Outside
// the window (large phase or frequency error) the flip-flop is held at 0 and
// the detector works on rising edges only: type 1, range -2*pi..+2*pi and half
// the slope. The hysteresis of the comparators keeps the switching clean.
//
// Interface: vin1, vin2 are the compared sequences; init_n (active low) is the
// start-up pulse on the preset of U1A, which starts the detector at -2*pi.
// Vanalog and Vpoint are real-valued outputs in volts; the other outputs are
// the logic nets of the schematic, brought out for observation.
//
// Values follow the schematic: 2.5 V integrator reference, thresholds 3.3 V
// and 1.5 V, 1K/15K feedback dividers, 1K pull-ups, 40K/40K/100 nF filter.
// VANALOG_INIT, the starting charge of the filter capacitor, is 0 V as in the
// published sweep that starts at -2*pi.
`timescale 1ns / 1ps
module fspd_controllable #(
  parameter real VANALOG_INIT = 0.0,
  parameter real VSET1        = 3.3,
  parameter real VSET2        = 1.5,
  parameter real VREF_INT     = 2.5
) (
  input  logic vin1,
  input  logic vin2,
  input  logic init_n,
  output logic vout1,
  output logic vout2,
  output logic up,
  output logic vnand,
  output logic sel,
  output logic vcomp1,
  output logic vcomp2,
  output logic vcomp1and2,
  output real  vpoint,
  output real  vanalog
);
  real  v_th, r_th;

  fspd_digital u_logic (
    .vin1(vin1), .vin2(vin2), .init_n(init_n),
    .vcomp1(vcomp1), .vcomp2(vcomp2),
    .vout1(vout1), .vout2(vout2), .up(up), .vnand(vnand), .sel(sel),
    .vcomp1and2(vcomp1and2)
  );

  // Q1, Q2, R1, R2
  charge_pump u_pump (.gate_p(vout1), .gate_n(vout2), .v_th(v_th), .r_th(r_th));

  // U6A, R3, R4, C1, V4
  integrator #(.VREF(VREF_INT), .V_INIT(VANALOG_INIT)) u_int (
    .v_th(v_th), .r_th(r_th), .vpoint(vpoint), .vout(vanalog)
  );

  // U5A, R5, R6, R7, V8: high while Vanalog is below the upper threshold
  hyst_comparator #(.SIG_ON_PLUS(1'b0), .V_REF(VSET1)) u5a (
    .v_sig(vanalog), .out(vcomp1)
  );

  // U5B, R8, R9, R10, R11, V9: high while Vanalog is above the lower threshold
  hyst_comparator #(.SIG_ON_PLUS(1'b1), .V_REF(VSET2)) u5b (
    .v_sig(vanalog), .out(vcomp2)
  );
endmodule
