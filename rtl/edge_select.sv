// edge_select - the input stage that lets the detector act on both edges of
// its inputs ("type 2" operation), and the control that turns this off.
//
// U3A and U3B are XOR gates that pass vin1 and vin2 straight through while
// sel is 0 and invert both while sel is 1. sel is the Q output of the
// "setting" flip-flop U4A, wired as a toggle (D = Q bar) and clocked by
// vnand, so sel flips at the end of every detector reset. After a reset on
// the rising edges of the inputs the inputs are inverted, and their falling
// edges become the next rising edges seen by the detector, and so on: the
// detector output runs at twice the input frequency.
//
// mode_n drives the CLR input of U4A. Low holds sel at 0 and the detector
// works on rising edges only (type 1); high lets U4A toggle (type 2).
//
// The gates, the toggle wiring and the polarity of the mode input follow the
// published circuit; treating the comparator-driven input of U4A as its
// clear (it must force Q low) is this design's reading of it.
//
// Timing: zero-delay; sel changes on the rising edge of vnand or when mode_n
// falls.
`timescale 1ns / 1ps
module edge_select (
  input  logic vin1,
  input  logic vin2,
  input  logic vnand,
  input  logic mode_n,
  output logic clk1,
  output logic clk2,
  output logic sel
);
  logic sel_n;

  dff74 u4a (.clk(vnand), .d(sel_n), .pr_n(1'b1), .clr_n(mode_n),
             .q(sel), .q_n(sel_n));

  // U3A, U3B, 74F86
  assign clk1 = vin1 ^ sel;
  assign clk2 = vin2 ^ sel;
endmodule
