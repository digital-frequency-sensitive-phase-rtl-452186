// pfd_core - the classic two-flip-flop frequency sensitive phase detector
// (the "type 1" detector, as in the 4046 family).
//
// U1A and U1B are D flip-flops with D tied high. A rising edge on clk1 sets
// U1A ("up"), a rising edge on clk2 sets U1B. As soon as both are set, the
// NAND gate U2A pulls vnand low, which clears both flip-flops through their
// CLR inputs; vnand then returns high. The result is a pulse on one output
// whose width is the time between the two edges, and the output that pulses
// tells which input was first. Unequal frequencies give a pulse train with a
// DC component whose sign follows the frequency difference; equal frequencies
// give a response linear in phase from -2*pi to +2*pi.
//
// Outputs follow the schematic: vout1 is Q bar of U1A (it drives the
// P-channel transistor, active low), vout2 is Q of U1B (N-channel, active
// high). init_n is the preset of U1A; held low at start-up it puts the
// detector in the state "clk1 edge seen, waiting for clk2", i.e. at -2*pi.
//
// The connections follow the published circuit (74F74 flip-flops, 74F00
// NAND); the zero-delay modelling is this design's choice.
//
// Timing: zero-delay. The reset pulse on vnand has zero width in simulation;
// the rising edge of vnand marks the end of every reset, and the setting
// flip-flop of the complete detector is clocked by it.
`timescale 1ns / 1ps
module pfd_core (
  input  logic clk1,
  input  logic clk2,
  input  logic init_n,
  output logic up,
  output logic vout1,
  output logic vout2,
  output logic vnand
);
  logic q2_n_unused;

  // U2A, 74F00
  assign vnand = !(up && vout2);

  dff74 u1a (.clk(clk1), .d(1'b1), .pr_n(init_n), .clr_n(vnand),
             .q(up), .q_n(vout1));
  dff74 u1b (.clk(clk2), .d(1'b1), .pr_n(1'b1), .clr_n(vnand),
             .q(vout2), .q_n(q2_n_unused));
endmodule
