// dff74 - one half of a 74F74: positive-edge D flip-flop with asynchronous
// active-low preset (pr_n) and clear (clr_n) and complementary outputs.
//
// The detector uses three of these: two as the phase/frequency flip-flops and
// one as the toggling "setting" flip-flop. Q follows D on the rising edge of
// clk while both asynchronous inputs are high; Q bar is always the inverse of
// Q. The preset has priority over the clear, so a clear pulse that arrives
// while the preset is held leaves Q high, as on the real part. Two details
// of the real part are not modelled: with both PR and CLR low it drives Q
// and Q bar high together (here Q = 1, Q bar = 0), and a clear still held
// when the preset ends would take effect (here it waits for the next clock
// edge or its own next falling edge). Decoding those cases on the outputs would put a combinational path
// from CLR to Q, and with it a combinational loop through the detector's
// reset gate. In the detector the clears are zero-width reset pulses and the
// preset is a long start-up pulse, so neither case changes its behaviour.
//
// The part is only named in the published circuit; its behaviour here is
// that of the 74F74 data sheet, with the two differences above.
//
// Two asynchronous controls per flip-flop are standard synthesizable code;
// some open-source synthesis front ends accept only one and reject this file.
//
// Timing: zero-delay; the outputs change on the clock edge or as soon as an
// asynchronous input falls.
`timescale 1ns / 1ps
module dff74 (
  input  logic clk,
  input  logic d,
  input  logic pr_n,
  input  logic clr_n,
  output logic q,
  output logic q_n
);
  always_ff @(posedge clk or negedge clr_n or negedge pr_n) begin
    if (!pr_n)       q <= 1'b1;
    else if (!clr_n) q <= 1'b0;
    else            q <= d;
  end

  assign q_n = !q;
endmodule
