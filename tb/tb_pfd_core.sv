// tb_pfd_core - self-checking testbench for pfd_core.
// Drives the two clock inputs with edges at random times and measures the
// output pulses: after a clk1 edge at t1 and a clk2 edge at t2 > t1, "up"
// must be high exactly from t1 to t2 (and vout1, its inverse, low), vout2
// must not stay high, and exactly one reset (rising edge of vnand) must occur
// at t2; the mirror case likewise. Simultaneous edges must give no pulse
// wider than zero. Two clk1 edges before a clk2 edge (a frequency error)
// must keep "up" high until the clk2 edge. A held start-up preset must keep
// "up" high even when clk2 rises, and leave it high after release.
`timescale 1ns / 1ps
module tb_pfd_core;
  logic clk1 = 0, clk2 = 0, init_n = 1;
  logic up, vout1, vout2, vnand;
  int checks = 0, failures = 0;
  int resets = 0;
  realtime up_rise, up_fall, dn_rise, dn_fall;

  pfd_core dut (.clk1(clk1), .clk2(clk2), .init_n(init_n), .up(up),
                .vout1(vout1), .vout2(vout2), .vnand(vnand));

  always @(posedge up)    up_rise = $realtime;
  always @(negedge up)    up_fall = $realtime;
  always @(posedge vout2) dn_rise = $realtime;
  always @(negedge vout2) dn_fall = $realtime;
  always @(posedge vnand) resets++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, r0;
    realtime t1;
    // start-up: clear whatever the flip-flops hold
    init_n = 0; #1 clk2 = 1; #1 clk2 = 0; #1 init_n = 1;
    #1 check(up && !vout1 && !vout2, "preset holds up through clk2");
    #10 clk2 = 1; #1 clk2 = 0;
    #1 check(!up && vout1 && !vout2, "clk2 after preset resets");
    repeat (300) begin
      d = $urandom_range(0, 400) - 200;   // clk2 time minus clk1 time, ns
      r0 = resets;
      #50;
      t1 = $realtime;
      if (d > 0) begin
        clk1 = 1; #(d) clk2 = 1;
        #1 check(up_rise == t1 && up_fall == t1 + d, "up pulse width");
        check(!up && !vout2 && vout1, "idle after up pulse");
      end else if (d < 0) begin
        clk2 = 1; #(-d) clk1 = 1;
        #1 check(dn_rise == t1 && dn_fall == t1 - d, "down pulse width");
        check(!up && !vout2 && vout1, "idle after down pulse");
      end else begin
        clk1 = 1; clk2 = 1;
        #1 check(!up && !vout2, "no pulse for equal edges");
      end
      check(resets == r0 + 1, "one reset per edge pair");
      #20 clk1 = 0; clk2 = 0;
    end
    // frequency error: two clk1 edges before one clk2 edge
    #50 t1 = $realtime;
    clk1 = 1; #10 clk1 = 0; #10 clk1 = 1; #10 clk1 = 0;
    check(up && up_rise == t1, "up held over two clk1 edges");
    #10 clk2 = 1;
    #1 check(!up && up_fall == t1 + 40, "up released by clk2");
    clk2 = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
