// tb_dff74 - self-checking testbench for dff74.
// Applies 4000 random single-input changes to clk, d, pr_n and clr_n and
// compares Q and Q bar after each with a reference model kept in the
// testbench: at every rising clock edge and every falling edge of pr_n or
// clr_n, preset low gives 1, otherwise clear low gives 0, otherwise a rising
// clock edge loads D. Also checks that a clear pulse during a held
// preset leaves Q high after the preset ends.
`timescale 1ns / 1ps
module tb_dff74;
  logic clk = 0, d = 0, pr_n = 1, clr_n = 1;
  logic q, q_n;
  logic exp_q;
  int checks = 0, failures = 0;

  dff74 dut (.clk(clk), .d(d), .pr_n(pr_n), .clr_n(clr_n), .q(q), .q_n(q_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: q=%b q_n=%b expected q=%b", what, $time, q, q_n, exp_q);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int which;
    logic old_clk, old_pr, old_clr;
    exp_q = 1'b0;
    #1 clr_n = 0;
    #1 clr_n = 1;
    #1 check(q == exp_q && q_n == !exp_q, "after clear");
    repeat (4000) begin
      old_clk = clk; old_pr = pr_n; old_clr = clr_n;
      which = $urandom_range(0, 9);
      // the clock changes most often; preset and clear are rarer and short
      if (which < 5)       clk = !clk;
      else if (which < 8)  d = !d;
      else if (which == 8) pr_n = ($urandom_range(0, 3) != 0) ? 1'b1 : !pr_n;
      else                 clr_n = ($urandom_range(0, 3) != 0) ? 1'b1 : !clr_n;
      // every event (rising clk, falling pr_n, falling clr_n) re-evaluates:
      // preset first, then clear, then the clock loads D
      if ((old_pr && !pr_n) || (old_clr && !clr_n) || (!old_clk && clk)) begin
        if (!pr_n)       exp_q = 1'b1;
        else if (!clr_n) exp_q = 1'b0;
        else             exp_q = d;
      end
      #1 check(q == exp_q && q_n == !exp_q, "random step");
    end
    // clear pulse while preset held
    pr_n = 1; clr_n = 1; #1;
    pr_n = 0; #1 clr_n = 0; #1 clr_n = 1; #1 pr_n = 1; exp_q = 1'b1;
    #1 check(q == 1'b1, "clear during preset");
    clk = 0; d = 0; #1 clk = 1; exp_q = 1'b0;
    #1 check(q == 1'b0 && q_n == 1'b1, "clock after preset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
