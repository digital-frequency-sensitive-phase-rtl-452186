// tb_hyst_comparator - self-checking testbench for the Schmitt comparator
// model, in both of its configurations with the values of the two window
// comparators. The input is swept 0 -> 5 V -> 0 in 0.5 mV steps and the four
// switching voltages are recorded. They are compared with the thresholds
// solved by hand from the resistor network:
//   upper comparator (signal on the inverting pin, 3.3 V via 1K, 15K
//   feedback, 1K pull-up): output high level 4.9 V, so it falls at
//   (3.3*15 + 4.9*1)/16 = 3.4 V and rises at 3.3*15/16 = 3.09375 V;
//   lower comparator (signal via 1K on the non-inverting pin, 15K feedback,
//   1.5 V on the inverting pin): it rises at 1.5*16/15 = 1.6 V and falls at
//   the solution of (15 v + 1 * Voh(v)) / 16 = 1.5, Voh(v) = (5*16 + v)/17,
//   i.e. v = (24 - 80/17) / (15 + 1/17).
`timescale 1ns / 1ps
module tb_hyst_comparator;
  real v = 0.0;
  logic c_hi, c_lo;
  int checks = 0, failures = 0;

  hyst_comparator #(.SIG_ON_PLUS(1'b0), .V_REF(3.3)) u_hi (.v_sig(v), .out(c_hi));
  hyst_comparator #(.SIG_ON_PLUS(1'b1), .V_REF(1.5)) u_lo (.v_sig(v), .out(c_lo));

  function automatic real absr(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  task automatic check_near(input real got, input real want, input string what);
    checks++;
    if (absr(got - want) > 1.0e-3) begin
      failures++;
      $display("FAIL %s: switched at %f V, expected %f V", what, got, want);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real hi_fall, hi_rise, lo_rise, lo_fall;
    logic ph, pl;
    hi_fall = -1; hi_rise = -1; lo_rise = -1; lo_fall = -1;
    #1;
    checks++;
    if (!(c_hi == 1'b1 && c_lo == 1'b0)) begin
      failures++;
      $display("FAIL start state c_hi=%b c_lo=%b", c_hi, c_lo);
    end
    for (int k = 1; k <= 10000; k++) begin
      ph = c_hi; pl = c_lo;
      v = k * 0.0005;
      #1;
      if (ph && !c_hi) hi_fall = v;
      if (!pl && c_lo) lo_rise = v;
    end
    for (int k = 9999; k >= 0; k--) begin
      ph = c_hi; pl = c_lo;
      v = k * 0.0005;
      #1;
      if (!ph && c_hi) hi_rise = v;
      if (pl && !c_lo) lo_fall = v;
    end
    check_near(hi_fall, 3.4, "upper comparator, rising input");
    check_near(hi_rise, 3.3 * 15.0 / 16.0, "upper comparator, falling input");
    check_near(lo_rise, 1.6, "lower comparator, rising input");
    check_near(lo_fall, (24.0 - 80.0 / 17.0) / (15.0 + 1.0 / 17.0), "lower comparator, falling input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
