// tb_charge_pump - self-checking testbench for the output-stage model.
// For each of the four gate combinations and for three load resistors tied
// to the 2.5 V virtual ground, it solves the node equation of the Vpoint node
// directly (Kirchhoff's current law with every transistor as its on or off
// resistance) and compares with the voltage the model's Thevenin pair
// (v_th, r_th) predicts across the same load. It also checks the three
// working states: pull-up near DVCC, pull-down near 0 V, floating.
`timescale 1ns / 1ps
module tb_charge_pump;
  localparam real DVCC = 5.0, R1 = 10.0, R2 = 10.0, RON_P = 5.0, RON_N = 2.0, R_OFF = 1.0e9;
  localparam real VG = 2.5;
  logic gate_p, gate_n;
  real v_th, r_th;
  int checks = 0, failures = 0;

  charge_pump dut (.gate_p(gate_p), .gate_n(gate_n), .v_th(v_th), .r_th(r_th));

  function automatic real absr(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: gate_p=%b gate_n=%b v_th=%f r_th=%g", what, gate_p, gate_n, v_th, r_th);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rl[3] = '{40.0e3, 1.0e3, 100.0};
    real g_hi, g_lo, v_kcl, v_thev;
    for (int i = 0; i < 4; i++) begin
      {gate_p, gate_n} = 2'(i);
      #1;
      g_hi = 1.0 / (R1 + (gate_p ? R_OFF : RON_P));
      g_lo = 1.0 / (R2 + (gate_n ? RON_N : R_OFF));
      foreach (rl[k]) begin
        v_kcl  = (DVCC * g_hi + VG / rl[k]) / (g_hi + g_lo + 1.0 / rl[k]);
        v_thev = VG + (v_th - VG) * rl[k] / (rl[k] + r_th);
        check(absr(v_kcl - v_thev) < 1.0e-9, "node voltage under load");
      end
    end
    gate_p = 0; gate_n = 0; #1 check(v_th > 4.99 && r_th < 20.0, "pull-up");
    gate_p = 1; gate_n = 1; #1 check(v_th < 0.01 && r_th < 20.0, "pull-down");
    gate_p = 1; gate_n = 0; #1 check(r_th > 1.0e8, "floating");
    gate_p = 0; gate_n = 1; #1 check(absr(v_th - 5.0 * 12.0 / 27.0) < 1.0e-9, "both on: divider");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
