// tb_fspd_controllable - end-to-end testbench of the complete detector at its
// default parameters, replaying the published phase sweeps.
//
// Sweep up (-2*pi -> +2*pi): Vin1 is a 1.01 ms square wave (0.505 ms high),
// Vin2 a 0.99 ms one (0.495 ms high), both rising together at the start;
// the start-up pulse holds the preset of U1A for the first 100 us, which starts
// the detector at -2*pi with the filter at 0 V. The 20 Hz difference moves
// the phase by 4*pi in 100 ms. Sweep down (+2*pi -> -2*pi): at 97.97 ms,
// just before the phase reaches +2*pi, the two periods are exchanged, and
// the phase runs back for 95 ms, stopping just short of -2*pi.
//
// Checked against values worked out by hand:
//  - the switching voltages of the comparators, read on Vanalog at the moment
//    they switch: Vcomp2 rises at 1.6 V and Vcomp1 falls at 3.4 V on the way
//    up, Vcomp1 rises at 3.094 V and Vcomp2 falls at 1.281 V on the way down
//    (resistor-network values, see tb_hyst_comparator), each exactly once;
//  - the ends of the sweeps: near 0 V at the start, above 4.6 V at the end
//    of the sweep up (the type-1 response reaches 5 V at +2*pi), below 0.4 V
//    at the end of the sweep down;
//  - the type-2 window: sel toggles only while Vcomp1and2 is high, once per
//    detector reset; in type 1 there is one reset per input period, in type 2
//    two (the doubled output frequency);
//  - the response rises through the sweep up and falls through the sweep
//    down, sampled every 10 ms;
//  - the hysteresis of the zero point: at the midpoint of each sweep (phase
//    0) Vanalog is higher on the way down than on the way up.
// Each mechanism (start-up preset, switch to type 2, switch back to type 1,
// toggling of the setting flip-flop, frequency-sensitive ramp) is counted and
// a failure is recorded for one that never happened.
`timescale 1ns / 1ps
module tb_fspd_controllable;
  logic vin1 = 0, vin2 = 0, init_n = 1;
  logic vout1, vout2, up, vnand, sel, vcomp1, vcomp2, vcomp1and2;
  real  vpoint, vanalog;
  int   checks = 0, failures = 0;

  // half periods in ns; exchanged for the sweep down
  int half1 = 505_000, half2 = 495_000;
  bit sweep_down = 0;

  int n_to_type2 = 0, n_to_type1 = 0, n_toggle = 0, n_preset = 0;
  int resets_t1 = 0, resets_t2 = 0, bad_toggles = 0;
  int resets_since_sel = 0;
  realtime time_t1 = 0, time_t2 = 0, t_mode;

  fspd_controllable dut (
    .vin1(vin1), .vin2(vin2), .init_n(init_n), .vout1(vout1), .vout2(vout2),
    .up(up), .vnand(vnand), .sel(sel), .vcomp1(vcomp1), .vcomp2(vcomp2),
    .vcomp1and2(vcomp1and2), .vpoint(vpoint), .vanalog(vanalog)
  );

  // both inputs rise together at 2 ns, after the preset has been applied
  initial begin #2 vin1 = 1; forever begin #(half1) vin1 = !vin1; end end
  initial begin #2 vin2 = 1; forever begin #(half2) vin2 = !vin2; end end

  function automatic real absr(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t ns: vanalog=%f", what, $time, vanalog);
    end
  endtask

  task automatic check_near(input real got, input real want, input real tol, input string what);
    checks++;
    if (absr(got - want) > tol) begin
      failures++;
      $display("FAIL %s: %f, expected %f", what, got, want);
    end
  endtask

  // comparator events and the voltage at which they happen
  int  n_c2_rise = 0, n_c1_fall = 0, n_c1_rise = 0, n_c2_fall = 0;
  real v_c2_rise, v_c1_fall, v_c1_rise, v_c2_fall;
  always @(posedge vcomp2) if ($time > 0) begin n_c2_rise++; v_c2_rise = vanalog; end
  always @(negedge vcomp2) if ($time > 0) begin n_c2_fall++; v_c2_fall = vanalog; end
  always @(posedge vcomp1) if ($time > 0) begin n_c1_rise++; v_c1_rise = vanalog; end
  always @(negedge vcomp1) if ($time > 0) begin n_c1_fall++; v_c1_fall = vanalog; end

  // mode bookkeeping
  always @(vcomp1and2) begin
    if ($time > 0) begin
      resets_since_sel = 0;
      if (vcomp1and2) begin n_to_type2++; time_t1 += $realtime - t_mode; end
      else            begin n_to_type1++; time_t2 += $realtime - t_mode; end
    end
    t_mode = $realtime;
  end
  always @(posedge vnand) if ($time > 200_000) begin
    if (vcomp1and2) begin resets_t2++; resets_since_sel++; end
    else resets_t1++;
  end
  always @(sel) if ($time > 200_000) begin
    n_toggle++;
    if (!vcomp1and2 && sel) begin
      bad_toggles++;
      $display("sel set in type 1 at %0t", $time);
    end
    if (vcomp1and2 && resets_since_sel != 1) begin
      bad_toggles++;
      $display("sel toggled after %0d resets at %0t", resets_since_sel, $time);
    end
    resets_since_sel = 0;
  end

  initial begin
    #220ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v_prev, v_mid_up, v_mid_down;
    realtime t_sw;
    t_mode = 0;
    #1 init_n = 0;
    #(100us - 1ns);
    check(up && !vout1, "start-up preset leaves U1A set");
    if (up) n_preset++;
    init_n = 1;
    check(vanalog < 0.05, "filter starts at 0 V");
    // sweep up; the phase reaches +2*pi after 99.99 ms (when the rising
    // edges of the two inputs meet again), so it ends a little earlier
    v_prev = vanalog;
    for (int k = 1; k <= 9; k++) begin
      #10ms;
      check(vanalog > v_prev, "response rises during the sweep up");
      if (k == 5) v_mid_up = vanalog;    // 50 ms: phase 0
      v_prev = vanalog;
    end
    #7.5ms;
    // exchange the periods at the next rising edge of Vin1 (97.97 ms)
    @(posedge vin1);
    half1 = 495_000; half2 = 505_000; sweep_down = 1;
    t_sw = $realtime;
    check(vanalog > 4.6, "near the top of the range at the end of the sweep up");
    check(n_c2_rise == 1 && n_c1_fall == 1 && n_c1_rise == 0 && n_c2_fall == 0,
          "one entry into and one exit from the window on the way up");
    check_near(v_c2_rise, 1.6, 0.01, "Vcomp2 rises at");
    check_near(v_c1_fall, 3.4, 0.01, "Vcomp1 falls at");
    // sweep down: the phase falls back at the same rate and crosses 0 at
    // 2*t_sw - 50 ms; stop 95 ms after the exchange, before -2*pi
    v_prev = vanalog;
    for (int k = 1; k <= 9; k++) begin
      if (k == 5) begin
        #(2 * t_sw - 50ms - $realtime);
        v_mid_down = vanalog;
      end
      #(t_sw + k * 10ms - $realtime);
      check(vanalog < v_prev, "response falls during the sweep down");
      v_prev = vanalog;
    end
    #(t_sw + 95ms - $realtime);
    check(vanalog < 0.4, "near the bottom of the range at the end of the sweep down");
    check(n_c1_rise == 1 && n_c2_fall == 1, "one entry into and one exit from the window on the way down");
    check_near(v_c1_rise, 3.3 * 15.0 / 16.0, 0.01, "Vcomp1 rises at");
    check_near(v_c2_fall, (24.0 - 80.0 / 17.0) / (15.0 + 1.0 / 17.0), 0.01, "Vcomp2 falls at");
    check(v_mid_down > v_mid_up + 0.1, "zero point moves with the sweep direction");
    // reset rates: about 1 per ms in type 1, 2 per ms in type 2
    time_t1 += vcomp1and2 ? 0.0 : $realtime - t_mode;
    time_t2 += vcomp1and2 ? $realtime - t_mode : 0.0;
    check_near(resets_t1 / (time_t1 / 1.0e6), 1.0, 0.05, "resets per ms in type 1");
    check_near(resets_t2 / (time_t2 / 1.0e6), 2.0, 0.1, "resets per ms in type 2");
    check(bad_toggles == 0, "setting flip-flop toggles only in type 2, once per reset");
    // every mechanism must have happened
    check(n_preset > 0, "start-up preset happened");
    check(n_to_type2 >= 2, "switch to type 2 happened in both sweeps");
    check(n_to_type1 >= 2, "switch to type 1 happened in both sweeps");
    check(n_toggle > 0, "setting flip-flop toggled");
    $display("mechanisms: preset=%0d to_type2=%0d to_type1=%0d toggles=%0d resets t1=%0d t2=%0d",
             n_preset, n_to_type2, n_to_type1, n_toggle, resets_t1, resets_t2);
    $display("switch voltages: up %f %f down %f %f, midpoints up %f down %f",
             v_c2_rise, v_c1_fall, v_c1_rise, v_c2_fall, v_mid_up, v_mid_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
