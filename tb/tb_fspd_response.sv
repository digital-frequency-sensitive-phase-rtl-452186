// tb_fspd_response - phase-to-voltage responses of the two fixed operating
// modes, the type-1 and type-2 detectors the controllable one combines.
//
// Two copies of the detector chain (logic, output stage, integrator) share
// the same inputs: in one the comparator inputs are held low (type 1,
// rising edges only), in the other high (type 2, both edges). Vin1 is a
// 1.01 ms square wave and Vin2 a 0.99 ms one, both 50 % duty and rising
// together at the start, with the start-up preset held for 100 us: the phase
// runs from -2*pi to +2*pi in 99.99 ms and both filters start at 0 V.
//
// The filter output lags the phase by its time constant, 4 ms, so the
// sample at time t is compared with the ideal response at phase theta(t-4ms):
//   type 1: 2.5 + 2.5 * theta / (2*pi)        over the whole -2*pi..+2*pi range;
//   type 2: 2.5 + 2.5 * theta / pi            for |theta| < pi (double slope),
//           about 0 V below -pi and about 5 V above +pi (the insensitive
//           zones), checked away from the corners of the curve.
// Also checked: type 2 gives two detector resets per input period, type 1
// one.
`timescale 1ns / 1ps
module tb_fspd_response;
  localparam real T_SWEEP = 99.99e6;   // ns for 4*pi
  localparam real TAU     = 4.0e6;     // ns, R4*C1
  localparam real PI      = 3.14159265358979;
  logic vin1 = 0, vin2 = 0, init_n = 1;
  logic t1_vout1, t1_vout2, t1_up, t1_vnand, t1_sel, t1_and;
  logic t2_vout1, t2_vout2, t2_up, t2_vnand, t2_sel, t2_and;
  real  t1_vth, t1_rth, t1_vpoint, t1_v;
  real  t2_vth, t2_rth, t2_vpoint, t2_v;
  int   checks = 0, failures = 0;
  int   resets1 = 0, resets2 = 0;

  fspd_digital u_t1 (.vin1(vin1), .vin2(vin2), .init_n(init_n), .vcomp1(1'b0), .vcomp2(1'b0),
                     .vout1(t1_vout1), .vout2(t1_vout2), .up(t1_up), .vnand(t1_vnand),
                     .sel(t1_sel), .vcomp1and2(t1_and));
  charge_pump  u_p1 (.gate_p(t1_vout1), .gate_n(t1_vout2), .v_th(t1_vth), .r_th(t1_rth));
  integrator #(.V_INIT(0.0)) u_i1 (.v_th(t1_vth), .r_th(t1_rth), .vpoint(t1_vpoint), .vout(t1_v));

  fspd_digital u_t2 (.vin1(vin1), .vin2(vin2), .init_n(init_n), .vcomp1(1'b1), .vcomp2(1'b1),
                     .vout1(t2_vout1), .vout2(t2_vout2), .up(t2_up), .vnand(t2_vnand),
                     .sel(t2_sel), .vcomp1and2(t2_and));
  charge_pump  u_p2 (.gate_p(t2_vout1), .gate_n(t2_vout2), .v_th(t2_vth), .r_th(t2_rth));
  integrator #(.V_INIT(0.0)) u_i2 (.v_th(t2_vth), .r_th(t2_rth), .vpoint(t2_vpoint), .vout(t2_v));

  initial begin #2 vin1 = 1; forever begin #505_000 vin1 = !vin1; end end
  initial begin #2 vin2 = 1; forever begin #495_000 vin2 = !vin2; end end

  always @(posedge t1_vnand) if ($time > 10_000_000) resets1++;
  always @(posedge t2_vnand) if ($time > 10_000_000) resets2++;

  function automatic real absr(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  task automatic check_near(input real got, input real want, input real tol, input string what);
    checks++;
    if (absr(got - want) > tol) begin
      failures++;
      $display("FAIL %s at %0t: %f, expected %f", what, $time, got, want);
    end
  endtask

  initial begin
    #120ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, ideal2;
    #1 init_n = 0;
    #(100us - 1ns) init_n = 1;
    for (int k = 2; k <= 19; k++) begin
      #(k * 5ms - $realtime);
      th = -2.0 * PI + 4.0 * PI * ($realtime - TAU) / T_SWEEP;
      check_near(t1_v, 2.5 + 2.5 * th / (2.0 * PI), 0.15, "type-1 response");
      // type 2, skipping samples within 0.25*pi of the corners at +/-pi
      if (absr(absr(th) - PI) > 0.25 * PI) begin
        ideal2 = th < -PI ? 0.0 : (th > PI ? 5.0 : 2.5 + 2.5 * th / PI);
        check_near(t2_v, ideal2, 0.2, "type-2 response");
      end
    end
    // 10 ms .. 95 ms: 85 ms, about 85 input periods
    check_near(resets1, 85.0, 3.0, "type-1 resets, one per period");
    checks++;
    if (resets2 < resets1 + 20) begin
      failures++;
      $display("FAIL type-2 resets %0d, type-1 %0d", resets2, resets1);
    end
    $display("resets: type 1 %0d, type 2 %0d", resets1, resets2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
