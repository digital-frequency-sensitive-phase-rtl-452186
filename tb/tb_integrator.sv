// tb_integrator - self-checking testbench for the loop-filter model.
// 1. Step: a 5 V source with 15 ohm output resistance from t = 0, starting
//    at 2.5 V. The output must follow the closed-form step response of the
//    leaky inverting integrator, 2.5 + u_inf (1 - exp(-t / (R4 C1))), with
//    u_inf = -R4 (5 - 2.5) / (R3 + 15), checked at 1, 4 and 20 ms, and Vpoint
//    must sit on the R3 divider. The output is refreshed every 100 ns, so it
//    is sampled 50 ns after a refresh and compared with the exact value there.
// 2. Float: with the source switched off (1e9 ohm) the output must decay back
//    towards 2.5 V with the same time constant, and Vpoint read 2.5 V.
// 3. Pulse train: 1 kHz, 25 % pull-up, 75 % floating for 40 ms. The mean
//    output over the last period must be 2.5 - 0.25 * (R4 / (R3 + 15)) * 2.5
//    (DC gain -R4/R3), and its ripple the net charge per pulse (input less
//    the leak through R4) over C1.
`timescale 1ns / 1ps
module tb_integrator;
  localparam real R3 = 40.0e3, R4 = 40.0e3, C1 = 100.0e-9, VREF = 2.5, TAU = R4 * C1;
  real v_th, r_th, vpoint, vout;
  int checks = 0, failures = 0;

  integrator dut (.v_th(v_th), .r_th(r_th), .vpoint(vpoint), .vout(vout));

  function automatic real absr(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: vout=%f vpoint=%f", what, $time, vout, vpoint);
    end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real u_inf, e, u0, vmin, vmax, vsum, mean_exp, ripple_exp;
    int n;
    v_th = 5.0; r_th = 15.0;
    u_inf = -R4 * (5.0 - VREF) / (R3 + 15.0);
    #1;
    check(absr(vpoint - (VREF + (5.0 - VREF) * R3 / (R3 + 15.0))) < 1.0e-9, "vpoint divider");
    // vout is refreshed every 100 ns: sample 50 ns after a refresh and
    // compare with the exact value at the refresh
    #(1ms + 49ns);
    e = VREF + u_inf * (1.0 - $exp(-1.0e-3 / TAU));
    check(absr(vout - e) < 1.0e-6, "step at 1 ms");
    #3ms;
    e = VREF + u_inf * (1.0 - $exp(-4.0e-3 / TAU));
    check(absr(vout - e) < 1.0e-6, "step at 4 ms");
    #16ms;
    e = VREF + u_inf * (1.0 - $exp(-20.0e-3 / TAU));
    check(absr(vout - e) < 1.0e-6, "step at 20 ms");
    // float
    u0 = vout - VREF;
    r_th = 1.0e9;
    #1;
    check(absr(vpoint - VREF) < 1.0e-3, "vpoint floats at the virtual ground");
    #(4ms - 1ns);
    e = VREF + u0 * $exp(-4.0e-3 / TAU);
    check(absr(vout - e) < 1.0e-3, "decay after 4 ms");
    // pulse train: 250 us up, 750 us floating
    for (int k = 0; k < 40; k++) begin
      r_th = 15.0;   #250us;
      r_th = 1.0e9;  #750us;
    end
    vmin = 1.0e9; vmax = -1.0e9; vsum = 0.0; n = 0;
    for (int k = 0; k < 1000; k++) begin
      r_th = (k < 250) ? 15.0 : 1.0e9;
      #1us;
      vsum += vout; n++;
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
    end
    mean_exp   = VREF - 0.25 * (R4 / (R3 + 15.0)) * (5.0 - VREF);
    // during the pulse the leak through R4 takes part of the input current
    ripple_exp = ((5.0 - VREF) / (R3 + 15.0) + (mean_exp - VREF) / R4) * 250.0e-6 / C1;
    check(absr(vsum / n - mean_exp) < 0.01, "mean of the pulse train");
    check(absr((vmax - vmin) - ripple_exp) < 0.03 * ripple_exp, "ripple of the pulse train");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
