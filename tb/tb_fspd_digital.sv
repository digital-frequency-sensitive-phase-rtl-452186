// tb_fspd_digital - self-checking testbench for the detector logic.
// Drives vin1 and vin2 with 50 % square waves of equal period P = 1000 ns,
// vin2 delayed against vin1 by D (negative D: vin1 delayed). For each D it
// measures, over 20 periods after settling, the total time "up" (Q of U1A)
// is high, the total time vout2 is high and the number of detector resets.
//   Type 1 (a comparator low): per period one reset, up high for D (D > 0)
//     or vout2 high for -D (D < 0): the response spans -2*pi..+2*pi.
//   Type 2 (both comparators high), |D| < P/2: two resets per period and
//     twice the high time, 2*|D|: double frequency and double slope.
// It also checks that sel never moves in type 1, that it toggles once per
// reset in type 2, and that vout1 is always the inverse of up.
`timescale 1ns / 1ps
module tb_fspd_digital;
  localparam int P = 1000;
  logic vin1 = 0, vin2 = 0, init_n = 1, vcomp1 = 1, vcomp2 = 0;
  logic vout1, vout2, up, vnand, sel, vcomp1and2;
  int checks = 0, failures = 0;
  int resets = 0, sel_toggles = 0;
  int delay_ns = 0;
  realtime up_time, dn_time, t_up, t_dn;

  fspd_digital dut (.vin1(vin1), .vin2(vin2), .init_n(init_n), .vcomp1(vcomp1),
                    .vcomp2(vcomp2), .vout1(vout1), .vout2(vout2), .up(up),
                    .vnand(vnand), .sel(sel), .vcomp1and2(vcomp1and2));

  always @(posedge vnand) resets++;
  always @(sel) sel_toggles++;
  always @(vcomp1and2) if (vcomp1and2 !== (vcomp1 && vcomp2)) check(0, "comparator AND");
  always @(posedge up)    t_up = $realtime;
  always @(negedge up)    up_time += $realtime - t_up;
  always @(posedge vout2) t_dn = $realtime;
  always @(negedge vout2) dn_time += $realtime - t_dn;

  // vin1 leads by delay_ns when positive
  initial forever begin
    #(P);
    fork
      begin
        #(delay_ns < 0 ? -delay_ns : 0) vin1 = 1;
        #(P / 2) vin1 = 0;
      end
      begin
        #(delay_ns > 0 ? delay_ns : 0) vin2 = 1;
        #(P / 2) vin2 = 0;
      end
    join_none
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s, D=%0d at %0t: up_time=%0f dn_time=%0f resets=%0d",
               what, delay_ns, $time, up_time, dn_time, resets);
    end
  endtask

  always @(up or vout1) if (up !== !vout1) begin
    #0 if (up !== !vout1) check(0, "vout1 is not the inverse of up");
  end

  task automatic measure(input int d, input bit type2);
    int r0, s0;
    realtime exp_up, exp_dn;
    int mult;
    // move to the new delay in small steps, so that no edge is lost and the
    // detector follows the phase as in a slow sweep
    vcomp1 = 1; vcomp2 = 0;
    while (delay_ns != 0) begin
      delay_ns += delay_ns > 0 ? -50 : 50;
      #(P);
    end
    while (delay_ns != d) begin
      delay_ns += d > 0 ? 50 : -50;
      #(P);
    end
    vcomp2 = type2;
    #(5 * P);
    @(negedge vin1); @(negedge vin2); #(P / 4);
    up_time = 0; dn_time = 0; r0 = resets; s0 = sel_toggles;
    #(20 * P);
    mult   = type2 ? 2 : 1;
    exp_up = d > 0 ? 20.0 * mult * d : 0.0;
    exp_dn = d < 0 ? -20.0 * mult * d : 0.0;
    check(up_time > exp_up - 1.0 && up_time < exp_up + 1.0, "up high time");
    check(dn_time > exp_dn - 1.0 && dn_time < exp_dn + 1.0, "vout2 high time");
    check(resets - r0 == 20 * mult, "resets per period");
    if (type2) check(sel_toggles - s0 == 20 * mult, "sel toggles once per reset");
    else       check(sel_toggles == s0 && sel == 0, "sel held at 0 in type 1");
  endtask

  initial begin
    #(2000 * P);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    up_time = 0; dn_time = 0;
    // start-up preset of U1A for two periods
    init_n = 0; #(2 * P) init_n = 1;
    foreach (d_list[i]) begin
      d = d_list[i];
      measure(d, 1'b0);
      if (d > -P / 2 && d < P / 2) measure(d, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int d_list[10] = '{100, -100, 250, -250, 400, -400, 600, -600, 900, -900};
endmodule
