// integrator - behavioural model of the loop filter: op-amp U6A with R3, R4,
// C1 and the 2.5 V reference V4 (not synthesizable: analog, modelled with
// reals and simulation time).
//
// The op-amp keeps its inverting input at VREF. The driving stage (a
// Thevenin source v_th, r_th) feeds that node through R3, so the input
// current is i = (v_th - VREF) / (r_th + R3). C1 and R4 in parallel sit in the
// feedback path. With u = vout - VREF:  C1 du/dt = -i - u/R4, an inverting
// integrator whose leak R4 keeps it stable; its DC gain is -R4/R3 and its
// time constant R4*C1 (4 ms with the schematic values). The leak is also
// what moves the zero point of the response with the sweep direction.
//
// The model solves this equation exactly for piecewise-constant input: it
// advances the state whenever v_th or r_th changes and every STEP_NS
// nanoseconds, using u(t+dt) = u_inf + (u - u_inf) exp(-dt / (R4 C1)) with
// u_inf = -R4 i. Pulse widths are therefore exact, and vout is refreshed at
// least every STEP_NS. The output is clamped to +/-VSAT (the op-amp runs
// from +/-12 V). vpoint is the voltage of the Vpoint node: VREF while the
// stage floats, otherwise the divider between v_th and the virtual ground.
// R3, R4, C1 and VREF follow the schematic; VSAT, V_INIT and STEP_NS are
// this model's own values.
`timescale 1ns / 1ps
module integrator #(
  parameter real R3      = 40.0e3,
  parameter real R4      = 40.0e3,
  parameter real C1      = 100.0e-9,
  parameter real VREF    = 2.5,
  parameter real VSAT    = 10.5,
  parameter real V_INIT  = 2.5,
  parameter int  STEP_NS = 100
) (
  input  real v_th,
  input  real r_th,
  output real vpoint,
  output real vout
);
  real     u;
  real     i_in;
  realtime t_last;

  function automatic real settle(input real u0, input real i, input real dt_s);
    real u_inf, un;
    u_inf = -R4 * i;
    un    = u_inf + (u0 - u_inf) * $exp(-dt_s / (R4 * C1));
    if (un > VSAT - VREF)  un = VSAT - VREF;
    if (un < -VSAT - VREF) un = -VSAT - VREF;
    return un;
  endfunction

  task automatic advance();
    u      = settle(u, i_in, ($realtime - t_last) * 1.0e-9);
    t_last = $realtime;
    vout   = VREF + u;
  endtask

  initial begin
    u      = V_INIT - VREF;
    i_in   = 0.0;
    t_last = 0.0;
    vout   = V_INIT;
    vpoint = VREF;
  end

  // New input: integrate the old one up to now, then switch.
  always @(v_th or r_th) begin
    advance();
    i_in   = (v_th - VREF) / (r_th + R3);
    vpoint = VREF + (v_th - VREF) * R3 / (r_th + R3);
  end

  initial forever begin
    #(STEP_NS);
    advance();
  end
endmodule
