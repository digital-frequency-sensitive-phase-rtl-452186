// hyst_comparator - behavioural model of one window comparator of the
// detector: an LM339 open-collector comparator with a pull-up resistor and
// positive feedback, i.e. a Schmitt trigger (not synthesizable: analog,
// modelled with reals).
//
// The non-inverting pin sits on a divider between a source (through R_IN)
// and the comparator output (through R_FB), which gives the hysteresis.
//   SIG_ON_PLUS = 0 (U5A): the source is the reference V_REF, the signal goes
//     to the inverting pin. The output is high while v_sig is below the
//     threshold: Vcomp1.
//   SIG_ON_PLUS = 1 (U5B): the source is the signal through R_IN, the
//     reference goes to the inverting pin (through a resistor that carries no
//     current). The output is high while v_sig is above the threshold: Vcomp2.
// The high output level is the pull-up R_PU to DVCC loaded by R_FB + R_IN;
// the low level is taken as 0 V. The comparator switches when the pins
// cross, with no offset. Resistor and reference values come from the
// schematic (defaults: U5A).
//
// Timing: out is re-evaluated whenever v_sig changes, with no delay.
`timescale 1ns / 1ps
module hyst_comparator #(
  parameter bit  SIG_ON_PLUS = 1'b0,
  parameter real V_REF       = 3.3,
  parameter real R_IN        = 1.0e3,
  parameter real R_FB        = 15.0e3,
  parameter real R_PU        = 1.0e3,
  parameter real DVCC        = 5.0
) (
  input  real  v_sig,
  output logic out
);
  function automatic logic decide(input real vs, input logic cur);
    real v_src, v_o, v_plus, v_minus;
    v_src   = SIG_ON_PLUS ? vs : V_REF;
    v_minus = SIG_ON_PLUS ? V_REF : vs;
    v_o     = cur ? (DVCC / R_PU + v_src / (R_FB + R_IN)) / (1.0 / R_PU + 1.0 / (R_FB + R_IN))
                  : 0.0;
    v_plus  = (v_src * R_FB + v_o * R_IN) / (R_IN + R_FB);
    return logic'(v_plus > v_minus);
  endfunction

  // At start the output is taken as low and evaluated once at time zero;
  // positive feedback only confirms a change, so one evaluation settles it.
  initial begin
    out = 1'b0;
    #0 out = decide(v_sig, out);
  end

  always @(v_sig) out = decide(v_sig, out);
endmodule
