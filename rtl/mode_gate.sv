// mode_gate - combines the two window-comparator outputs into the reset of
// the setting flip-flop.
//
// U2B is a NAND of Vcomp1 and Vcomp2; U2C is a second NAND with both inputs
// joined, acting as an inverter. vcomp1and2 is therefore high only while both
// comparators are high, i.e. while Vanalog lies inside the window between
// the two thresholds, which is where the detector should run as type 2.
//
// Both gates are 74F00 NANDs in the published circuit and are kept as such.
//
// Timing: combinational.
`timescale 1ns / 1ps
module mode_gate (
  input  logic vcomp1,
  input  logic vcomp2,
  output logic vcomp1and2
);
  logic u2b_y;

  assign u2b_y      = !(vcomp1 && vcomp2);   // U2B
  assign vcomp1and2 = !(u2b_y && u2b_y);     // U2C
endmodule
