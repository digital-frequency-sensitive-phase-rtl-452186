// tb_mode_gate - self-checking testbench for mode_gate: all four input
// combinations; the output must be high only when both comparators are high.
`timescale 1ns / 1ps
module tb_mode_gate;
  logic vcomp1, vcomp2, y;
  int checks = 0, failures = 0;

  mode_gate dut (.vcomp1(vcomp1), .vcomp2(vcomp2), .vcomp1and2(y));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {vcomp1, vcomp2} = 2'(i);
      #1;
      checks++;
      if (y !== (i == 3)) begin
        failures++;
        $display("FAIL vcomp1=%b vcomp2=%b y=%b", vcomp1, vcomp2, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
