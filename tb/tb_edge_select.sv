// tb_edge_select - self-checking testbench for edge_select.
// With mode_n low, sel must stay 0 whatever vnand does, and the XOR outputs
// must equal the inputs. With mode_n high, sel must toggle on every rising
// edge of vnand and on no other event, and both outputs must be the inputs
// inverted while sel is 1. Pulling mode_n low again must clear sel at once.
`timescale 1ns / 1ps
module tb_edge_select;
  logic vin1 = 0, vin2 = 0, vnand = 1, mode_n = 1;
  logic clk1, clk2, sel;
  logic exp_sel;
  int checks = 0, failures = 0;

  edge_select dut (.vin1(vin1), .vin2(vin2), .vnand(vnand), .mode_n(mode_n),
                   .clk1(clk1), .clk2(clk2), .sel(sel));

  task automatic check_all(input string what);
    checks++;
    if (sel !== exp_sel || clk1 !== (vin1 ^ exp_sel) || clk2 !== (vin2 ^ exp_sel)) begin
      failures++;
      $display("FAIL %s at %0t: sel=%b exp=%b vin=%b%b clk=%b%b", what, $time,
               sel, exp_sel, vin1, vin2, clk1, clk2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_sel = 1'b0;
    #1 mode_n = 0;
    #1 check_all("reset");
    for (int phase = 0; phase < 3; phase++) begin
      // phase 0: type 1, phase 1: type 2, phase 2: type 1 again
      mode_n = (phase == 1);
      exp_sel = 1'b0;
      #1 check_all("mode change");
      repeat (500) begin
        case ($urandom_range(0, 2))
          0: vin1 = !vin1;
          1: vin2 = !vin2;
          default: begin
            vnand = !vnand;
            if (vnand && mode_n) exp_sel = !exp_sel;
          end
        endcase
        #1 check_all("random step");
      end
      // a zero-width low pulse on vnand, as the detector produces
      if (!vnand) begin
        vnand = 1;
        if (mode_n) exp_sel = !exp_sel;
      end
      #1 vnand = 0;
      #0 vnand = 1;
      if (mode_n) exp_sel = !exp_sel;
      #1 check_all("zero-width pulse");
      if (phase == 1) begin
        // sel must be 1 before the mode goes away, to see it cleared
        if (!sel) begin vnand = 0; #1 vnand = 1; exp_sel = 1'b1; #1; end
        check_all("sel set");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
