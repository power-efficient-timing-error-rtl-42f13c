`timescale 1ns/1ps
// tb_master_clock_gen: exhaustive check of CM against the truth table
// worked out by hand: CM is 1 when clk is 0, and when clk is 1 it equals er.
module tb_master_clock_gen;
  logic clk, er, cm;
  int checks = 0, failures = 0;
  // expected CM for {clk, er} = 00, 01, 10, 11
  localparam logic [3:0] TABLE = 4'b1011;   // index {clk,er}: 11->1, 10->0, 01->1, 00->1

  master_clock_gen dut (.clk(clk), .er(er), .cm(cm));

  initial begin
    for (int r = 0; r < 8; r++) begin
      for (int i = 0; i < 4; i++) begin
        {clk, er} = 2'(i);
        #1;
        checks++;
        if (cm != TABLE[i]) begin
          failures++;
          $display("clk=%b er=%b cm=%b expected %b", clk, er, cm, TABLE[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
