`timescale 1ns/1ps
// tb_eagff: the enhanced auto-gated flip-flop must behave as a positive-edge
// D flip-flop, and its latched change flag chg must, through the whole high
// phase after an edge, tell whether Q changed at that edge (checked just
// after the edge and just before the falling edge). The expected values
// come from the sequence of d values alone.
module tb_eagff;
  localparam realtime PERIOD = 10.0;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0;
  logic q, chg;
  int checks = 0, failures = 0, n_chg = 0, n_same = 0;

  eagff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .chg(chg));

  always #(PERIOD/2) clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t: %s = %b, expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    logic qexp;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    qexp = 1'b0;
    repeat (400) begin
      @(negedge clk);
      #($urandom_range(5, 35) * 0.1);
      d = $urandom_range(0, 1);
      @(posedge clk);
      #0.5;
      check("q", q, d);
      check("chg early", chg, d != qexp);
      #4.0;
      check("chg late", chg, d != qexp);
      if (d != qexp) n_chg++; else n_same++;
      qexp = d;
    end
    checks++; if (n_chg == 0 || n_same == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
