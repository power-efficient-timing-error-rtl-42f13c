`timescale 1ns/1ps
// tb_agff: the auto-gated flip-flop must behave as a positive-edge D
// flip-flop, and its slave clock must pulse at an edge exactly when the new
// value differs from the stored one. d changes (or repeats) in the low
// phase; the expected q and the expected slave-clock activity are derived
// from the sequence of d values alone.
module tb_agff;
  localparam realtime PERIOD = 10.0;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0;
  logic q, xo;
  int checks = 0, failures = 0, n_pulse = 0, n_held = 0;
  bit sclk_seen;

  agff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .xo(xo));

  always #(PERIOD/2) clk = ~clk;
  always @(posedge dut.sclk) sclk_seen = 1;

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
      #0.2 check("xo in low phase", xo, d ^ qexp);
      sclk_seen = 0;
      @(posedge clk);
      #1.0;
      check("q", q, d);
      check("slave clocked", sclk_seen, d != qexp);
      check("xo after pulse", xo, 1'b0);
      if (d != qexp) n_pulse++; else n_held++;
      qexp = d;
    end
    checks++; if (n_pulse == 0 || n_held == 0) failures++;
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
