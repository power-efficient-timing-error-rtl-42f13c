`timescale 1ns/1ps
// tb_lacg_gater: two gaters share the change flags. One gates the reference
// clock itself, the other a copy delayed by 3 ns (as the time-borrowing
// clock is). During each high phase the flags take a random value (all
// zero a third of the time); during the low phase they are scrambled, which
// must not matter. The expected rule: the gated clock passes the next edge
// of its input clock exactly when a flag was set during the high phase
// before it, and passes every edge during reset and the WARMUP cycles
// after it. Each gated clock is sampled at several points around each edge:
// when passed it must stay high for the whole high phase of its input clock
// (no shortened pulse) and be low outside it (no glitch).
module tb_lacg_gater;
  localparam realtime PERIOD = 10.0;
  localparam int N = 4, WARMUP = 2;
  logic clk = 1'b0, clkd, rst_n = 1'b0;
  logic [N-1:0] chg = '0;
  logic gclk_a, gclk_b, en_a, en_b;
  int checks = 0, failures = 0, n_pass = 0, n_stop = 0;

  lacg_gater #(.N(N), .WARMUP(WARMUP)) dut_a (
    .clk_ref(clk), .clk_in(clk), .rst_n(rst_n), .chg(chg), .gclk(gclk_a), .en(en_a));
  lacg_gater #(.N(N), .WARMUP(WARMUP)) dut_b (
    .clk_ref(clk), .clk_in(clkd), .rst_n(rst_n), .chg(chg), .gclk(gclk_b), .en(en_b));

  always #(PERIOD/2) clk = ~clk;
  initial clkd = 1'b0;
  always @(clk) clkd <= #3.0 clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t: %s = %0d, expected %0d", $time, what, got, exp);
    end
  endtask

  bit exp_q[$];
  bit running = 0;
  int warm = WARMUP;

  // driver: flags valid during the high phase, scrambled in the low phase
  always @(posedge clk) if (running) begin
    automatic bit pass;
    #1.0;
    chg = ($urandom_range(0, 2) == 0) ? '0 : N'($urandom);
    if (warm > 0) begin pass = 1; warm--; end
    else pass = (chg != '0);
    exp_q.push_back(pass);
    if (pass) n_pass++; else n_stop++;
  end
  always @(negedge clk) if (running) #1.0 chg = N'($urandom);

  // checker: levels of both gated clocks around each edge
  always @(posedge clk) if (running && exp_q.size() > 0) begin
    automatic bit p = exp_q.pop_front();
    fork
      begin
        #0.5 check("gclk_a after edge", gclk_a, p);
        check("gclk_b before delayed edge", gclk_b, 0);
        #2.0 check("gclk_a mid", gclk_a, p);
        check("gclk_b just before delayed edge", gclk_b, 0);
        #1.0 check("gclk_b after delayed edge", gclk_b, p);
        #1.3 check("gclk_a before fall", gclk_a, p);
        #0.7 check("gclk_a low phase", gclk_a, 0);
        check("gclk_b mid", gclk_b, p);
        #2.4 check("gclk_b before fall", gclk_b, p);
        #0.6 check("gclk_b low phase", gclk_b, 0);
      end
    join_none
  end

  initial begin
    repeat (2) @(posedge clk);
    // release reset in the low phase, just before an edge whose flags were
    // not sampled: that edge and the WARMUP edges after it are forced
    #6 rst_n = 1'b1;
    exp_q.push_back(1'b1);   // the edge right after release (reset enable)
    running = 1;
    repeat (400) @(posedge clk);
    #10;
    checks++; if (n_pass == 0 || n_stop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
