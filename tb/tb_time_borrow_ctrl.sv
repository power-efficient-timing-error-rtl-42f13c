`timescale 1ns/1ps
// tb_time_borrow_ctrl: 10 ns clock, 3 ns borrowed delay. In random cycles
// (also in consecutive cycles) a 1 ns error pulse is driven during the high
// phase of CLK. Expected, from the pulse schedule alone:
//   cm_sr high from the pulse until both CLK and CLKDD are low (CLK fall + 3)
//   q     high for the cycle after the CLK falling edge that follows a pulse
//   clk_tb: the next rising edge comes 3 ns after CLK's (it is CLKDD), and
//           it stays high until CLK fall + 3; otherwise clk_tb equals CLK.
// clk_tb is sampled at several points of each cycle, so a glitch or a
// shortened pulse at a switch-over is caught.
module tb_time_borrow_ctrl;
  localparam realtime PERIOD = 10.0;
  localparam realtime BD = 3.0;
  logic clk = 1'b0, rst_n = 1'b0, err = 1'b0;
  logic clkdd, cm_sr, q, sel, clk_tb;
  int checks = 0, failures = 0, n_borrow = 0, n_plain = 0, n_consec = 0;

  time_borrow_ctrl #(.BORROW_DELAY(BD)) dut (
    .clk(clk), .rst_n(rst_n), .err(err), .clkdd(clkdd), .cm_sr(cm_sr),
    .q(q), .sel(sel), .clk_tb(clk_tb));

  always #(PERIOD/2) clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t: %s = %b, expected %b", $time, what, got, exp);
    end
  endtask

  bit e_of [0:4095];
  int k = 0, kd = 0;
  bit running = 0;

  // driver: decides at each edge whether an error pulse follows
  always @(posedge clk) if (running) begin
    automatic bit e = ($urandom_range(0, 2) == 0);
    automatic int kk = kd;
    kd++;
    e_of[kk] = e;
    if (e) begin
      if (e_of[kk-1]) n_consec++;
      n_borrow++;
      #(1.0 + $urandom_range(0, 20) * 0.1);
      err = 1'b1;
      #1.0 err = 1'b0;
      #0.2 check("cm_sr set", cm_sr, 1'b1);
    end else n_plain++;
  end

  // checker: edge k, borrowed if an error came in cycle k-1
  always @(posedge clk) if (running) begin
    automatic int kk = k;
    automatic bit pe = e_of[kk-1];
    k++;
    fork
      begin
        #0.5 check("clk_tb after edge", clk_tb, !pe);
        #2.0 check("clk_tb before CLKDD rise", clk_tb, !pe);
        #1.0 check("clk_tb after CLKDD rise", clk_tb, 1'b1);
        #1.4 check("clk_tb before CLK fall", clk_tb, 1'b1);
        #0.6 check("q", q, e_of[kk]);
        check("cm_sr held", cm_sr, e_of[kk]);
        check("clk_tb after CLK fall", clk_tb, pe);
        #2.0 check("clk_tb before CLKDD fall", clk_tb, pe);
        #1.0 check("clk_tb both low", clk_tb, 1'b0);
        check("cm_sr cleared", cm_sr, 1'b0);
        check("sel", sel, e_of[kk]);
        #1.4 check("clk_tb before next edge", clk_tb, 1'b0);
      end
    join_none
  end

  initial begin
    e_of[0] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    k = 1; kd = 1;
    running = 1;
    repeat (1000) @(posedge clk);
    #10;
    checks++; if (n_borrow == 0 || n_plain == 0 || n_consec == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
