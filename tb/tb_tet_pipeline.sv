`timescale 1ns/1ps
// tb_tet_pipeline: end-to-end test of the timing-error-tolerant pipeline at
// its default parameters (8 bits, 1 ns error pulse, 3 ns borrowed delay).
//
// The two combinational stages are modelled here as delays around
// fixed functions, A(x) = 5x+3 and B(x) = nibble-swap(x) ^ 8'h5A. With a
// 10 ns clock both are critical paths longer than half a period: A takes
// 6 ns and B 8.5 ns. Before each rising edge e the testbench picks whether the
// launches of that edge are slow:
//   slow A (13 ns): data reaches R1 3 ns after edge e+1, R1 corrects (err1)
//   slow B (13 ns): data launched by R1 at an edge reaches R2 3 ns after the
//                   next edge, R2 corrects (err2)
//   slow A then slow B: R1 corrects at +3 ns, so B's data reaches R2 at
//                   +6 ns, after the high phase of CLK. Only the borrowed
//                   clock CLKDD (window +3..+8 ns) lets R2 take it.
// The input repeats in some cycles, so R0 keeps its value and the clocks of
// R1 and then R2 are gated.
// Check: just before every rising edge q2 must equal B(A(x)), computed by
// the testbench, where x is the value R0 took three edges before that edge
// (R0 takes x at edge e, R1 at e+1, R2 at e+2; checked just before e+3). Mechanisms counted (each must occur): R1
// correction, R2 correction, time borrowing, R1 clock gated, R2 clock gated,
// R0 slave clock suppressed.
module tb_tet_pipeline;
  localparam int unsigned W = 8;
  localparam realtime PERIOD = 10.0;
  localparam int NCYC = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] din = '0, d1, d2;
  logic [W-1:0] q0, q1, q2, q2_chg;
  logic err1, err2, tb_sel, gclk1, clk_tb, en1, en2;
  int checks = 0, failures = 0;
  int n_err1 = 0, n_err2 = 0, n_borrow = 0, n_gate1 = 0, n_gate2 = 0, n_r0hold = 0;
  bit slow_a = 0, slow_b = 0;
  bit gclk1_seen, clktb_seen, err1_seen, err2_seen, tb_seen, sclk_seen;

  tet_pipeline dut (.*);

  function automatic logic [W-1:0] fa(logic [W-1:0] x); return W'(x * 5 + 3); endfunction
  function automatic logic [W-1:0] fb(logic [W-1:0] x); return {x[3:0], x[7:4]} ^ 8'h5A; endfunction

  always #(PERIOD/2) clk = ~clk;

  // combinational stage A, launched by q0
  initial d1 = fa('0);
  always @(q0) begin
    automatic logic [W-1:0] v = fa(q0);
    automatic realtime dly = slow_a ? 13.0 : 6.0;
    fork
      begin
        #(dly);
        d1 = v;
      end
    join_none
  end
  // combinational stage B, launched by q1
  initial d2 = fb(fa('0));
  always @(q1) begin
    automatic logic [W-1:0] v = fb(q1);
    automatic realtime dly = slow_b ? 13.0 : 8.5;
    fork
      begin
        #(dly);
        d2 = v;
      end
    join_none
  end

  // stimulus: new input after each edge, scenario flags before each edge
  always @(posedge clk) if (rst_n) begin
    #0.5;
    if ($urandom_range(0, 3) == 0) din = din; else din = W'($urandom);
  end
  always @(negedge clk) begin
    slow_a = rst_n && ($urandom_range(0, 3) == 0);
    slow_b = rst_n && ($urandom_range(0, 3) == 0);
  end

  // reference: value R0 takes at each edge
  logic [W-1:0] din_at [0:NCYC+64];
  int edge_n = 0;
  always @(posedge clk) if (rst_n) begin
    din_at[edge_n] = din;
    edge_n++;
  end
  // compare just before each edge
  always @(negedge clk) if (rst_n && edge_n >= 3) begin
    #(PERIOD/2 - 0.05);
    checks++;
    if (q2 != fb(fa(din_at[edge_n-3]))) begin
      failures++;
      if (failures < 10)
        $display("%0t: q2=%h expected %h", $time, q2, fb(fa(din_at[edge_n-3])));
    end
  end

  // mechanism accounting per cycle
  always @(posedge gclk1) gclk1_seen = 1;
  always @(posedge clk_tb) clktb_seen = 1;
  always @(posedge err1) err1_seen = 1;
  always @(posedge err2) err2_seen = 1;
  always @(posedge tb_sel) tb_seen = 1;
  always @(posedge dut.g_r0[0].u_ff.u_agff.sclk) sclk_seen = 1;
  always @(posedge clk) begin
    #(PERIOD - 0.1);
    if (rst_n && edge_n >= 3) begin
      if (!gclk1_seen) n_gate1++;
      if (!clktb_seen) n_gate2++;
      if (!sclk_seen)  n_r0hold++;
      if (err1_seen)   n_err1++;
      if (err2_seen)   n_err2++;
      if (tb_seen)     n_borrow++;
    end
    {gclk1_seen, clktb_seen, err1_seen, err2_seen, tb_seen, sclk_seen} = '0;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (edge_n == NCYC);
    #(PERIOD / 2);
    $display("mechanisms: r1_correct=%0d r2_correct=%0d time_borrow=%0d r1_gated=%0d r2_gated=%0d r0_slave_held=%0d",
             n_err1, n_err2, n_borrow, n_gate1, n_gate2, n_r0hold);
    checks++; if (n_err1 == 0)   failures++;
    checks++; if (n_err2 == 0)   failures++;
    checks++; if (n_borrow == 0) failures++;
    checks++; if (n_gate1 == 0)  failures++;
    checks++; if (n_gate2 == 0)  failures++;
    checks++; if (n_r0hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * (NCYC + 50));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
