`timescale 1ns/1ps
// tet_pipeline: power-efficient timing-error-tolerant pipeline.
//
// Three registers with two long combinational stages between them. The
// combinational logic itself lies outside this module: each register's
// output is a port that feeds it and each register's input is a port that
// returns from it.
//
//   din -> R0 (eagff) -> q0 ..[logic A].. d1 -> R1 (tet_ff) -> q1
//       ..[logic B].. d2 -> R2 (tet_ff) -> q2
//
// R0 is a bank of enhanced auto-gated FFs on the free-running clock. Its
// change flags drive a look-ahead clock gater that stops R1's clock in a
// cycle after R0 kept its value. R1 and R2 are timing-error-tolerant FFs:
// data from logic A or B that arrives after the rising edge, while the
// clock is still high, is corrected within that high phase. A correction in
// R1 makes logic B start late; the time-borrowing controller then clocks R2
// with the delayed clock CLKDD in the next cycle, so R2 has more time and a
// later correction window. R2's clock CLK_TB is gated too, from R1's change
// flags and from the time-borrowing request, so it stops when R1 neither
// changed nor corrected.
// Error correction, time borrowing and look-ahead clock gating follow the
// described method. Placing an auto-gated register in front, making the
// combinational stages external and feeding the time-borrowing request into
// R2's clock enable are this design's choices.
//
// Ports: clk (free running), rst_n (asynchronous, active low; keep it low
// for at least one clock period), din/q0/d1/q1/d2/q2 (WIDTH-bit data),
// q2_chg (R2 change flags for gating a following stage), and status:
// err1/err2 (a correction is under way in R1/R2), tb_sel (R2 runs on
// CLKDD), gclk1 (R1 clock), clk_tb (R2 clock, gated CLK_TB), en1/en2
// (whether the next edge of gclk1/clk_tb will be passed).
// Timing: q2 = B(A(din)) two clock cycles after din is taken by R0.
// Lint reports latches (the flip-flops are latch pairs, the clock gates use
// latches) and a combinational loop in R0 (the self-timed slave clock of the
// auto-gated flip-flops); both are the intended circuit. The clkdd and q
// taps of the time-borrowing controller are left open on purpose.
module tet_pipeline
  import tet_pkg::*;
#(
  parameter int unsigned WIDTH        = DEF_WIDTH,
  parameter realtime     PULSE_WIDTH  = DEF_PULSE_WIDTH,
  parameter realtime     BORROW_DELAY = DEF_BORROW_DELAY
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] q0,
  input  logic [WIDTH-1:0] d1,
  output logic [WIDTH-1:0] q1,
  input  logic [WIDTH-1:0] d2,
  output logic [WIDTH-1:0] q2,
  output logic [WIDTH-1:0] q2_chg,
  output logic             err1,
  output logic             err2,
  output logic             tb_sel,
  output logic             gclk1,
  output logic             clk_tb,
  output logic             en1,
  output logic             en2
);
  logic [WIDTH-1:0] chg0, chg1, err1_b, err2_b;
  logic             cm_sr, clk_tb_ungated;

  // R0: enhanced auto-gated input register
  for (genvar i = 0; i < WIDTH; i++) begin : g_r0
    eagff u_ff (.clk(clk), .rst_n(rst_n), .d(din[i]), .q(q0[i]), .chg(chg0[i]));
  end

  // look-ahead gating of R1 from R0's change flags
  lacg_gater #(.N(WIDTH)) u_gate1 (
    .clk_ref(clk), .clk_in(clk), .rst_n(rst_n), .chg(chg0),
    .gclk(gclk1), .en(en1)
  );

  // R1: first timing-error-tolerant stage
  for (genvar i = 0; i < WIDTH; i++) begin : g_r1
    tet_ff #(.PULSE_WIDTH(PULSE_WIDTH)) u_ff (
      .clk(gclk1), .rst_n(rst_n), .d(d1[i]), .q(q1[i]),
      .err(err1_b[i]), .chg(chg1[i])
    );
  end
  assign err1 = |err1_b;

  // time borrowing for R2 after an R1 correction
  time_borrow_ctrl #(.BORROW_DELAY(BORROW_DELAY)) u_tb (
    .clk(clk), .rst_n(rst_n), .err(err1), .clkdd(), .cm_sr(cm_sr),
    .q(), .sel(tb_sel), .clk_tb(clk_tb_ungated)
  );

  // look-ahead gating of CLK_TB from R1's change flags and the R1 error
  lacg_gater #(.N(WIDTH + 1)) u_gate2 (
    .clk_ref(clk), .clk_in(clk_tb_ungated), .rst_n(rst_n),
    .chg({cm_sr, chg1}), .gclk(clk_tb), .en(en2)
  );

  // R2: second timing-error-tolerant stage
  for (genvar i = 0; i < WIDTH; i++) begin : g_r2
    tet_ff #(.PULSE_WIDTH(PULSE_WIDTH)) u_ff (
      .clk(clk_tb), .rst_n(rst_n), .d(d2[i]), .q(q2[i]),
      .err(err2_b[i]), .chg(q2_chg[i])
    );
  end
  assign err2 = |err2_b;
endmodule
