`timescale 1ns/1ps
// time_borrow_ctrl: second-stage time-borrowing clock selection.
//
// When the first-stage FFs correct a timing error, their new data reaches
// the second stage late, up to half a period. If the second stage's own path
// is also long, that data would miss both the second stage's edge and its
// correction window. This circuit then lends the second stage time: for the
// next cycle its clock CLK_TB is the delayed clock CLKDD instead of CLK.
//
//   cm_sr  SR latch, set by the first-stage error (the CM pulse while CLK is
//          high), cleared once both CLK and CLKDD are low.
//   q      set from cm_sr at the falling edge of CLK.
//   sel    q retimed to the falling edge of CLKDD; selects CLKDD.
//   clk_tb = sel ? CLKDD : CLK.
// The SR latch, the flip-flop set after CLK falls and the CLK/CLKDD
// multiplexer follow the described circuit. Retiming the select to the
// falling edge of CLKDD (so the switch happens while both clocks are low and
// clk_tb never glitches) and the clearing condition of cm_sr are this
// design's choices.
//
// Ports: clk, rst_n (asynchronous, active low), err (OR of the first-stage
// error pulses), clkdd, cm_sr, q, sel, clk_tb. Timing: an error in the high
// phase of cycle k makes edge k+1 of clk_tb arrive BORROW_DELAY late.
module time_borrow_ctrl #(
  parameter realtime BORROW_DELAY = tet_pkg::DEF_BORROW_DELAY
) (
  input  logic clk,
  input  logic rst_n,
  input  logic err,
  output logic clkdd,
  output logic cm_sr,
  output logic q,
  output logic sel,
  output logic clk_tb
);
  delay_buffer #(.DELAY(BORROW_DELAY)) u_dly (.a(clk), .y(clkdd));

  always_latch begin
    if (!rst_n)              cm_sr = 1'b0;
    else if (err)            cm_sr = 1'b1;
    else if (!clk && !clkdd) cm_sr = 1'b0;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= cm_sr;
  end

  always_ff @(negedge clkdd or negedge rst_n) begin
    if (!rst_n) sel <= 1'b0;
    else        sel <= q;
  end

  assign clk_tb = sel ? clkdd : clk;
endmodule
