`timescale 1ns/1ps
// lacg_gater: look-ahead clock gater.
//
// The enable of a register for the next cycle is computed one cycle ahead
// from the change flags (chg) of the FFs it depends on: if none of them took
// a new value at the last rising edge, the register's inputs cannot change
// and its next clock pulse is redundant. The OR of the flags is sampled at
// the falling edge of the reference clock clk_ref, the end of the half cycle
// during which the flags are valid, giving the enable a full cycle to reach
// the gate. The sampling element is a pair of latches (transparent while
// clk_ref is high, then while it is low) rather than an edge-triggered flop:
// the flags' own latches reopen at that same falling edge, and a latch pair
// takes the value held during the high phase without a race. A latch, transparent while the clock to be gated clk_in is low,
// then passes it to an AND gate: gclk = clk_in AND enable, free of glitches
// even when clk_in is a delayed copy of clk_ref (up to half a period).
//
// Ports: clk_ref (reference clock), clk_in (clock to gate), rst_n
// (asynchronous, active low: forces the enable on during reset and for
// WARMUP more cycles, so the registers load the values their combinational
// logic computes from the reset state before gating starts; WARMUP must be
// at least the gated register's distance from the first free-running one;
// this design's choice), chg (change
// flags of the source FFs), gclk (gated clock), en (enable used for the
// next edge of clk_in). The latch is the intended clock-gate latch.
module lacg_gater #(
  parameter int unsigned N      = 1,
  parameter int unsigned WARMUP = 2
) (
  input  logic         clk_ref,
  input  logic         clk_in,
  input  logic         rst_n,
  input  logic [N-1:0] chg,
  output logic         gclk,
  output logic         en
);
  localparam int unsigned CW = $clog2(WARMUP + 1);
  logic          en_h, en_a;
  logic [CW-1:0] warm;

  // cycles still to force after reset
  always_ff @(negedge clk_ref or negedge rst_n) begin
    if (!rst_n)            warm <= CW'(WARMUP);
    else if (warm != '0)   warm <= warm - 1'b1;
  end

  // falling-edge sample of the flags, built as a master-slave latch pair:
  // en_h follows the flags while they are valid (clk_ref high), en_a takes
  // en_h while clk_ref is low and holds it for the following high phase
  always_latch begin
    if (!rst_n)       en_h = 1'b1;
    else if (clk_ref) en_h = (|chg) | (warm != '0);
  end

  always_latch begin
    if (!rst_n)        en_a = 1'b1;
    else if (!clk_ref) en_a = en_h;
  end

  // clock-gate latch and AND gate
  always_latch begin
    if (!rst_n)       en = 1'b1;
    else if (!clk_in) en = en_a;
  end

  assign gclk = clk_in & en;
endmodule
