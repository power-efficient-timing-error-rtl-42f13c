`timescale 1ns/1ps
// tet_ff: timing-error-tolerant flip-flop (clock pulse correction).
//
// A positive-edge master-slave flip-flop built from two latches. The slave
// latch is transparent while clk is high. The master latch is clocked not by
// NOT clk but by CM from master_clock_gen, which also rises while clk is high
// whenever the transition detector on d sees an edge. Data that arrives late,
// after the rising edge but before the falling edge of clk, therefore still
// passes master and slave and corrects Q within the same high phase: the
// wrongly stored value is overwritten without losing a cycle.
//
// Outputs besides q:
//   err - the error pulse qualified by clk high, i.e. the moments when a
//         correction is taking place (high only during the high phase).
//   chg - the XOR of master and slave latched while clk is low, as in the
//         enhanced auto-gated FF: during the high phase it tells whether this
//         FF took a new value at the last rising edge. It feeds look-ahead
//         clock gating of the FFs that depend on this one. Adding this
//         output to the error-tolerant FF is this design's choice.
//
// rst_n (active low, asynchronous) clears both latches and chg; this reset
// is this design's choice. Timing: correction window is the whole high
// phase of clk; Q follows late data about one latch delay after d changes.
// The latches are intended: this is a latch-based flip-flop.
module tet_ff #(
  parameter realtime PULSE_WIDTH = tet_pkg::DEF_PULSE_WIDTH
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic err,
  output logic chg
);
  logic er, cm, m;

  transition_detector #(.PULSE_WIDTH(PULSE_WIDTH)) u_td (.d(d), .er(er));
  master_clock_gen u_mcg (.clk(clk), .er(er), .cm(cm));

  // master latch, clocked by CM
  always_latch begin
    if (!rst_n)  m = 1'b0;
    else if (cm) m = d;
  end

  // slave latch, clocked by clk
  always_latch begin
    if (!rst_n)   q = 1'b0;
    else if (clk) q = m;
  end

  // change flag, valid during the high phase
  always_latch begin
    if (!rst_n)    chg = 1'b0;
    else if (!clk) chg = m ^ q;
  end

  assign err = er & clk;
endmodule
