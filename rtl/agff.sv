`timescale 1ns/1ps
// agff: auto-gated flip-flop.
//
// A positive-edge master-slave flip-flop whose slave latch is clocked only
// when it has to change. The master latch is transparent while clk is low.
// At the rising edge the master closes and the XOR of master and slave
// outputs says whether the slave must change; the slave clock is
// clk AND xo. If the values are equal the slave clock pulse is suppressed,
// saving the slave's clock power. If they differ the slave opens, copies the
// master, xo falls and the slave pulse ends by itself: the slave clock is a
// self-timed pulse. That feedback through xo is the combinational loop a
// lint tool reports here; it is the circuit's intended operation.
//
// Ports: clk, rst_n (asynchronous, active low, this design's choice), d, q,
// xo (raw XOR of master and slave: valid only near the rising edge).
// Timing: behaves like a positive-edge D flip-flop.
module agff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic xo
);
  logic m, sclk;

  always_latch begin
    if (!rst_n)    m = 1'b0;
    else if (!clk) m = d;
  end

  assign xo   = m ^ q;
  assign sclk = clk & xo;

  always_latch begin
    if (!rst_n)    q = 1'b0;
    else if (sclk) q = m;
  end
endmodule
