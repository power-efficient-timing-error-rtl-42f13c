`timescale 1ns/1ps
// eagff: enhanced auto-gated flip-flop with a latched XOR output.
//
// An agff whose XOR output (master differs from slave) is captured by an
// extra latch, transparent while clk is low. The raw XOR is only valid in a
// narrow window around the rising edge (after it, the slave copies the
// master and the XOR drops to 0). The latch holds its pre-edge value through
// the whole high phase, so chg tells, for that half cycle, whether the FF has
// just taken a new value. Look-ahead clock gating uses chg to decide whether
// the FFs fed by this one need a clock edge in the next cycle.
//
// Ports: clk, rst_n (asynchronous, active low, this design's choice), d, q,
// chg (valid while clk is high). The latch is intended, and so is the
// combinational loop a lint tool reports through the agff inside (its
// self-timed slave clock).
module eagff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic chg
);
  logic xo;

  agff u_agff (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .xo(xo));

  always_latch begin
    if (!rst_n)    chg = 1'b0;
    else if (!clk) chg = xo;
  end
endmodule
