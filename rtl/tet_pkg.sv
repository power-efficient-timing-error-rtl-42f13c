`timescale 1ns/1ps
// tet_pkg: shared timing constants of the timing-error-tolerant pipeline.
//
// The circuits in this design work by shaping clock pulses, so two analog
// delays set their behaviour: the width of the error pulse made by the
// transition detector, and the extra delay of the borrowed clock CLKDD used
// by the second stage after a first-stage error. Neither value is fixed by
// the method itself; the defaults below are chosen for a 10 ns clock with a
// 50 % duty cycle, the reference clock used by the testbenches.
package tet_pkg;
  // Width of the ER pulse, i.e. how long the master latch is reopened.
  // It must exceed the master latch setup time and stay short of the next
  // cycle's earliest data (hold). Chosen value.
  parameter realtime DEF_PULSE_WIDTH  = 1.0;
  // Delay from CLK to CLKDD in the time-borrowing circuit. Must be smaller
  // than half the clock period so that clock switching happens while both
  // CLK and CLKDD are low. Chosen value.
  parameter realtime DEF_BORROW_DELAY = 3.0;
  // Register width of the pipeline. Chosen value.
  parameter int unsigned DEF_WIDTH    = 8;
endpackage
