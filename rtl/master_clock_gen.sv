`timescale 1ns/1ps
// master_clock_gen: makes the master-latch clock CM of the error-tolerant FF.
//
// CM = (NOT clk) OR er. While clk is low, CM is high and the master latch is
// transparent as in any master-slave flip-flop. While clk is high the master
// would normally be closed; an error pulse er from the transition detector
// then raises CM for the pulse's duration, so late data passes through the
// master latch and, the slave being transparent during the high phase,
// straight on to Q. An er pulse while clk is low has no effect.
// The inverter plus OR gate structure follows the described circuit.
//
// Ports: clk (FF clock), er (error pulse), cm (master clock, active high =
// master transparent). Purely combinational.
module master_clock_gen (
  input  logic clk,
  input  logic er,
  output logic cm
);
  assign cm = ~clk | er;
endmodule
