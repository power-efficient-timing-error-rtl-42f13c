`timescale 1ns/1ps
// delay_buffer: behavioural model of a delay line (a chain of buffers).
//
// This is a behavioural model, not synthesizable logic: in silicon it is a
// string of buffer cells sized for the wanted delay. It is used in two places:
// inside the transition detector, where its delay sets the width of the error
// pulse, and in the time-borrowing circuit, where it makes the delayed clock
// CLKDD. Every change of a is scheduled onto y DELAY time units later with a
// delayed non-blocking assignment. Simulators treat this as an inertial
// delay: a pulse on a narrower than DELAY may be filtered out, much as a
// slow buffer chain would. In this design the delay lines only see clock
// phases and data changes that are longer than their delay.
//
// Ports: a (in), y (out, a delayed by DELAY).
module delay_buffer #(
  parameter realtime DELAY = 1.0
) (
  input  logic a,
  output logic y
);
  initial y = a;
  always @(a) y <= #(DELAY) a;
endmodule
