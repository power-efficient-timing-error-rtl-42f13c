`timescale 1ns/1ps
// transition_detector: makes an error-flag pulse ER on every edge of d.
//
// d is compared with a copy of itself delayed by a delay buffer. A rising
// edge is found by ANDing d with the inverted delayed copy, a falling edge by
// ANDing the inverted d with the delayed copy; the two are ORed. ER is
// therefore high for PULSE_WIDTH after each transition of d, which is how
// long the master latch of the protected flip-flop is reopened.
// The inverter/AND structure and the delay-buffer-defined pulse follow the
// described circuit; combining the two edge detectors with an OR gate is
// this design's choice.
//
// Ports: d (data input of the protected FF), er (pulse output).
// Timing: er rises with any edge of d and falls PULSE_WIDTH later.
module transition_detector #(
  parameter realtime PULSE_WIDTH = tet_pkg::DEF_PULSE_WIDTH
) (
  input  logic d,
  output logic er
);
  logic d_dly;
  logic rise_det, fall_det;

  delay_buffer #(.DELAY(PULSE_WIDTH)) u_dly (.a(d), .y(d_dly));

  assign rise_det = d & ~d_dly;
  assign fall_det = ~d & d_dly;
  assign er       = rise_det | fall_det;
endmodule
