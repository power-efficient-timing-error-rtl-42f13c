`timescale 1ns/1ps
// tb_transition_detector: every rising and every falling edge of d must
// produce an ER pulse of exactly PULSE_WIDTH, and ER must be low otherwise.
// d toggles at random intervals longer than the pulse; ER is sampled just
// after each edge, in the middle of the pulse, just before its end and just
// after its end.
module tb_transition_detector;
  localparam realtime PW = 1.0;
  logic d = 1'b0, er;
  int checks = 0, failures = 0, rises = 0, falls = 0;

  transition_detector #(.PULSE_WIDTH(PW)) dut (.d(d), .er(er));

  task automatic expect_er(logic v);
    checks++;
    if (er != v) begin
      failures++;
      $display("%0t: er=%b expected %b", $time, er, v);
    end
  endtask

  initial begin
    #3;
    expect_er(1'b0);
    repeat (200) begin
      d = ~d;
      if (d) rises++; else falls++;
      #0.05; expect_er(1'b1);
      #0.45; expect_er(1'b1);
      #0.45; expect_er(1'b1);
      #0.10; expect_er(1'b0);
      #($urandom_range(1, 30) * 0.1);
      expect_er(1'b0);
    end
    checks++; if (rises == 0 || falls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
