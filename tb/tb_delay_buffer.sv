`timescale 1ns/1ps
// tb_delay_buffer: checks that the delay line reproduces its input exactly
// DELAY later. A random waveform whose levels last longer than DELAY is
// driven; the testbench keeps its own record of the input and compares y
// with the input as it was DELAY ago, sampled at random times.
module tb_delay_buffer;
  localparam realtime DELAY = 2.5;
  logic a = 1'b0, y;
  int checks = 0, failures = 0;
  // history of a, one entry per 0.1 ns
  bit hist [0:20000];
  int tick = 0;

  delay_buffer #(.DELAY(DELAY)) dut (.a(a), .y(y));

  initial begin
    forever begin
      #0.1;
      tick++;
      hist[tick] = a;
    end
  end

  initial begin
    repeat (1000) begin
      #($urandom_range(26, 60) * 0.1 + 0.05);
      a = ~a;
    end
  end

  initial begin
    #5.02;
    repeat (1500) begin
      #($urandom_range(1, 13) * 0.1);
      checks++;
      // tick k is the value of a during ((k)*0.1, (k+1)*0.1)
      if (y != hist[tick - 25]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
