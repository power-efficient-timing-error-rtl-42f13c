`timescale 1ns/1ps
// tb_tet_ff: the timing-error-tolerant flip-flop on a 10 ns clock.
// Each cycle the next data value arrives at a random moment in one of
// three windows relative to the rising edge E that should take it:
//   on time  E-4.0 .. E-1.5   taken at E, no error pulse
//   late     E+0.5 .. E+3.5   Q wrong right after E, then corrected in the
//                             same high phase: Q must hold the new value
//                             0.6 ns after it arrived and err must pulse
//   too late E+5.5 .. E+8.0   (after the falling edge) not corrected: Q keeps
//                             the old value until the next edge
// The expected Q and err come from this scenario bookkeeping alone. The
// change flag chg must, during the high phase, tell whether Q changed at E.
module tb_tet_ff;
  localparam realtime PERIOD = 10.0;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0;
  logic q, err, chg;
  int checks = 0, failures = 0;
  int n_on = 0, n_late = 0, n_toolate = 0;

  tet_ff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .err(err), .chg(chg));

  always #(PERIOD/2) clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t: %s = %b, expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    logic qexp, nv;
    int kind;
    realtime t;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    qexp = 1'b0;
    // now 1 ns after an edge; next edge E in 9 ns
    repeat (300) begin
      kind = $urandom_range(0, 2);
      nv   = $urandom_range(0, 1);
      case (kind)
        0: begin   // on time
          n_on++;
          t = 9.0 - ($urandom_range(15, 40) * 0.1);
          #(t) d = nv;
          #(9.0 - t + 0.5);                       // E+0.5
          check("chg", chg, nv != qexp);
          check("q after edge", q, nv);
          check("err", err, 1'b0);
          qexp = nv;
          #0.5;                                   // back at E+1
        end
        1: begin   // late, corrected in the high phase
          n_late++;
          t = $urandom_range(5, 35) * 0.1;
          #9.0;                                   // at E
          #(0.1) check("q stale", q, qexp);
          #(t - 0.1) d = nv;
          #0.3 check("err", err, nv != qexp);
          #0.3 check("q corrected", q, nv);
          check("chg (late data)", chg, 1'b0);
          qexp = nv;
          // the next value targets the edge after E+10: go to E+11
          #(11.0 - (t + 0.6));
        end
        default: begin // too late: after the falling edge
          n_toolate++;
          t = $urandom_range(55, 80) * 0.1;
          #9.0;                                   // at E
          #(t) d = nv;
          #0.5 check("q uncorrected", q, qexp);
          check("err low phase", err, 1'b0);
          // it is taken at the next edge E' = E+10
          #(10.0 - t - 0.5 + 0.5);                // E'+0.5
          check("q at next edge", q, nv);
          qexp = nv;
          #0.5;                                   // E'+1
        end
      endcase
    end
    checks++; if (n_on == 0 || n_late == 0 || n_toolate == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
