// tb_d_latch: checks that q follows d while clk is high and keeps its value
// while clk is low, whatever d does then.
module tb_d_latch;
  timeunit 1ns; timeprecision 1ps;
  logic clk, d, q;
  int checks = 0, failures = 0;

  d_latch dut (.clk(clk), .d(d), .q(q));

  task automatic expect_q(logic e, string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b", what, q, e);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1; d = 0; #1; expect_q(0, "transparent d=0");
    d = 1; #1;          expect_q(1, "transparent d=1");
    clk = 0; #1;        expect_q(1, "hold after close");
    d = 0; #1;          expect_q(1, "hold d=0");
    d = 1; #1; d = 0; #1; expect_q(1, "hold after toggle");
    clk = 1; #1;        expect_q(0, "reopen");
    clk = 0; #1; d = 1; #1; expect_q(0, "hold 0");
    clk = 1; #1;        expect_q(1, "reopen 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
