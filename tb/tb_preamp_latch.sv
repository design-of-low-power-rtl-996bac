// tb_preamp_latch: checks the clocked behaviour of the preamplifier/latch
// model: mid-rail outputs while clk is low, a full-swing decision of
// vip > vim taken at the rising edge and held through the high phase even
// when the inputs cross again.
module tb_preamp_latch;
  timeunit 1ns; timeprecision 1ps;
  real  vip, vim, vop, von;
  logic clk;
  int checks = 0, failures = 0;

  preamp_latch dut (.clk(clk), .vip(vip), .vim(vim), .vop(vop), .von(von));

  task automatic expect_out(real ep, real en, string what);
    checks++;
    if (vop != ep || von != en) begin
      failures++;
      $display("FAIL %s: vop=%f von=%f expected %f %f", what, vop, von, ep, en);
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
    clk = 0; vip = 1.0; vim = 0.9; #1;
    expect_out(0.9, 0.9, "reset phase");
    clk = 1; #1;
    expect_out(1.8, 0.0, "decide vip>vim");
    vip = 0.5; #1;
    expect_out(1.8, 0.0, "held while high");
    clk = 0; #1;
    expect_out(0.9, 0.9, "reset again");
    clk = 1; #1;
    expect_out(0.0, 1.8, "decide vip<vim");
    clk = 0; vip = 0.9000001; #1; clk = 1; #1;
    expect_out(1.8, 0.0, "small difference");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
