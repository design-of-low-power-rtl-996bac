// tb_output_buffer: applies differential input pairs and checks that the
// single-ended '-' output is high exactly when vin exceeds vip.
module tb_output_buffer;
  timeunit 1ns; timeprecision 1ps;
  real  vip, vin;
  logic out_n;
  int checks = 0, failures = 0;

  output_buffer dut (.vip(vip), .vin(vin), .out_n(out_n));

  task automatic apply(real p, real n, logic expv);
    vip = p;
    vin = n;
    #1;
    checks++;
    if (out_n !== expv) begin
      failures++;
      $display("FAIL vip=%f vin=%f out_n=%0b expected %0b", p, n, out_n, expv);
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
    apply(1.8, 0.0, 1'b0);
    apply(0.0, 1.8, 1'b1);
    apply(0.9, 0.9, 1'b0);
    apply(1.0, 1.001, 1'b1);
    apply(1.001, 1.0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
