// tb_gray_to_binary: applies all 16 Gray codes. The expected binary value is
// found by searching for the n whose Gray code n ^ (n >> 1) equals the input,
// which is independent of the XOR chain under test.
module tb_gray_to_binary;
  timeunit 1ns; timeprecision 1ps;
  import adc_pkg::*;
  gray_t g;
  bin_t  b;
  int checks = 0, failures = 0;

  gray_to_binary dut (.g(g), .b(b));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 16; n++) begin
      g = gray_t'(n ^ (n >> 1));
      #1;
      checks++;
      if (b !== bin_t'(n)) begin
        failures++;
        $display("FAIL g=%b b=%b expected %b", g, b, bin_t'(n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
