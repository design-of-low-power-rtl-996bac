// tb_comparator: runs one comparator with a 200 MHz clock (5 ns period) and a
// random input around a fixed reference. After each rising edge dout must
// equal (vin > vref) as sampled at that edge, and it must not change during
// the low phase although vin keeps moving.
module tb_comparator;
  timeunit 1ns; timeprecision 1ps;
  localparam int N_CYCLES = 400;
  logic clk = 0;
  real  vin, vref;
  logic dout;
  logic exp_d;
  int checks = 0, failures = 0, ones = 0;

  comparator dut (.clk(clk), .vin(vin), .vref(vref), .dout(dout));

  always #2.5 clk = ~clk;

  initial begin
    repeat (N_CYCLES + 20) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vref = 0.9;
    vin  = 0.0;
    repeat (N_CYCLES) begin
      #1.0 vin = 0.8 + 0.2 * real'($urandom_range(1000)) / 1000.0;  // sampled at the next edge
      @(posedge clk);
      exp_d = (vin > vref);
      #0.5;
      checks++;
      if (dout !== exp_d) begin
        failures++;
        $display("FAIL t=%0t vin=%f dout=%0b expected %0b", $time, vin, dout, exp_d);
      end
      ones += int'(exp_d);
      @(negedge clk);
      vin = 0.8 + 0.2 * real'($urandom_range(1000)) / 1000.0;
      #1.0;
      checks++;
      if (dout !== exp_d) begin
        failures++;
        $display("FAIL hold t=%0t dout=%0b expected %0b", $time, dout, exp_d);
      end
    end
    checks++;
    if (ones == 0 || ones == N_CYCLES) begin
      failures++;
      $display("FAIL only one decision value was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
