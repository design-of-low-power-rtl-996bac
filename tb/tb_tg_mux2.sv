// tb_tg_mux2: exhaustive test of the 2:1 multiplexer cell. All eight
// combinations of (s, in0, in1) are applied and out is compared with the
// selected input.
module tb_tg_mux2;
  timeunit 1ns; timeprecision 1ps;
  logic in0, in1, s, out;
  int checks = 0, failures = 0;

  tg_mux2 dut (.in0(in0), .in1(in1), .s(s), .out(out));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, in1, in0} = 3'(v);
      #1;
      checks++;
      if (out !== (v >= 4 ? in1 : in0)) begin
        failures++;
        $display("FAIL s=%0b in1=%0b in0=%0b out=%0b", s, in1, in0, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
