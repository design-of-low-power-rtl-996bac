// tb_tg_xor2: exhaustive test of the XOR cell against its truth table
// (output 1 exactly when the inputs differ).
module tb_tg_xor2;
  timeunit 1ns; timeprecision 1ps;
  logic a, b, out;
  int checks = 0, failures = 0;
  localparam logic [3:0] TRUTH = 4'b0110;  // index {a,b}

  tg_xor2 dut (.a(a), .b(b), .out(out));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (out !== TRUTH[v]) begin
        failures++;
        $display("FAIL a=%0b b=%0b out=%0b", a, b, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
