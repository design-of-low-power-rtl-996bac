// tb_resistor_ladder: drives several vref values and checks each tap against
// the voltage-divider value vref*k/16 and the ladder current against
// vref / (16 * 1 kOhm), to a 1 nV / 1 pA tolerance.
module tb_resistor_ladder;
  timeunit 1ns; timeprecision 1ps;
  real vref, i_ladder;
  real tap [15:1];
  int checks = 0, failures = 0;
  real vrefs [4] = '{1.8, 1.0, 0.5, 0.0};

  resistor_ladder dut (.vref(vref), .tap(tap), .i_ladder(i_ladder));

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (vrefs[i]) begin
      vref = vrefs[i];
      #1;
      for (int k = 1; k <= 15; k++) begin
        real expv;
        expv = vref * k / 16.0;
        checks++;
        if (absr(tap[k] - expv) > 1e-9) begin
          failures++;
          $display("FAIL vref=%f tap[%0d]=%f expected %f", vref, k, tap[k], expv);
        end
      end
      checks++;
      if (absr(i_ladder - vref / 16000.0) > 1e-12) begin
        failures++;
        $display("FAIL vref=%f i_ladder=%e", vref, i_ladder);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
