// tb_therm_to_gray: checks the seven-mux thermometer-to-Gray network.
// Part 1 applies the 16 valid thermometer codes (n ones from T1 up) and
// expects the Gray code of n, n ^ (n >> 1). Part 2 applies all 2**15 input
// words, bubbles included, and compares with the nested Boolean form of the
// mux network: G3 = T8, G2 = ~T12&T4, G1 = ~T6&T2 | T6&(~T14&T10),
// G0 = ~T3&T1 | T3&(~T7&T5 | T7&(~T11&T9 | T11&(~T15&T13))).
// (On valid codes this equals the flat form G0 = T1&~T3 | T5&~T7 | ...; on
// codes with bubbles the two differ, and the circuit follows the nested one.)
module tb_therm_to_gray;
  timeunit 1ns; timeprecision 1ps;
  import adc_pkg::*;
  therm_t t;
  gray_t  g, exp_g;
  int checks = 0, failures = 0;

  therm_to_gray dut (.t(t), .g(g));

  function automatic gray_t sop(therm_t x);
    gray_t r;
    r[3] = x[8];
    r[2] = x[4] & ~x[12];
    r[1] = (~x[6] & x[2]) | (x[6] & ~x[14] & x[10]);
    r[0] = (~x[3] & x[1]) | (x[3] & ((~x[7] & x[5]) |
           (x[7] & ((~x[11] & x[9]) | (x[11] & ~x[15] & x[13])))));
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n <= 15; n++) begin
      t = therm_t'((1 << n) - 1);
      exp_g = gray_t'(n ^ (n >> 1));
      #1;
      checks++;
      if (g !== exp_g) begin
        failures++;
        $display("FAIL valid n=%0d t=%b g=%b expected %b", n, t, g, exp_g);
      end
    end
    for (int v = 0; v < (1 << 15); v++) begin
      t = therm_t'(v);
      #1;
      checks++;
      if (g !== sop(t)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%b g=%b expected %b", t, g, sop(t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
