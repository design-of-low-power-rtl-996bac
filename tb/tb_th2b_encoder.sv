// tb_th2b_encoder: checks the complete thermometer-to-binary encoder.
// Part 1 repeats the published encoder test: the 15 comparator outputs are
// driven as pulses of falling length so that the code steps down from 15
// ones to none every 2 ns over a 32 ns frame, twice; at each step the output
// must equal the number of ones. Part 2 applies all 2**15 input words and
// compares with a reference built from the nested Boolean equations of the
// mux network
// followed by an arithmetic prefix-XOR Gray-to-binary conversion.
module tb_th2b_encoder;
  timeunit 1ns; timeprecision 1ps;
  import adc_pkg::*;
  therm_t t;
  bin_t   b;
  int checks = 0, failures = 0;
  int codes_seen [16];

  th2b_encoder dut (.t(t), .b(b));

  function automatic bin_t ref_bin(therm_t x);
    logic [3:0] gr;
    bin_t r;
    gr[3] = x[8];
    gr[2] = x[4] & ~x[12];
    gr[1] = (~x[6] & x[2]) | (x[6] & ~x[14] & x[10]);
    gr[0] = (~x[3] & x[1]) | (x[3] & ((~x[7] & x[5]) |
           (x[7] & ((~x[11] & x[9]) | (x[11] & ~x[15] & x[13])))));
    r = gr ^ (gr >> 1) ^ (gr >> 2) ^ (gr >> 3);
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Part 1: two 32 ns frames, code n = 15 - step, step every 2 ns.
    for (int frame = 0; frame < 2; frame++) begin
      for (int step = 0; step < 16; step++) begin
        int n;
        n = 15 - step;
        for (int k = 1; k <= 15; k++) t[k] = (k <= n);
        #1;
        checks++;
        codes_seen[n]++;
        if (b !== bin_t'(n)) begin
          failures++;
          $display("FAIL sweep n=%0d t=%b b=%0d", n, t, b);
        end
        #1;
      end
    end
    for (int n = 0; n < 16; n++)
      if (codes_seen[n] != 2) begin
        failures++;
        $display("FAIL code %0d seen %0d times", n, codes_seen[n]);
      end
    // Part 2: every input word.
    for (int v = 0; v < (1 << 15); v++) begin
      t = therm_t'(v);
      #1;
      checks++;
      if (b !== ref_bin(t)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%b b=%b expected %b", t, b, ref_bin(t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
