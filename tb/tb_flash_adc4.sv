// tb_flash_adc4: end-to-end test of the 4-bit flash ADC at its default
// parameters, with vref = 1.8 V and a 200 MHz clock (5 ns period).
//
// Phase 1, sine: a 2 MHz, 1 V peak-to-peak sine centred on 0.9 V is
// converted for 1 us (two signal periods, 200 conversions).
// Phase 2, ramp: vin steps from -0.1 V to 1.9 V in 5 mV steps, one step per
// clock, so every output code appears, as well as inputs below the lowest and
// above the highest reference.
// At every rising edge the expected code is computed from vin alone as the
// number of references vref*k/16 (k = 1..15) that vin exceeds. Half a
// nanosecond after the edge, therm and b must match it (one conversion per
// cycle, result available in the cycle of the sampling edge). In the low
// half of the cycle vin is moved and the outputs must not change (the
// comparators' D latches hold). Counted mechanisms: each of the 16 output
// codes, hold phases during which vin changed, conversions below the range
// (code 0 with vin under the first reference) and above it (code 15 with vin
// over vref). Each must occur at least once. The ladder current must be
// vref / 16 kOhm.
module tb_flash_adc4;
  timeunit 1ns; timeprecision 1ps;
  import adc_pkg::*;

  localparam real VREF     = 1.8;
  localparam real T_CLK    = 5.0;    // 200 MHz
  localparam real F_SIG    = 2.0e6;  // 2 MHz
  localparam real AMP      = 0.5;    // 1 V peak to peak
  localparam real MID      = 0.9;
  localparam real PI       = 3.14159265358979;
  localparam int  N_SINE   = 200;    // 1 us
  localparam int  N_RAMP   = 401;    // -0.1 V .. 1.9 V in 5 mV steps

  logic   clk = 0;
  real    vin, vref, i_ladder;
  therm_t therm;
  bin_t   b;

  int checks = 0, failures = 0;
  int code_count [16];
  int holds = 0, below = 0, above = 0;

  flash_adc4 dut (.clk(clk), .vin(vin), .vref(vref), .therm(therm), .b(b),
                  .i_ladder(i_ladder));

  always #(T_CLK / 2.0) clk = ~clk;

  initial begin
    repeat (N_SINE + N_RAMP + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected_code(real v, real r);
    int n = 0;
    for (int k = 1; k <= 15; k++)
      if (v > r * real'(k) / 16.0) n++;
    return n;
  endfunction

  // One conversion: vin is set in the low phase, sampled at the rising edge,
  // checked after it, then disturbed in the next low phase to check the hold.
  task automatic convert(real v);
    int     n;
    therm_t exp_t;
    bin_t   b_held;
    vin = v;
    @(posedge clk);
    n = expected_code(vin, vref);
    for (int k = 1; k <= 15; k++) exp_t[k] = (k <= n);
    #0.5;
    checks++;
    if (b !== bin_t'(n) || therm !== exp_t) begin
      failures++;
      $display("FAIL t=%0t vin=%f b=%0d therm=%b expected %0d", $time, vin, b, therm, n);
    end
    code_count[n]++;
    if (n == 0 && vin < 0.0) below++;
    if (n == 15 && vin > vref) above++;
    @(negedge clk);
    b_held = b;
    vin = VREF - vin;  // move the input across the scale
    #1.0;
    checks++;
    if (b !== b_held || b !== bin_t'(n)) begin
      failures++;
      $display("FAIL hold t=%0t b=%0d expected %0d", $time, b, n);
    end
    if (expected_code(vin, vref) != n) holds++;
  endtask

  initial begin
    vref = VREF;
    vin  = MID;
    @(negedge clk);
    checks++;
    if (i_ladder < VREF / 16000.0 - 1e-12 || i_ladder > VREF / 16000.0 + 1e-12) begin
      failures++;
      $display("FAIL ladder current %e", i_ladder);
    end
    for (int i = 0; i < N_SINE; i++)
      convert(MID + AMP * $sin(2.0 * PI * F_SIG * real'(i) * T_CLK * 1.0e-9));
    for (int i = 0; i < N_RAMP; i++)
      convert(-0.1 + 0.005 * real'(i));
    for (int n = 0; n < 16; n++) begin
      checks++;
      if (code_count[n] == 0) begin
        failures++;
        $display("FAIL output code %0d never produced", n);
      end
    end
    checks += 3;
    if (holds == 0) begin failures++; $display("FAIL no hold phase exercised"); end
    if (below == 0) begin failures++; $display("FAIL no below-range input"); end
    if (above == 0) begin failures++; $display("FAIL no above-range input"); end
    $display("codes:");
    for (int n = 0; n < 16; n++) $display("  %2d: %0d", n, code_count[n]);
    $display("holds=%0d below=%0d above=%0d", holds, below, above);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
