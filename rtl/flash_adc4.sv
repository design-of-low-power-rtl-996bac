// flash_adc4: 4-bit flash analog-to-digital converter built around the
// low-power thermometer-to-binary encoder. Behavioural model at the top level
// (its ladder and comparators are analog models; the encoder is synthesizable
// logic).
//
// A ladder of 16 equal resistors between vref and ground provides 15
// reference voltages vref*k/16. Fifteen comparators compare vin against them
// all at once on every rising edge of clk; comparator k drives thermometer bit
// Tk, so the number of ones equals the number of references below vin. The
// encoder (th2b_encoder) converts that thermometer code to the 4-bit binary
// result through an intermediate Gray code, using seven 2:1 muxes and three
// XOR gates.
// Interface: clk, vin and vref (volts), therm (the latched comparator outputs,
// therm[k] = Tk), b = {b3..b0}, and i_ladder, the current the ladder
// draws from vref (amperes). Timing: vin is sampled at each rising edge of
// clk; b is valid right after that edge and held until the next one (one
// conversion per cycle, no pipeline). The published converter was run from
// a 200 MHz clock. The block structure follows the published converter; the
// sampling phase and the real-valued ports are this model's choices.
module flash_adc4
  import adc_pkg::*;
#(
  parameter real R_OHM = 1000.0
) (
  input  logic   clk,
  input  real    vin,
  input  real    vref,
  output therm_t therm,
  output bin_t   b,
  output real    i_ladder
);
  real tap [N_LEVELS:1];

  resistor_ladder #(.R_OHM(R_OHM)) u_ladder (.vref(vref), .tap(tap), .i_ladder(i_ladder));

  for (genvar k = 1; k <= N_LEVELS; k++) begin : g_comp
    comparator u_comp (.clk(clk), .vin(vin), .vref(tap[k]), .dout(therm[k]));
  end

  th2b_encoder u_enc (.t(therm), .b(b));
endmodule
