// th2b_encoder: low-power thermometer-code to binary-code encoder for a
// 4-bit flash ADC.
//
// The encoder works in two steps. The 15-bit thermometer code from the
// comparator array is first turned into a 4-bit Gray code by seven 2:1
// multiplexers (therm_to_gray), whose unused data inputs are tied to ground;
// the Gray code is then turned into binary by a chain of three XOR gates
// (gray_to_binary). Going through Gray code means each thermometer bit feeds
// only one mux, and a single misplaced comparator output (a "bubble")
// disturbs the result less than in a direct binary encoder.
// Interface: t[k] = Tk (T1 = lowest reference), b = {B3..B0}; for a valid
// thermometer code with n ones, b = n. Timing: purely combinational.
module th2b_encoder
  import adc_pkg::*;
(
  input  therm_t t,
  output bin_t   b
);
  gray_t g;

  therm_to_gray  u_t2g (.t(t), .g(g));
  gray_to_binary u_g2b (.g(g), .b(b));
endmodule
