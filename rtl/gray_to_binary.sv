// gray_to_binary: 4-bit Gray code to binary with a ripple chain of XOR gates.
//
// B3 = G3, and each lower bit is its Gray bit XORed with the binary bit above
// it: B2 = G2^B3, B1 = G1^B2, B0 = G0^B1, built from three tg_xor2 cells
// as in the published encoder. Writing the chain as a generate loop over
// N_BITS is this design's own form.
// Interface: g = {G3..G0}, b = {B3..B0}. Timing: purely combinational, three
// XOR delays from G3 to B0.
module gray_to_binary
  import adc_pkg::*;
(
  input  gray_t g,
  output bin_t  b
);
  assign b[N_BITS-1] = g[N_BITS-1];

  for (genvar i = N_BITS - 2; i >= 0; i--) begin : g_xor
    tg_xor2 u_xor (.a(b[i+1]), .b(g[i]), .out(b[i]));
  end
endmodule
