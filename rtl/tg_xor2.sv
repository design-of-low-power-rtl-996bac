// tg_xor2: 2-input XOR gate, the basic cell of the Gray-to-binary stage.
//
// out = a ^ b. The transistor-level cell uses a transmission gate and a pair
// of pass transistors steered by b and its complement, with an output
// inverter; logically it is a plain exclusive OR.
// Timing: purely combinational.
module tg_xor2 (
  input  logic a,
  input  logic b,
  output logic out
);
  always_comb out = a ^ b;
endmodule
