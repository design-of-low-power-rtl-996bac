// tg_mux2: 2:1 multiplexer, the basic cell of the Gray-code stage.
//
// out = in0 when s = 0, in1 when s = 1. In silicon this cell is two
// transmission gates driven by s and its complement, one passing in0 and the
// other in1 onto a shared output node; the transmission-gate style was
// chosen over static CMOS and pass-transistor styles because it drew the
// least average power in the encoder. At the logic level only the selection
// function remains, written here as a combinational select.
// Timing: purely combinational.
module tg_mux2 (
  input  logic in0,
  input  logic in1,
  input  logic s,
  output logic out
);
  always_comb begin
    if (s) out = in1;
    else   out = in0;
  end
endmodule
