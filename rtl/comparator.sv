// comparator: behavioural model (mixed-signal, not synthesizable) of one
// dynamic comparator of the flash ADC.
//
// Chain: preamp_latch (decides vin > vref at the rising clock edge) ->
// output_buffer (differential to single-ended, inverted '-' output) ->
// d_latch (transparent while clk is high, holds while low) -> inverter.
// The inverter cancels the buffer's inversion, so dout = 1 when vin was above
// vref at the last rising edge of clk. dout changes only just after a rising
// edge and is held through the low phase, i.e. one decision per clock cycle.
// The four stages and their order follow the published comparator; the
// signal polarity through them is this design's reading.
module comparator (
  input  logic clk,
  input  real  vin,
  input  real  vref,
  output logic dout
);
  real  vop, von;
  logic buf_n, held_n;

  preamp_latch  u_pre (.clk(clk), .vip(vin), .vim(vref), .vop(vop), .von(von));
  output_buffer u_buf (.vip(vop), .vin(von), .out_n(buf_n));
  d_latch       u_lat (.clk(clk), .d(buf_n), .q(held_n));

  assign dout = ~held_n;
endmodule
