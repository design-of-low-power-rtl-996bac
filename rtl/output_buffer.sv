// output_buffer: behavioural model (analog part, not synthesizable) of the
// comparator's output buffer.
//
// The circuit is two inverters, the first of which switches the supply of the
// second; together they turn the preamplifier's differential output into one
// rail-to-rail logic signal. The model gives that signal as out_n, the
// buffer's '-' output: out_n = 1 when vin is above vip, else 0 (also when the
// two are equal, as during the preamplifier's reset phase; the D latch that
// follows is closed then). No delay is modelled.
module output_buffer (
  input  real  vip,
  input  real  vin,
  output logic out_n
);
  always_comb out_n = (vin > vip);
endmodule
