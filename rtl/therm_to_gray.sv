// therm_to_gray: 15-bit thermometer code to 4-bit Gray code with seven 2:1
// multiplexers.
//
// The idea is that each Gray bit is 1 on a few separated runs of thermometer
// levels, and a run [Ta, Tb) is "Ta and not Tb", which a 2:1 mux computes as
// mux(sel=Tb, in0=Ta, in1=0). Runs of the same bit are stacked by feeding
// the upper run's mux into the '1' input of the lower run's mux:
//   G3 = T8                                   (no mux)
//   G2 = MUX1(sel T12: 0->T4, 1->0)          = T4 & ~T12
//   G1 = MUX3(sel T6 : 0->T2, 1->MUX2)
//        MUX2(sel T14: 0->T10, 1->0)         = T2&~T6 | T10&~T14
//   G0 = MUX7(sel T3: 0->T1, 1->MUX6), MUX6(sel T7: 0->T5, 1->MUX5),
//        MUX5(sel T11: 0->T9, 1->MUX4), MUX4(sel T15: 0->T13, 1->0)
//                                            = T1&~T3 | T5&~T7 | T9&~T11 | T13&~T15
// The constant-0 mux inputs are tied to ground in the circuit; this is what
// keeps the count at seven muxes. The mux numbering and connections follow
// the proposed architecture; only the bit widths and names are this design's.
// Interface: t[k] = Tk, g = {G3,G2,G1,G0}. Timing: purely combinational, the
// longest path is the four-mux G0 chain.
module therm_to_gray
  import adc_pkg::*;
(
  input  therm_t t,
  output gray_t  g
);
  logic mux2_out, mux4_out, mux5_out, mux6_out;

  assign g[3] = t[8];

  tg_mux2 u_mux1 (.in0(t[4]),  .in1(1'b0),     .s(t[12]), .out(g[2]));

  tg_mux2 u_mux2 (.in0(t[10]), .in1(1'b0),     .s(t[14]), .out(mux2_out));
  tg_mux2 u_mux3 (.in0(t[2]),  .in1(mux2_out), .s(t[6]),  .out(g[1]));

  tg_mux2 u_mux4 (.in0(t[13]), .in1(1'b0),     .s(t[15]), .out(mux4_out));
  tg_mux2 u_mux5 (.in0(t[9]),  .in1(mux4_out), .s(t[11]), .out(mux5_out));
  tg_mux2 u_mux6 (.in0(t[5]),  .in1(mux5_out), .s(t[7]),  .out(mux6_out));
  tg_mux2 u_mux7 (.in0(t[1]),  .in1(mux6_out), .s(t[3]),  .out(g[0]));
endmodule
