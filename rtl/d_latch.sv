// d_latch: clocked D latch at the end of each comparator.
//
// The circuit is a pass switch driven by clk in front of two cross-coupled
// inverters: while clk is high the switch is on and q follows d; while clk is
// low the inverter loop holds the last value, so the comparator result stays
// steady for the rest of the clock cycle. The level-sensitive storage is the
// intended behaviour, so a tool reporting a latch here reports the design.
// Interface: clk (transparent high), d, q. There is no reset; q is defined
// after the first high phase of clk.
module d_latch (
  input  logic clk,
  input  logic d,
  output logic q
);
  always_latch begin
    if (clk) q = d;
  end
endmodule
