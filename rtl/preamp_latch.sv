// preamp_latch: behavioural model (analog part, not synthesizable) of the
// comparator's preamplifier with regenerative decision latch.
//
// The real circuit is a differential pair with active loads, biased by a tail
// current source, followed by a cross-coupled pair that regenerates the small
// difference to full swing, and reset switches that clear the previous
// decision. The model keeps the clocked behaviour only: on each rising edge
// of clk it decides whether vip > vim; while clk is high the outputs show
// that decision at full swing (vop = VDD, von = 0 when vip > vim, the reverse
// otherwise); while clk is low the latch is in reset and both outputs sit at
// VDD/2. Which clock phase resets and which decides is this model's choice,
// as are the mid-rail reset level, the absence of gain, offset, noise and
// delay, and leaving out the bias-voltage pin of the tail source.
// Interface: vip is the '+' input (the ADC input), vim the '-' input (a
// ladder tap).
module preamp_latch
  import adc_pkg::*;
(
  input  logic clk,
  input  real  vip,
  input  real  vim,
  output real  vop,
  output real  von
);
  logic decision;

  always_ff @(posedge clk) decision <= (vip > vim);

  always_comb begin
    if (!clk) begin
      vop = VDD / 2.0;
      von = VDD / 2.0;
    end else if (decision) begin
      vop = VDD;
      von = 0.0;
    end else begin
      vop = 0.0;
      von = VDD;
    end
  end
endmodule
