// resistor_ladder: behavioural model (analog part, not synthesizable) of the
// reference ladder of the flash ADC.
//
// N_RES = 16 equal resistors of R_OHM each are stacked between vref and
// ground. The node between the k-th and (k+1)-th resistor counted from
// ground feeds comparator k, so tap[k] = vref * k / 16 for k = 1..15; tap[1]
// is the lowest reference and belongs to thermometer bit T1. The model
// assumes the comparator inputs draw no current, so the ladder current is
// vref / (16 * R_OHM) and its power vref**2 / (16 * R_OHM). A 1 kOhm unit
// resistor was picked in the design as a compromise: larger values save
// power but slow the settling of the taps and cost area. Settling and
// resistor mismatch are not modelled.
// Timing: continuous (no clock); taps follow vref at once.
module resistor_ladder
  import adc_pkg::*;
#(
  parameter real R_OHM = 1000.0
) (
  input  real vref,
  output real tap [N_LEVELS:1],
  output real i_ladder
);
  always_comb begin
    for (int k = 1; k <= N_LEVELS; k++)
      tap[k] = vref * real'(k) / real'(N_RES);
    i_ladder = vref / (real'(N_RES) * R_OHM);
  end
endmodule
