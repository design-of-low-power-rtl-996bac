// adc_pkg: types and constants shared by the 4-bit flash ADC.
//
// The converter has N_BITS = 4 bits of resolution, so the comparator array
// produces a thermometer code of 2**N_BITS - 1 = 15 bits. The thermometer
// type is indexed [15:1] so that bit k is comparator output Tk, the same
// numbering as the truth tables of the converter (T1 is the comparator with
// the lowest reference voltage). VDD is the 1.8 V supply of the 0.18 um
// process the circuit was designed for; the analog models use it as the
// logic-high voltage.
package adc_pkg;
  localparam int unsigned N_BITS   = 4;
  localparam int unsigned N_LEVELS = (1 << N_BITS) - 1;  // comparators, thermometer bits
  localparam int unsigned N_RES    = 1 << N_BITS;        // ladder resistors
  localparam real         VDD      = 1.8;

  typedef logic [N_LEVELS:1] therm_t;  // therm_t[k] = Tk
  typedef logic [N_BITS-1:0] gray_t;   // G3..G0
  typedef logic [N_BITS-1:0] bin_t;    // B3..B0
endpackage
