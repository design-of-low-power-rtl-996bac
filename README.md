# 4-bit flash ADC with a seven-multiplexer thermometer-to-binary encoder

A flash ADC compares its input against every reference level at once. For 4
bits that takes 15 comparators, and their outputs form a *thermometer code*:
all comparators whose reference lies below the input read 1, all the others
read 0. The digital back end has to turn those 15 bits into a 4-bit binary
number, and has to do it on every clock cycle. It sits on the critical path
and burns power on every conversion.

The encoder here makes the conversion in two steps:

1. **Thermometer to Gray code** with only seven 2:1 multiplexers. Several of
   their data inputs are tied to ground.
2. **Gray code to binary** with a ripple chain of three XOR gates.

The usual direct multiplexer encoder needs eleven 2:1 muxes. A Wallace-tree
encoder needs eleven full adders. The circuit this RTL follows was designed as
transmission-gate cells in a 0.18 µm, 1.8 V process. It was reported to use
about 25.6 µW, the lowest power of the encoders it was compared with. Only the
direct mux encoder was faster.

The repository gives the encoder as synthesizable SystemVerilog. It places
that encoder in a complete 4-bit flash converter: a resistor ladder, 15
clocked comparators and the encoder. The ladder and comparators are analog
circuits, so they are written as behavioural models that use `real` voltages.

## The thermometer-to-Gray network

This part needs the most explanation.

Write `n` for the number of ones in the thermometer code, so Tk = 1 exactly
when k ≤ n. Then look at the Gray code of `n` bit by bit:

| n            | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|--------------|---|---|---|---|---|---|---|---|---|---|----|----|----|----|----|----|
| G3           | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 1 | 1 | 1  | 1  | 1  | 1  | 1  | 1  |
| G2           | 0 | 0 | 0 | 0 | 1 | 1 | 1 | 1 | 1 | 1 | 1  | 1  | 0  | 0  | 0  | 0  |
| G1           | 0 | 0 | 1 | 1 | 1 | 1 | 0 | 0 | 0 | 0 | 1  | 1  | 1  | 1  | 0  | 0  |
| G0           | 0 | 1 | 1 | 0 | 0 | 1 | 1 | 0 | 0 | 1 | 1  | 0  | 0  | 1  | 1  | 0  |

Each Gray bit is 1 on a few *runs* of consecutive `n`. A run that starts at
level a and stops before level b is simply "Ta and not Tb". A 2:1 mux computes
that with b as the select, Ta on input 0 and ground on input 1. When a bit has
several runs, the muxes are chained. The run further up the scale goes into
input 1 of the mux for the run below it, in place of the ground:

```
G3 = T8                                         no gate at all
G2 = MUX1(sel T12; 0: T4, 1: gnd)
G1 = MUX3(sel T6;  0: T2, 1: MUX2)   MUX2(sel T14; 0: T10, 1: gnd)
G0 = MUX7(sel T3;  0: T1, 1: MUX6)   MUX6(sel T7;  0: T5,  1: MUX5)
     MUX5(sel T11; 0: T9, 1: MUX4)   MUX4(sel T15; 0: T13, 1: gnd)
```

As Boolean equations:

```
G2 = ~T12·T4
G1 = ~T6·T2 + T6·(~T14·T10)
G0 = ~T3·T1 + T3·(~T7·T5 + T7·(~T11·T9 + T11·(~T15·T13)))
```

Every thermometer bit from T1 to T15 drives exactly one mux pin. G3 is a plain
wire, so one of the four outputs has no logic behind it.

**Bubbles.** A comparator can misfire, which puts a 0 among the ones or a 1
among the zeros. On every valid thermometer code the nested equations above
give the same result as the flat form
`G0 = T1·~T3 + T5·~T7 + T9·~T11 + T13·~T15`. On codes with bubbles the two
forms differ, because in the chain a low select line cuts off everything above
it. The RTL follows the mux chain. The encoder has no bubble correction of its
own. Going through Gray code limits the damage, because a single misplaced bit
moves only a few Gray bits.

## Gray to binary

`B3 = G3`, `B2 = G2 ^ B3`, `B1 = G1 ^ B2` and `B0 = G0 ^ B1`. Each XOR takes
the binary bit above it, so B0 waits for three XOR delays after G3. The
longest path through the whole encoder is the four-mux G0 chain. Its output
then feeds the last XOR of the chain.

## The converter around the encoder

- **Resistor ladder** (`resistor_ladder`): 16 equal resistors of 1 kΩ run from
  `vref` to ground. Tap k sits at `vref·k/16` and feeds comparator k. Tk is
  therefore 1 when `vin > vref·k/16`. The model also gives the ladder current
  `vref / 16 kΩ`. A large unit resistor saves ladder power but slows the
  settling of the taps. Settling is not modelled.
- **Comparator** (`comparator`): a chain of four stages.
  1. `preamp_latch`: a differential preamplifier with a regenerative decision
     latch.
  2. `output_buffer`: turns the differential signal into one single-ended
     signal on its inverted ('−') output.
  3. `d_latch`: holds the result for the rest of the clock cycle.
  4. An inverter that restores the polarity.
- **Encoder** (`th2b_encoder` = `therm_to_gray` + `gray_to_binary`, built
  from `tg_mux2` and `tg_xor2` cells).

**Timing of the models.** The models use a timing that the RTL chooses for
itself:

- On each rising edge of `clk`, every preamplifier decides whether `vin` is
  above its tap.
- While `clk` is high, the preamplifier shows the decision at full swing. The
  D latch is transparent during that phase.
- While `clk` is low, the preamplifier resets both outputs to VDD/2. The D
  latch is closed then and holds the result.

So `therm` and `b` change only just after a rising edge, and they stay steady
until the next one. That gives one conversion per clock with no pipeline
delay. The encoder is purely combinational. The converter was designed to run
from a 200 MHz clock.

## What is synthesizable and what is a model

| Module                                                         | Kind                                          |
|----------------------------------------------------------------|-----------------------------------------------|
| `th2b_encoder`, `therm_to_gray`, `gray_to_binary`, `tg_mux2`, `tg_xor2` | synthesizable logic                  |
| `d_latch`                                                      | synthesizable; contains one intentional latch |
| `resistor_ladder`, `preamp_latch`, `output_buffer`, `comparator`, `flash_adc4` | behavioural models with `real` ports |
| `adc_pkg`                                                      | shared constants and types                    |

The constants and types in `adc_pkg` are `N_BITS = 4`, `VDD = 1.8`, and the
types `therm_t` (indexed `[15:1]`, so `t[k]` is Tk), `gray_t` and `bin_t`.

Resolution is fixed at 4 bits. The seven-mux network is a hand-made structure
for 15 inputs, and there is no general rule for it at other sizes. The ladder
resistor is a parameter, `R_OHM`, with a default of 1000.0.

## Choices made in this RTL

These points were not specified for the circuit and were decided here:

- The preamplifier decides on the rising edge and resets while `clk` is low.
  The D latch is transparent while `clk` is high. Reversing both would work
  just as well.
- The model sets the overall comparator polarity so that `dout = 1` when
  `vin > vref`. This is the polarity a thermometer code needs.
- The preamplifier reset level (VDD/2) is a modelling choice. The models also
  leave out gain, offset, noise, delay and the bias-voltage pin of the tail
  current source.
- The last stage of the comparator is a level-sensitive D latch, not an
  edge-triggered flip-flop.
- The bottom of the ladder is at ground and `vref` is an input. The testbench
  uses 1.8 V.
- Transistor-level properties of the transmission-gate cells are not
  represented: power, delay, and the choice among CMOS, CPL and other logic
  styles. Only their logic functions are.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

- `tb_tg_mux2` and `tb_tg_xor2` test their cells exhaustively.
- `tb_gray_to_binary` applies all 16 Gray codes.
- `tb_therm_to_gray` applies the 16 valid codes. It then applies all 2^15
  input words and compares them with the nested equations.
- `tb_th2b_encoder` first sweeps the thermometer code down from 15 ones to
  none every 2 ns, twice. It then applies all 2^15 words and compares them with
  an independent reference.
- `tb_resistor_ladder` checks the tap voltages and the ladder current.
- `tb_preamp_latch`, `tb_output_buffer` and `tb_d_latch` check the clocked
  behaviour of each stage.
- `tb_comparator` runs 400 random conversions at 200 MHz. It checks the
  result after each rising edge and again during the hold phase.
- `tb_flash_adc4` runs the whole converter at its default parameters with a
  200 MHz clock and `vref = 1.8 V`:
  - 200 conversions of a 2 MHz, 1 V peak-to-peak sine centred on 0.9 V;
  - then a ramp from −0.1 V to 1.9 V in 5 mV steps, one step per cycle.

  Every result is compared with the number of taps below `vin`. The test
  checks that the output holds while `vin` moves in the low phase. It also
  counts every output code 0 to 15, the hold phases, and inputs below and
  above the range, and fails if any of these never occurs.

Each testbench also failed against a deliberately broken copy of its module.

Electrical figures are out of reach of RTL simulation and were not
reproduced: power, delay, and the linearity measures INL, DNL and ENOB.

## Simulating

With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl rtl/adc_pkg.sv tb/tb_flash_adc4.sv --top-module tb_flash_adc4
./obj_dir/Vtb_flash_adc4
```

Replace `tb_flash_adc4` with any other testbench name to run that test. The
package file must come first on the command line. The testbenches declare
their time unit and the RTL does not, so `--timescale` gives the RTL the same
unit. `-Irtl` lets Verilator find
the other modules by file name.
