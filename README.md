# Distribution-aware SAR-ADC for a memristive in-situ processing element

In a memristive in-situ accelerator the crossbar computes a matrix-vector
product in the analog domain. Every bitline then needs an analog-to-digital
conversion, and the ADCs dominate the energy. A conventional SAR-ADC spends
R comparisons on every sample, whatever the value. The values are far from
uniform, though. Depending on which input bit-slice is applied, a bitline's
outputs are either roughly normal around some peak, or piled up near zero
with a long thin tail.

This design makes the SAR-ADC use that knowledge. It has two conversion
methods:

* **CMB** (biased distributions) guesses that the top bits are zero and only
  backs off when the guess fails.
* **CMN** (normal distributions) starts just below the distribution peak and
  walks down from there.

A small counter switches between the two methods from one input slice to
the next. The parameters of each method sit in a handful of registers, which
are loaded with the result of an offline search.

The RTL contains the reconfigurable SAR-ADC as synthesizable logic, a
complete processing element (PE) around it, and a tile of eight PEs with an
adder tree and tile buffers. The PE's analog parts (DACs, crossbar,
sample-and-hold, column MUX, CDAC, comparator) are behavioural models, so the
whole thing simulates end to end.

## The conversion methods as an interval search

This is the part that takes the most care, so here it is in detail. All
three methods are carried out by one mechanism in `rtl/sar_logic.sv`. The
logic keeps an interval `[lo, hi)` that must contain the input code. At the
start it is `[0, 2^R)`. Each clock cycle it sends one reference code `S_ref`
to the CDAC and reads the comparator:

* if `S_comp = 1` (V_in >= V_ref), then `lo = S_ref`;
* otherwise `hi = S_ref`.

The conversion ends when only one code is left (`lo + 1 == hi`), and that
code is the result. The methods differ only in which references they try.

**CMB, parameters N_start and N_step.** The first reference is
`2^(R-1-N_start)`, which claims that the top N_start bits are zero. If the
input is below it, the claim holds. Otherwise N_start is lowered by N_step
(never below 0) and the next, larger, power of two is tried. This repeats
until a claim holds, or until the claim with N_start = 0 fails, which means
the MSB is 1.

**CMN, parameters N_start, N_step and N_off.** The first reference is
`2^(R-1-N_start) - 2^N_off`, just below the peak.

* If the input is below it, N_off grows by N_step. Each new reference is
  lower. This goes on until the input is above a reference, so that it lies
  between two successive references. It also stops when the next reference
  would be zero or negative.
* If the input is above the *first* reference, CMN falls back to CMB with the
  same N_start and N_step. The failed CMN reference stays as the lower bound.

**Binary search of the rest.** Once the methods have narrowed the interval,
the bits on which `lo` and `hi-1` agree are known. The next reference sets
the highest bit on which they differ, keeps the known prefix and clears the
bits below. A bit that the bounds already force is never compared. For
example, if CMB's claim at 8 failed and its claim at 16 held, the input is in
`[8, 16)`, so bit 3 is 1 for free.

Worked examples with R = 5. The comparison count is the figure of merit,
since the energy is roughly proportional to it.

| method and parameters            | input | references tried       | comparisons |
|----------------------------------|-------|------------------------|-------------|
| CMB, N_start=2, N_step=1         | 2     | 4, then 2, 3           | 3           |
| CMB, N_start=2, N_step=1         | 5     | 4, 8, then 6, 5        | 4           |
| CMB, N_start=2, N_step=1         | 12    | 4, 8, 16, then 12, 14, 13 | 6        |
| CMN, N_start=1, N_off=1, N_step=1 | 5    | 6, 4, then 5           | 3           |
| CMN, N_start=1, N_off=1, N_step=1 | 7    | 6, (fall back) 8, then 7 | 3         |
| CMN, N_start=1, N_off=1, N_step=1 | 25   | 6, 8, 16, then 24, 28, 26, 25 | 7    |
| plain SAR                        | any   | 16, ...                | 5           |

A good guess saves comparisons. A bad one costs extra comparisons, up to
2R - 1 in the worst case. That is why the parameters are searched offline
per crossbar, and why the method changes per input slice.

Settings outside the meaningful range are handled as follows:

* N_start greater than R-1 is used as R-1.
* N_step = 0 is used as 1.
* A CMN setting whose first reference would be 0 or less runs as CMB.

## Switching between the methods

`rtl/switch_counter.sv` counts input slices. The first C_0 slices of an
input vector use parameter set 0 (CMN). The next C_1 slices use set 1 (CMB).
Then the pattern repeats. With 8 input slices and C_0 = 5, C_1 = 3, slices
0-4 use CMN and slices 5-7 use CMB.

* The PE sequencer pulses `slice_done` at the end of each slice, which
  advances the counter.
* It pulses `slice_clear` at the start of each vector, so a given slice
  always gets the same method.
* A period of length 0 is skipped.

## Register map

These registers are in `rtl/adc_cfg_regs.sv`. They are written through
`cfg_we/cfg_addr/cfg_wdata`, and `cfg_rdata` reads them combinationally.

| addr | register  | meaning                      | reset |
|------|-----------|------------------------------|-------|
| 0    | RC_0      | C_0, slices per CMN period   | 5     |
| 1    | RC_1      | C_1, slices per CMB period   | 3     |
| 2    | R_Start_0 | N_start of CMN               | 1     |
| 3    | R_Step_0  | N_step of CMN                | 1     |
| 4    | R_Off_0   | N_off of CMN                 | 1     |
| 5    | R_Start_1 | N_start of CMB               | 2     |
| 6    | R_Step_1  | N_step of CMB                | 1     |

* C_0 and C_1 are 8 bits wide. The N fields are 4 bits wide, which covers
  ADCs up to 16 bits.
* The reset values are the settings of the examples above. In real use they
  are overwritten with searched values.
* Write the registers only between conversions. An assertion checks this.

## The processing element

`rtl/pe_top.sv` contains:

```
 in_*  -> pe_input_buffer -> dac_array -> crossbar -> sample_hold -> analog_mux
                                  (w_* programs the cells)               |
                                                                         v
 out_* <- pe_output_buffer <-> shift_add <------------------- reconfig_sar_adc
                                                             (adc_cfg_regs, switch_counter,
                                                              sar_logic, cdac, comparator)
          pe_ctrl sequences all of it
```

* Each crossbar row takes one 8-bit activation, applied one bit per slice,
  LSB first.
* For slice s, all 32 bitlines are sampled at once. The single ADC then
  converts them column after column.
* `shift_add` adds `code << s` into that column's word of the output buffer.
* After eight slices each output word holds
  `sum_s min(bitline_j(s), 2^R - 1) * 2^s`. This is the matrix-vector
  product, except that a slice's bitline is clipped at ADC full scale.
* `stat_steps` reports the comparisons spent on the last product.
  `stat_cmn_convs` and `stat_cmb_convs` count conversions by method. Compare
  `stat_steps` with `R * COLS * NSLICE` for a plain SAR.

### Timing

* **ADC.** One comparison per clock. `start` is taken while idle, or in the
  cycle where `done` is high. `done` pulses k cycles after the start edge,
  where k is the `steps` output. Back-to-back conversions take k + 1 cycles
  each.
* **PE.** Each slice has one DAC/sample cycle, then the conversions, then one
  slice-end cycle. `done` rises `NSLICE * (COLS + 2) + stat_steps` edges
  after the edge that takes `start`. With the defaults that is
  `256 + stat_steps`.

### Analog models

The synthesis front end does not accept `real`. So analog voltages travel as
24-bit unsigned fixed-point numbers (`adc_pkg::analog_t`) in units of 1/256
ADC LSB.

* One unit of cell conductance at one unit of input adds exactly one LSB to
  the bitline.
* The CDAC is a binary-weighted capacitor sum. Its `CAP_ERR` parameter can
  add per-capacitor mismatch.
* The comparator is ideal, and ties give 1.
* The DACs, crossbar, sample-and-hold and column MUX are ideal: no noise, no
  IR drop, no droop.

These models are written so that the linter and the synthesis front end
accept them. They are not circuit descriptions.

## The tile

`rtl/tile_top.sv` is the top. It holds eight PEs, a tile input buffer, an
adder tree and a tile output buffer, sequenced by `tile_ctrl`:

```
 in_* -> tile_buffer (256 x 8) --load--> PE 0 .. PE 7 --column c--> tile_adder_tree
                                         (each its own crossbar,            |
                                          ADC and ADC registers)            v
 out_* <------------------------------------------------------ tile_buffer (32 x 16)
```

* **Mapping.** The tile computes `y = W x` for a 256 x 32 weight matrix and a
  256-element input vector. PE p holds rows `32p .. 32p+31` of W and gets the
  matching 32 activations. The adder tree adds the eight partial sums of each
  column.
* **Per-PE registers.** Each PE has its own ADC register set, written through
  `cfg_*` with `cfg_pe` selecting the PE. The best parameters depend on the
  statistics of each crossbar, so they are searched and loaded per PE.
* **Waiting for the slowest PE.** All PEs start together. Their run time
  depends on how many comparisons their ADC needs, so they finish at
  different times. The sequencer collects the `done` pulses and starts the
  reduction only when all eight have arrived.
* **Reduction.** One column per cycle goes through the adder tree. The tree
  is a balanced binary tree with one register at its output, and its result
  is written into the output buffer one cycle later.
* **Timing.** `done` rises `NPE * ROWS + 2 + T_slowest + COLS + 1` edges after
  the start edge. With the defaults that is `256 + 2 + T_slowest + 33`, where
  `T_slowest = 256 + stat_steps` of the slowest PE.
* `stat_steps` of the tile is the sum over all PEs.

The results are not clipped after the PEs: `out_data` is 16 bits wide, which
holds eight 13-bit PE results.

## Parameters and where they come from

| parameter | default | origin |
|-----------|---------|--------|
| `R` (ADC bits) | 5 | the resolution of the published conversion examples. The evaluated ADC resolution is not given |
| `IN_BITS` / `SW` | 8 / 1 | eight input slices per vector, as in the switching example. 1-bit slices are this design's choice |
| `NPE` | 8 | the number of PEs drawn in a tile of the architecture. No number is given |
| `ROWS`, `COLS` | 32, 32 | this design's choice |
| `CELL_BITS` | 1 | this design's choice |
| C_0, C_1 reset | 5, 3 | switching example |

All modules are parameterized. The testbenches also run the SAR logic at
R = 8, the DACs at 2 bits, and the crossbar with 2-bit cells.

## What is not here

* **Activation, pooling and the chip level.** The architecture also places
  activation and pooling units in each tile, and many tiles with a global
  buffer on a chip. Their functions and organisation are not specified, so
  no RTL is given for them. The tile output is the adder tree result.
* **Multi-bit weights.** `shift_add` weights only the input slices. How
  multi-bit weights spread over several columns would be recombined is not
  specified either. Each column is treated as one independent output.
* **The "Timing" unit of the ADC.** It has no separate module. The
  one-comparison-per-clock sequencing lives in `sar_logic`.
* **The offline parameter search.** It is software: it tries all parameter
  combinations on sample data and keeps the one with the fewest comparisons.
* **The evaluated networks.** AlexNet, VGG-11/16 and ResNet-18 need tens of
  thousands of such tiles. One tile can only run one 256 x 32 piece of a
  layer at a time.

Choices of this design where the architecture is silent:

* the interval formulation;
* the stop rule of the CMN offset walk;
* the clamping rules for out-of-range settings;
* the PE and tile schedules and the row mapping of the tile;
* the register addresses and widths;
* the restart of the switch pattern with every vector;
* saturation at full scale.

## Verification

Every module has a self-checking testbench in `tb/`, `tb_<module>.sv`. Each
one prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_sar_logic` runs every branch of the worked examples, and checks their
  reference sequences. It then covers every input code for every parameter
  set at R = 5, plus random cases at R = 8. In each case it compares the
  result, the comparison count (against a separately written bit-by-bit
  model) and the latency.
* `tb_reconfig_sar_adc` converts fractional and over-range analog inputs. It
  checks the switching pattern and register reprogramming.
* `tb_pe_top` runs the whole PE at its default size, with no parameter
  overrides. It programs a random weight matrix and runs six products. For
  each product it checks every column against a reference model, the total
  comparison count and the latency. It also counts each mechanism and fails
  if one never occurs: CMB prediction held, CMB roll-back, CMN offset step,
  CMN fall-back, switch to CMB and back, ADC saturation, and register
  writes. It finishes in well under a second.
* `tb_tile_top` runs the whole tile at its default size, with no parameter
  overrides. It programs PEs of different weight density, gives them
  different ADC settings and runs three 256-element products, the last at
  full scale. For each it checks all 32 results, the total comparison count
  against a model and the latency. It counts CMB roll-backs, CMN fall-backs,
  CMN offset steps, ADC saturation and PEs finishing at different times, and
  fails if one never occurs. It finishes in well under a second.
* `tb_tile_ctrl`, `tb_tile_adder_tree` and `tb_tile_buffer` check the tile
  parts on their own. `tb_tile_ctrl` models the PEs' `done` pulses with
  random delays.
* `tb_adc_distribution_workload` runs the strategy on a 6-bit ADC. Its
  bitline outputs are shaped like a real crossbar's: five roughly normal
  slices, and three slices where 67 %, 57 % and 93 % of the outputs are zero.
  It performs the offline parameter search in the testbench, loads the
  registers, and converts a fresh sample draw. It checks every code, and
  checks that the comparison counts match the model. In a typical run
  the biased slices need 72 % fewer comparisons than binary search,
  the normal ones 10 % fewer, and 32 % fewer overall.

To simulate with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/adc_pkg.sv tb/tb_tile_top.sv --top-module tb_tile_top -o sim
./obj_dir/sim
```

Replace `tb_tile_top` with any other testbench name to run that one instead.
