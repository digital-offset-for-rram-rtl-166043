# Digital-offset RRAM crossbar unit

An RRAM crossbar multiplies a vector by a matrix in one analog step: each
weight is a device conductance, each input a wordline voltage, and each
bitline current is a dot product. The catch is that a memristor never lands
exactly on the conductance it was programmed to, and it lands somewhere
different every time it is rewritten (cycle-to-cycle variation). Rewriting
until the value is right wears the device out.

This design accepts the error and corrects it digitally after the fact.
Every set of `m` weights of a column that are read in the same step shares
one small digital register, the *offset* `b`. For such a set the unit
computes

    sum_i (V_i + b) * x_i  =  sum_i V_i * x_i   +   b * sum_i x_i
                              (analog crossbar)     (digital: adder + multiplier)

where `V_i` are the weights actually stored. The offsets are chosen once
the crossbar has been programmed and every device measured, so they absorb
whatever error this particular write produced. Since one register serves `m`
weights, the cost is small: 256 registers for a 128 x 128 crossbar at
`m = 16`.

The architecture is the digital-offset technique described in *"Digital
Offset for RRAM-based Neuromorphic Computing: A Novel Solution to Conquer
Cycle-to-cycle Variation"* (Meng et al.). It is applied to a one-crossbar
accelerator with bit-serial inputs, shift-and-add and column ADCs. The RTL
here is an independent implementation of one crossbar unit. The cycle
schedule, widths and interfaces are this implementation's own choices.

## What one unit computes

Default configuration (package `dofs_pkg`):

| quantity | value |
|---|---|
| crossbar | 128 wordlines x 128 bitlines, 2-bit multi-level cells |
| weights | 8 bits, non-negative, 4 cells on 4 adjacent bitlines, so 32 weight columns |
| inputs | 8 bits, applied one bit per step |
| sharing granularity `m` | 16 (so 8 wordline groups, 16 wordlines driven per step) |
| offsets | signed 8 bits, one per (weight column, wordline group): 32 x 8 = 256 |
| ADC | 8 bits, one shared converter, one bitline per clock |
| result | 32 signed 32-bit column values |

For weight column `c` the result is

    y_c = sum_g  R_gc  -  w_shift * sum_i x_i

    R_gc = sum_{i in g} (V_ic + b_gc) x_i                         if the set is stored plain
    R_gc = (2^8 - 1) sum_{i in g} x_i - sum_{i in g} (V_ic + b_gc) x_i   if stored complemented

Three correction terms are involved:

* **Offset `b_gc`**: the digital offset of the set. It is signed, so it can
  pull a set up or down.
* **Complement flag**: a set may store `255 - w` instead of `w`. This gives
  the offline weight optimiser a second candidate per set. The unit then
  post-processes the set's partial result as above. The flag lives in the
  same register-file entry as the offset.
* **`w_shift`**: the weights are stored shifted to be non-negative, for
  example `[-120, 135]` stored as `[0, 255]`. `w_shift * sum(x)` undoes that
  shift.

`offset_en = 0` ignores offsets and complement flags. This is the plain
one-crossbar datapath, for comparison.

Everything is linear in the inputs, so the unit applies all three
corrections per step (per input bit `t` and group `g`), not once at the end.
A step's contribution to column `c` is

    z' = sum_j ADC(bitline 4c+j) << 2j   +   b_gc * s        s = number of ones among the m input bits
    z  = comp_gc ? 255*s - z' : z'
    y_c += (z - w_shift*s) << t

## Cycle schedule

`xbar_controller` runs `8 bits x (128/m) groups` steps. Each step takes
`BL_P + 2` clocks:

1. **SAMPLE** (1 clock). Bit `t` of the 16 inputs of group `g` drives their
   wordlines. The sample-and-holds capture all 128 bitline currents. The
   input-sum adder counts the ones (`s`) and the shift-and-add unit latches
   `s` and `t`.
2. **CONV** (128 clocks). The ADC converts bitline 0, 1, ... 127, one per
   clock, with one clock of latency.
3. **DRAIN** (1 clock). The last conversion reaches the shift-and-add unit.

While the four slices of weight column `c` come out of the ADC, the offset
register file is read at `c*GROUPS + g`. The Wallace-tree multiplier forms
`b_gc * s` in the same clock. The sum is added on the fourth slice.

The adder runs once per step and the multiplier once per weight column. Both
are hidden inside the conversion, so a VMM takes
`8 * 8 * 130 + 1 = 8321` clocks whether the offset path is on or off. This
is the "no added latency" property, and the end-to-end test checks it.
`start` is ignored while `busy`. `done` pulses for one clock, and `y` is
valid from then on.

## Using the unit

Drive the ports of `digital_offset_xbar` in this order:

1. **Program** the cells: `prog_en`, `prog_row`, `prog_bl`, `prog_level`,
   one cell per clock. Weight `w` of row `r`, column `c` goes to bitlines
   `4c .. 4c+3`, least significant 2 bits on `4c`.
2. **Test** the devices: set `test_row`/`test_bl` and read `test_g`, the
   actual conductance in units of one level with 8 fractional bits. Offline
   software uses these values to tune the offsets.
3. **Load offsets**: `ofs_we`, `ofs_addr = c*GROUPS + g`, and
   `ofs_data = {comp, b}` (type `offset_entry_t`).
4. **Load inputs**: `in_we`, `in_addr`, `in_data`. Then set `w_shift` and
   `offset_en`.
5. **Run**: pulse `start` and wait for `done`. `adc_sat` pulses whenever a
   conversion clipped.

Choosing the target weights and the offsets is software and is not part of
this RTL. That software does the variation-aware weight optimisation, picks
complemented sets, and trains the offsets by back-propagation once the
devices have been measured.

## Blocks

| module | kind | role |
|---|---|---|
| `digital_offset_xbar` | top | wires the unit together |
| `xbar_controller` | RTL | step sequencer (FSM), cycle schedule above |
| `input_register` | RTL | input vector; drives one bit of the active group's inputs |
| `input_sum_adder` | RTL | adder tree counting the ones among the `m` active input bits |
| `offset_regfile` | RTL | `H = S*l/m` entries of `{comp, signed b}` |
| `wallace_mult` | RTL | signed 8 x unsigned 8 Wallace-tree multiplier (3:2 carry-save layers + final adder) |
| `complement_unit` | RTL | `comp ? (2^n-1)*s - z' : z'` |
| `shift_add_unit` | RTL | slice and input-bit shift-and-add, offset addition, weight-shift correction, result registers |
| `rram_crossbar` | behavioural | memristor array with variation, device test port, bitline currents |
| `sh_adc` | behavioural | sample-and-holds and column-by-column ADC |
| `dofs_pkg` | package | sizes and the `offset_entry_t` type |

## The analog models

`rram_crossbar` and `sh_adc` stand in for analog circuits. `rram_crossbar`
is not synthesizable: it uses `real` arithmetic and `$urandom`. `sh_adc` is
written as plain logic but models a converter, not a digital block to be
built.

* **Conductance**: a cell programmed to level `l` (0..3) gets
  `G(l) * exp(theta)`, with `theta ~ N(0, SIGMA)` drawn anew at every write.
  Rewriting the same cell therefore gives a different value.
  `G(l) = 3/200 + l * (1 - 1/200)`, in units of one level. The lowest state
  is not zero because the ON/OFF ratio is 200. The value is stored with 8
  fractional bits and saturates at 255.996 levels. `SIGMA` defaults to 0.5;
  the technique was evaluated for 0.2 to 1.0.
* **Bitline current**: the sum of the conductances of the driven rows. Wire
  resistance and nonlinearity are not modelled.
* **ADC**: rounds a held current to the nearest whole level and saturates
  at `2^ADC_B - 1`.

Variation is applied per cell, not per 8-bit weight. A weight's error is
therefore the slice-weighted sum of four independent cell errors.

## Parameters

Top-level parameters: `ROWS_P`, `BL_P`, `M`, `ACT`, `ADC_B`, `SIGMA`,
`SEED` and `CELL_B` (bits per cell). The derived `SLC`, `WCOL_P`, `GROUPS`,
`STEPS` and `H` should be left alone. `M` must divide `ROWS_P`.

`ACT` is the number of wordlines driven per step. It defaults to `M`, so
each step reads exactly one offset set. `M` may be any multiple of `ACT`. A
set then spans `M/ACT` successive steps and its offset is applied in each of
them. That gives finer sharing than one offset per read step (fewer
registers, more steps). A VMM takes `8 * (ROWS_P/ACT) * (BL_P+2) + 1`
clocks.

`CELL_B = 1` gives single-level cells: 8 cells per weight and 16 weight
columns per 128 bitlines. The technique's accuracy was evaluated with both
single-level and 2-bit cells; its cost was estimated with 2-bit cells,
which are the default here.

The sharing granularities evaluated for the technique are 16, 64 and 128.
At `M = 128` a bitline can sum to 384 nominal levels, so set `ADC_B = 9` or
the ADC clips. The register count follows `H = ROWS_P * WCOL_P / M`: 256 at
`M = 16`, 32 at `M = 128`.

## Departures and own choices

These come from this implementation, not from the technique's description:

* ADC resolution (8 bits), rounding, and one conversion per clock.
* Offsets in two's complement. The technique uses negative offsets but does
  not state an encoding.
* The complement flag is stored per offset set beside the offset.
* `w_shift` is a run-time input. The offset path can be switched off.
* The step order and the non-overlapped SAMPLE/CONV/DRAIN schedule. Sampling
  could overlap conversion with double-buffered sample-and-holds.
* The offset registers are flip-flops with a combinational read. An SRAM
  macro would add a read cycle, and the read address would then have to be
  issued one clock earlier.
* One input-sum adder per crossbar, since the count over the active rows is
  the same for every column.
* The multiplier is sized to the input count: 8 x 5 bits at `m = 16`, and
  the full 8 x 8 at `m = 128`.
* The fixed stage time of the underlying pipeline (100 ns) is not modelled.
  The unit is a plain synchronous design, one ADC conversion per clock.

Not included: the tile around the unit (buffers, other crossbars,
interconnect, activation units), and the offline optimisation and tuning
software.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
prints `TB_RESULT checks=N failures=M` and has a watchdog.
`tb_digital_offset_xbar` drives six copies of the unit through
`tb/dofs_harness.sv`:

* **Full size**: every parameter at its default. It runs a VMM with offsets
  and one without. Both are compared with a model built from the measured
  conductances, including ADC rounding and saturation.
* **Ideal cells**: `SIGMA = 0`, 32 x 32, `m = 8`. The result must equal
  plain integer arithmetic on weights, offsets, complements and shift.
* **Saturation**: a 5-bit ADC, so that conversions clip.
* **`m = 128`**: `ADC_B = 9`.
* **Single-level cells**: `CELL_B = 1`, 32 x 32, `m = 16`.
* **Multi-step sets**: `m = 32` with 8 wordlines per step, ideal cells,
  checked exactly.

The testbench also confirms that each of these happened at least once:
positive and negative offsets, complemented sets, plain runs, the
weight-shift correction, ADC saturation, and equal latency with and without
offsets.

`tb_pwt_vmm` shows the point of the design on the full-size unit at
`SIGMA = 0.5`. Weights are written once and every device is measured. Each
set then gets the offset that cancels its mean measured deviation. This is
a closed-form stand-in for the back-propagation tuning, which needs a
network and a loss function. The testbench requires the VMM error against
exact `sum w*x` to at least halve compared with the plain datapath. In a
typical run it drops about six-fold, from 8.7M to 1.4M summed over 32
columns.

Run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/dofs_pkg.sv tb/tb_digital_offset_xbar.sv --top-module tb_digital_offset_xbar
    ./obj_dir/Vtb_digital_offset_xbar

The same command with another `tb_<module>` runs a single block's test.

The digital datapath is checked against independent models and against
exact arithmetic. The two behavioural models are checked against their own
specification: level values, current sums, and the mean and spread of
`ln(G/G0)` over 4000 writes. They are not checked against measured devices.
No accuracy figures for whole networks can be reproduced with this RTL: that
needs the offline software and many crossbar units.
