# Weighted-average fuzzy controller

A fuzzy controller can be reduced to a lookup table: the control surface is
sampled on a grid, and the controller reads the value nearest to its inputs.
That is cheap, but the table grows exponentially with the number of inputs,
and a small table gives a stepped, "raw" control surface that can make the
controlled system unstable.

This design keeps the table small and smooths the surface by interpolation.
Each of four 7-bit inputs is split in two:

* a **coarse field**, the top 4 bits, which picks a row of the table
  (4 inputs x 4 bits = a 16-bit address, a 64K x 8 table);
* a **fine field**, the low 3 bits, which says how far the input lies
  between that row and the next.

For every input point the controller reads the 16 table values at the corners
of the 4-D grid cell around it, weights each one by how close the point is
to that corner, and adds them up. The table lives in an external ROM, so the
control surface can be changed by swapping the ROM without touching the logic.

## The arithmetic

Write input *i* as `in_i = {m_i, w_i}` with `m_i` the 4-bit coarse field and
`w_i` the 3-bit fine field. A corner is a 4-bit index `k`; bit 3 of `k`
belongs to input A, bit 0 to input D. For each corner and input:

| corner bit `k_i` | table coordinate       | weight factor `f_i`      |
|------------------|------------------------|--------------------------|
| 0                | `m_i`                  | `~w_i` = `7 - w_i`       |
| 1                | `m_i + 1` (max 15)     | `w_i`                    |

The corner weight is `W_k = f_A * f_B * f_C * f_D` (12 bits), and the output is

```
        15
y = (  SUM  T[addr_k] * W_k  ) >> 4,    addr_k = {A coord, B coord, C coord, D coord}
       k=0
```

Points worth knowing before using the output:

* **"One minus w" is a bitwise inversion.** With 3-bit fine fields, `~w = 7 - w`,
  so the two factors of one input add to 7, not 8. The 16 weights always add
  to 7^4 = 2401. The sum is therefore a weighted average scaled by 2401, and
  no division is needed or done.
* **Output scale.** Table values are 8 bits, products 20 bits, and because
  the weights add to 2401 < 4096 the sum never leaves 20 bits. The 16-bit
  output is the top 16 bits of that sum. A table value `T` at an exact grid
  point (all fine fields 0) comes out as `T * 2401 / 16`, so full scale
  (`T` = 255) is 38,265, not 65,535.
* **Fine field 7 already reaches the next row.** At `w = 7` the whole weight
  sits on the `m + 1` corner, so input `{m, 7}` gives the same output as
  `{m + 1, 0}`. The surface is continuous across cell boundaries, and each
  7-bit input has 8 x 16 = 128 codes with 7 interpolation steps per cell plus
  a repeated value at each boundary.
* **Top of the range.** For `m = 15` the "+1" corner saturates at 15 rather
  than wrapping to row 0, so inputs at the top of the range stay on the last
  table row.

## Hardware structure

```
 in_a..in_d ──► input register ──┬─ coarse fields ─► address provider ─► lut_addr ──► (external ROM)
                                 │                       ▲                                │
                                 │                  corner index                          ▼
                                 │                       │                  lut_data ─► LUT register bank
                                 └─ fine fields ──► weighting block ─► weight bank        │
                                                         ▲                   │            │
                                                  sequencer (up counter)     ▼            ▼
                                                         └────────────► processing unit ──► y
```

| module                  | role |
|-------------------------|------|
| `fuzzy_controller`      | top: input register and wiring |
| `fz_sequencer`          | 4-bit up counter (the corner index) and phase control |
| `fz_address_provider`   | four small multiplexers, each passing a coarse field or the field + 1 |
| `fz_nibble_mux`         | one of those multiplexers, with the saturating +1 |
| `fz_register_bank`      | 16 registers with write enables decoded from the counter; used three times |
| `fz_weighted_average`   | pass/invert of the fine fields, two 3-bit multipliers (A·B, C·D), one 6-bit multiplier, weight bank |
| `fz_processing_unit`    | one shared 8 x 12 multiplier, product bank, 15-adder tree, output register |
| `fz_pkg`                | shared constants, corner type and phase encoding |

The structure trades speed for area: a single multiplier is used sixteen times
instead of sixteen multipliers once. Only the 15 adders of the final tree are
kept parallel. The table values, weights and products each sit in their own
16-entry register bank, written at the entry named by the counter.

## Timing

One evaluation takes three phases, all driven by the same counter:

| phase | cycles | what happens in cycle *k* |
|-------|--------|----------------------------|
| FETCH | 16     | `lut_addr` = address of corner *k*; at the next edge `lut_data` goes into LUT bank[*k*] and weight *k* into the weight bank |
| MAC   | 16     | LUT bank[*k*] x weight bank[*k*] goes into product bank[*k*] |
| SUM   | 1      | the adder-tree sum goes into `y` |

* `start` is accepted on a rising edge while `busy` is low. The four inputs
  are registered on that edge and may change afterwards.
* `done` pulses for one cycle **33 cycles** after the accepting edge. `y` is
  new in that cycle and holds until the next `done`.
* `start` pulses while busy are ignored. With `start` held high a new
  evaluation is accepted in each `done` cycle, so there is one result every
  **34 cycles**. At 9.6 MHz (the clock rate reported for an FPGA
  implementation of this architecture) that is about 3.5 µs per result.
* The ROM is expected to be asynchronous. `lut_addr` comes from registers
  (the input register and the counter, through multiplexers) and is stable
  for the whole cycle. `lut_data` must be valid at the following rising
  edge, so the ROM access time plus the board delay must fit in one clock
  period. A ROM with a registered output would need one more cycle per
  fetch, which the sequencer does not provide.
* `rst_n` is an asynchronous, active-low reset that clears every register.

## Top-level interface (`fuzzy_controller`)

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`      | in  | 1     | clock |
| `rst_n`    | in  | 1     | asynchronous reset, active low |
| `start`    | in  | 1     | request an evaluation |
| `in_a` .. `in_d` | in | 7 each | controller inputs; `[6:3]` coarse, `[2:0]` fine |
| `lut_addr` | out | 16    | ROM address `{A, B, C, D}` coarse coordinates, A in `[15:12]` |
| `lut_data` | in  | 8     | ROM data |
| `y`        | out | 16    | controller output |
| `busy`     | out | 1     | evaluation in progress |
| `done`     | out | 1     | one-cycle pulse, `y` updated |

The 28 input, 16 address, 8 data and 16 output bits are the 68 signal pins of
the original board-level design. Analog-to-digital converters ahead of the
inputs, a digital-to-analog converter after `y` and the ROM itself are board
parts and are not included.

Parameters: `MSB_W` (coarse bits, 4), `LSB_W` (fine bits, 3), `DATA_W`
(table width, 8), `OUT_W` (output width, 16). The number of inputs is fixed
at four (`fz_pkg::N_IN`); the corner index, the pairing of the weight
multipliers and the 15-adder tree are built for four. `OUT_W` must not exceed
`DATA_W + 4*LSB_W`.

## Where this design makes its own choices

The architecture (coarse/fine split, pass/invert weighting, the +1
multiplexers, a single shared multiplier feeding a register bank and an
adder tree, everything steered by one up counter) is the published one. These
details are not fixed there and were chosen here:

* which counter bit steers which input (bit 3 → A ... bit 0 → D);
* saturation of the +1 path at the top of the range (the alternative, a
  4-bit wrap, would interpolate toward row 0);
* the output is the top 16 bits of the 20-bit sum, with no division;
* the phase split (weights formed during the fetch, products in a second
  pass), the input register, and the `start`/`busy`/`done` handshake;
* asynchronous ROM timing and asynchronous reset.

Two other processing-unit designs (16 parallel multipliers; a product
lookup table) were larger than the target FPGA and are not part of this
design. A development version with two inputs is also not built separately.
A two-input surface can be run by holding `in_c` and `in_d` constant.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog:

| testbench | what it checks |
|-----------|----------------|
| `tb_fz_address_provider` | every corner for random and all-ones coarse fields, against a field-by-field reference |
| `tb_fz_register_bank` | reset, random writes against a model, hold with `we` low |
| `tb_fz_weighted_average` | each of the 16 weights against `f_A f_B f_C f_D`, and that they add to 2401 |
| `tb_fz_processing_unit` | `y` against `(sum T*W) >> 4` for random tables and consistent weights, products in random corner order; output hold |
| `tb_fz_sequencer` | corner order in both phases, 33-cycle latency, start ignored while busy, 34-cycle period with start held |
| `tb_fuzzy_controller` | whole design at default sizes against a behavioural ROM: every result against the formula above, latency, 16 reads per evaluation; counts exact grid points, interpolated points, saturation at the top, continuity across cell boundaries, ignored starts and back-to-back results, and fails if any never happened |
| `tb_fz_surface_workload` | renders a four-variable test surface (a damped `sin(r)/r` ridge times a term in the other two inputs) over all 128 x 128 values of A and B at four settings of C and D; checks every point, and that the largest output step along A is below that of a plain lookup and within the bound `max table step x 7^3 / 16` |

`tb/fz_lut_rom_model.sv` is a behavioural model of the ROM, not part of the
design. It reads asynchronously and fills its 64K entries at time zero from a
formula, either an integer test pattern or the test surface (see its header).
On the surface workload the interpolated output's largest step along one
input was 3,280 counts against 22,959 for the plain lookup.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  --top-module tb_fuzzy_controller -y rtl -y tb +libext+.sv -Irtl \
  rtl/fz_pkg.sv tb/tb_fuzzy_controller.sv -o sim
./obj_dir/sim
```

Replace the top module and file for the other testbenches. All run in
seconds at the default sizes. The simulator is two-state, so every register
in the design has a reset.

To lint the synthesizable code:

```
verilator --lint-only -Wall -y rtl +libext+.sv -Irtl rtl/fz_pkg.sv rtl/fuzzy_controller.sv
```

The two assertions in the design (one phase at a time in the sequencer, and
the sum staying inside the product width) are checked in simulation with
`--assert`.
