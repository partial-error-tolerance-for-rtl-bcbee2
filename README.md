# Partially error-tolerant bit-plane FIR filter

Many signal-processing results are still useful when their low-order bits are
wrong. This FIR filter uses that fact to spend redundancy only where it
matters. It is a pipelined bit-plane array of small adder cells. Only the cells
whose faults could reach the α most significant output bits are protected by
triple modular redundancy (TMR: three copies and a majority voter). A fault in
any other cell can still change the result, but by less than 2^(W−α), where W
is the output width. Setting α is the only design decision: α = 0 gives the
plain array, α = L0 the fully triplicated one, and every value in between
trades area for the size of the error that can get through.

The filter computes

    y_i = c_0·x_i + c_1·x_(i−1) + … + c_(KC−1)·x_(i−KC+1)

for unsigned N-bit samples and unsigned M-bit coefficients. It takes one
sample per clock and gives one result per clock, KC·M clocks after the sample.

## The bit-plane array

The coefficients are split into bit-planes. Bit-plane b (b = 0 … M−1, least
significant first) handles bit b of every coefficient. Its contribution is
2^b · Σ_j c_j^b · x_(i−j), where c_j^b is bit b of c_j. One plane is KC rows of
cells, and row j of plane b adds `x_(i−j) AND c_j^b` to a running sum. The
array therefore has M·KC rows. Each row is L0 cells wide, with L0 = N + M by
default.

The running sum travels down the array in carry-save form: a sum vector and a
carry vector, registered after every row. A word therefore moves one row per
clock, and a new sample can enter every clock. Inside a plane, each cell is a
full adder. The sum keeps its weight, and the carry enters the next row one
position to the left. Between planes the word is shifted right by one
position, which halves it. That shift is what makes the next plane's bits
count twice as much. The bit that falls off the right end is final: it is
output bit b. After the last plane, a carry-propagate adder merges the two
vectors into the upper L0 output bits. The full output is W = L0 + M bits:
M low bits from the plane boundaries and L0 bits from the final adder.

Seen in absolute bit weights, the shift between planes just moves the band of
cells one weight up. Row r (plane b = r div KC) holds cells at weights
b … b+L0−1. Every cell sends its sum to the same weight in the next row and its
carry to the next weight up. The array becomes a regular grid with a slanted
band of real cells inside it. This picture is what the error analysis works on.

Why no carry is lost: the carry out of a row's top cell has no cell to go to
inside its plane, and it is dropped. It is always zero. In carry-save form, a
carry out of weight w implies the word is at least 2^(w+1). The sum inside
plane b, counted in that plane's own weights, stays below 2·KC·2^N. Every
earlier plane contributes at most half of its own word. A carry out of the top
cell would need a word of at least 2^L0, so none occurs when
L0 ≥ N + 1 + log2 KC. With L0 = N + M this means 2^(M−1) ≥ KC. The top level
checks the rule at elaboration.

## Which cells are triplicated: the error significance map

An error in one cell can spread only along the data paths. It reaches the same
weight and the next weight up in the next row, then the same again in every
following row. The cells that can disturb output bit η are therefore a cone
that widens toward the top of the array. Cell (r, w) can reach the output at
weight η if

    w ≤ η ≤ w + (M·KC − r)

The right-hand side grows by one weight per remaining row. This is the
transitive closure of the row-to-row connections. Each row step is a matrix
with ones on the diagonal and just below it. Its d-th power has ones from the
diagonal to d places below it, so no matrix has to be built: the test above is
the closed form.

The set of cells that can reach y^η is the error significance set of that bit.
The union of these sets over the α most significant output bits is P_ET(α).
Those are the cells that must be fault-free, and they are the ones
triplicated. Because a cell only reaches weights at or above its own, the union
reduces to one comparison: cell (r, w) is triplicated iff
w + (M·KC − r) ≥ W − α.

Example, KC = 2, M = 2, L0 = 4 (N = 2, W = 6), α = 1. T marks a triplicated
cell and · a plain one. Columns are bit weights.

    weight        5  4  3  2  1  0
    row 0 (b=0)         T  T  T  ·
    row 1 (b=0)         T  T  ·  ·
    row 2 (b=1)      T  T  ·  ·
    row 3 (b=1)      T  ·  ·  ·
    outputs       y5 y4 y3 y2  (y1, y0 leave at the plane boundaries)

Eight of the sixteen cells are triplicated. If one of the eight plain cells
fails, the result is still within ±(2^5 − 1) of the correct one.

The same rule gives these triplicated-cell counts and basic-cell totals for the
three reference sizes (KC = 4, M = 8). A triplicated cell counts as three
basic cells.

| α  | N=8, L0=16 | N=16, L0=24 | N=24, L0=32 |
|----|-----------:|------------:|------------:|
| 0  | 512        | 768         | 1024        |
| 1  | 1236 (362 triplicated) | 1598 | 1856 |
| 2  | 1274       | 1658        | 1920        |
| 4  | 1344       | 1770        | 2048        |
| 8  | 1450       | 1962        | 2304        |
| 16 | 1536       | 2218        | 2730        |
| 24 | –          | 2304        | 2986        |
| 32 | –          | –           | 3072        |

Measured against the fully triplicated array, the saving is
(full − P_ET(α)) / full. For N = 8 it is 19.5 % at α = 1 and 5.6 % at α = 8.
With no protected bits at all it reaches 66.7 %, because the plain array is a
third of the triplicated one.

These counts are also the published figures for this architecture, which confirms
that the band geometry above is the intended one. The computation lives in
`rtl/pet_pkg.sv`. It runs at elaboration, and `bp_row` uses it to instantiate
each cell as a plain `bp_cell` or as a `tmr_cell`.

### What the guarantee means

A single faulty cell outside P_ET(α) corrupts at most its own sum bit (weight
w) and carry bit (weight w+1). The rest of the array adds correctly, so the
final result is off by at most 3·2^w < 2^(W−α). This bounds the numeric
error, not individual bits. The final adder is a carry-propagate adder, so a
small error can ripple into a high bit: 0111… + 1 flips the top bit. The
protected quantity is "the result is within ±(2^(W−α) − 1) of the correct
value". The end-to-end testbench checks this with a stuck cell at weight 21
(carry weight 22) in the default array. The results are off by exactly 0,
2^21, 2^22 or 2^21 + 2^22, never by 2^23 or more.

Faults in several plain cells add up and can exceed the bound. A fault in two
copies of the same triplicated cell is not masked.

## Blocks

| Module | Role |
|---|---|
| `pet_pkg` | Error significance map: `in_m_eta`, `in_pet`, cell counts |
| `bp_cell` | Basic cell: AND gate, full adder, sum and carry flip-flops |
| `tmr_voter` | Bitwise 2-of-3 majority (plus an unused mismatch flag) |
| `tmr_cell` | Three `bp_cell` copies, each with its own registers, and one voter after them |
| `bp_row` | L0 cells; each plain or triplicated by `pet_pkg::in_pet` |
| `bit_plane` | KC rows; takes the previous plane's word shifted right by one |
| `bp_array` | M planes, plus re-timing of the low output bits |
| `tap_delay_line` | Sample history; row r of plane b reads the sample delayed r + j clocks |
| `cs_merge` | Carry-propagate adder for the upper L0 bits, plus the output register |
| `pet_bp_fir` | Top level: delay line, array, merge, valid/stall control |

## Interface and timing (`pet_bp_fir`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | synchronous reset, active high; clears every register |
| `in_valid` | in | 1 | `x_in` is a sample; when low the whole pipeline holds |
| `x_in` | in | N | sample, unsigned |
| `coef` | in | KC×M | `coef[j]` = c_j, unsigned; hold it stable while samples are in flight |
| `y_valid` | out | 1 | `y` holds a new result (one clock per accepted sample, once full) |
| `y` | out | L0+M | result |

Parameters: `KC` = 4 taps, `M` = 8 coefficient bits, `N` = 8 sample bits,
`L0` = 16 cells per row, `ALPHA` = 1 protected output bits (0 … L0).

The result for a sample appears KC·M enabled clocks after the clock that took
that sample in: 32 clocks at the defaults. The array itself takes M·KC − 1
clocks (one register per row), and the output register takes the last one.
Samples before the first one after reset count as zero, so the first KC−1
results see a partly empty history. `in_valid` acts as a clock enable for
every register. A gap in the input stream therefore freezes the filter and
does not insert a zero sample.

## How far it follows the source architecture, and where it departs

Taken from the architecture description:
- the bit-plane organisation (M planes of KC rows, one row per coefficient
  bit, a multiply by 2 inside a plane, a right shift between planes)
- one clock per row and the KC·M latency
- the error significance map and P_ET(α)
- TMR as the fault-tolerance scheme, chosen cell by cell at instantiation
- the default sizes: the N = 8 array, α = 1

Choices made here, where the description is silent:
- **Cell insides.** A full adder with registered sum and carry (carry-save).
  The description gives only the multiply-accumulate function of a row. The
  regular graph it analyses (same weight and next weight in the next row)
  fits carry-save, and the reproduced cell counts confirm it.
- **Sample delivery.** One shared delay line with a tap per row.
- **Output adder.** The final carry-propagate adder `cs_merge`, and the
  re-timing registers that align the low output bits. Neither is part of the
  analysed cell grid, and neither is triplicated. The same holds for the
  delay line, the fill counter and the voters themselves. A fault there is
  not covered by the guarantee above.
- **Control.** Unsigned arithmetic, static coefficients, a global stall, and
  a synchronous reset.
- **Voter placement.** One voter per triplicated cell, after the three copies'
  registers.

**Synthesis caution.** The three copies of a `tmr_cell` are logically
identical, so a synthesis tool that merges equivalent flip-flops will fold
them back into one. This happens with a default flattened yosys flow. A real
implementation must keep the hierarchy of `tmr_cell` or disable register
merging for it. The gate counts of the published FPGA implementation cannot be
reproduced from this RTL alone.

## Simulating

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…`
line. Build one with plain Verilator 5. The package goes first, and `-y` lets
Verilator find the other modules by name:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/pet_pkg.sv tb/tb_pet_bp_fir.sv --top-module tb_pet_bp_fir
    ./obj_dir/Vtb_pet_bp_fir

- `tb_pet_bp_fir` is the end-to-end test at the default sizes. It streams
  random samples with stalls and bursts of full-scale values, and checks every
  result, `y_valid` and the 32-clock latency. It forces stuck-at faults into
  one copy of two triplicated cells, which must be masked, and into a plain
  cell, where the error must stay within the bound. It also resets in
  mid-stream. It counts each of these events and fails if one never happened.
- `tb_fault_campaign` visits all 512 cells of the default array. For each
  triplicated cell, one copy's sum is stuck at 1, and then another copy's
  carry is stuck at 0. All 724 such runs must give exact results. For each
  plain cell, the sum and the carry are each stuck at 0 and at 1. Results may
  be off, but by less than 2^23. The largest error seen is 2^22, and 540 of
  the 600 plain-cell runs change some result.
- `tb_workloads` runs the three reference sizes (N = 8/16/24) at α = 0, 16, 1
  and 4, and the small KC = 2, M = 2 example, against a behavioural FIR
  model. It also checks the cell totals in the table above.
- `tb_pet_pkg` compares the map with the table above. It also compares the
  map, cell by cell and for every α, with an explicit graph search.
- `tb_bp_cell`, `tb_tmr_voter`, `tb_tmr_cell`, `tb_bp_row`, `tb_bit_plane`,
  `tb_tap_delay_line`, `tb_bp_array` and `tb_cs_merge` test one block each.
  The row and cell tests include forced faults.

The testbenches use `force` on hierarchical paths such as
`dut.u_array.g_plane[7].u_plane.g_row[3].u_row.g_col[14].g_plain.u_cell.s_q`.
Whether a column's generate block is named `g_ft` or `g_plain` follows from
the map. A path must therefore be recomputed if `ALPHA` or the sizes change.

## Changing it

- `ALPHA` is the knob the design is about. Nothing else changes when it moves.
- `N`, `L0`, `KC` and `M` can be changed together. Keep
  L0 ≥ N + 1 + log2 KC and M ≥ 2. L0 = N + M is the reference choice.
- A different fault-tolerance scheme can replace `tmr_cell`, as long as it has
  the same ports. The selection in `bp_row` stays the same.
