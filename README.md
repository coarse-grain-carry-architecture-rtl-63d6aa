# Coarse-grain carry architecture for FPGA arithmetic: SystemVerilog model

This repository is a SystemVerilog model of an FPGA carry architecture. It follows the
paper "Coarse Grain Carry Architecture for FPGA" by H. Lee and M. Flynn. The model was
written independently from the published description. It is **not** the authors' code,
and the authors have not reviewed it.

## The idea

In a conventional FPGA, each logic block has a tiny dedicated carry chain. That chain
implements one bit of a 2-input ripple adder. Any wider arithmetic has to go through the
general-purpose routing, and routing, not logic, dominates both delay and area.

The architecture modelled here makes the hard-wired carry logic coarser instead of making
the lookup tables bigger. Each bit position of a column gets a **(4,2) counter**. This is
two full adders in series plus the usual carry multiplexer. With it, one column of logic
blocks adds **four** operands in one pass, where a conventional column adds two. Two
cheap extras turn the column into a small datapath element:

- a per-operand **XOR** (static configuration), so any operand can be subtracted;
- a per-operand **AND** with a dynamic *selection line*, so each operand can be switched
  on or off every cycle.

With both, one column computes `±x0·A0 ± x1·A1 ± x2·A2 ± x3·A3`. That one primitive can
also serve as:

- a multiplexer: one-hot `x`;
- a comparator: subtract, and look at the sign;
- a multiple generator: shifted copies of one operand.

The applications below are all built from it.

A second, independent structure is also modelled: a **dual-rail carry chain**. It turns
the ordinary 2-input chain into a one-level carry-select adder, which makes wide
additions fast.

All logic here is written at the bit level, as the configured fabric would compute it.
The model does not cover the lookup tables, routing, configuration memory or transistor
sizing of an FPGA.

## Repository layout

| file | content |
|---|---|
| `rtl/cgc_pkg.sv` | configuration type of a coarse-grain column, helper that builds it |
| `rtl/cgc_slice.sv` | one bit of the coarse-grain carry chain (the (4,2) cell) |
| `rtl/cgc_clb.sv` | one logic block: two slices |
| `rtl/cgc_adder.sv` | a WIDTH-bit column: conditional 4-input adder/subtractor |
| `rtl/dr_pkg.sv`, `rtl/dr_clb.sv` | dual-rail carry logic block and its configuration |
| `rtl/csel_adder.sv` | carry-select adder on the dual-rail chain |
| `rtl/cgc_adder_tree.sv` | pipelined tree of 4-input columns |
| `rtl/cgc_ppgen.sv`, `rtl/cgc_multiplier.sv` | non-Booth partial products (0..15·M) and pipelined multiplier |
| `rtl/acs_unit.sv`, `rtl/viterbi_dec.sv` | add-compare-select unit, 4-state Viterbi decoder |
| `rtl/jacobi_grid.sv` | Jacobi relaxation array |
| `rtl/dct8.sv` | 8-point fast DCT |
| `rtl/heap_node.sv`, `rtl/heap_array.sv` | heapify engine |
| `rtl/int_matmul.sv` | integer matrix multiplier |
| `rtl/fir_da.sv` | FIR filter in distributed arithmetic |
| `rtl/cgc_top.sv` | top level: one of each unit side by side |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_cgc_top` is end to end |

Each file begins with a header. The header says what the module does, how it does it,
its ports and timing, and which parts follow the paper and which are this model's own
choices.

## The coarse-grain (4,2) carry cell

This is the core of the architecture, and the part where the paper gives the most detail.

### One bit (`cgc_slice`)

Each bit position receives:

- four operand bits `A0..A3`;
- three carries from the bit below: `c1_in`, `c2_in`, `cin`.

It produces one sum bit and three carries to the bit above. The steps are:

1. **Operand conditioning (And_Xor).**
   `b_i = (A_i & (x_i | ~cond_i)) ^ neg_i`.
   - `neg_i` is a configuration bit that inverts the operand, for subtraction.
   - `cond_i` is a configuration bit that makes the operand conditional.
   - `x_i` is the dynamic selection line.
2. **First (3,2) counter.** It adds `b0, b1, b2` and gives a sum `s1` and a carry
   `c1_out` to the next bit.
3. **Second (3,2) counter.** It adds `s1`, the first-counter carry from below (`c1_in`)
   and `b3`. It gives `s2` and a carry `c2_out` to the next bit.
4. **Final 2-input stage.** This is the same as a conventional FPGA carry:
   - `p = s2 ^ c2_in`;
   - `cout = p ? cin : s2`;
   - `sum = p ^ cin`.

So each bit absorbs 7 inputs of equal weight (4 operands and 3 carries) and emits 1 sum
bit plus 3 carries. That is exactly a (4,2) counter. Only the last carry (`cin`/`cout`)
forms a chain along the column.

The other two carries only travel one bit. So the critical path is still one
multiplexer per bit, as in the baseline chain, plus the two counters at the start.

### Subtraction and the LSB

Two's-complement subtraction needs a `+1` for every inverted operand. At the least
significant bit, the three carry inputs (`c0`, `c1`, `c2`) are fed from configuration
constants rather than from a lower bit. Setting one of them to 1 per inverted operand
gives the `+1` for up to **three** subtracted operands.

`cgc_make_cfg(neg, cond)` in `cgc_pkg` builds this configuration: it sets one carry
constant per negated operand. Subtracting all four operands is not possible, because a
fourth `+1` would need a fourth carry input. The paper states the same limit of three.

### Blocks and columns

- A logic block (`cgc_clb`) holds two slices, so it covers two bits. A column of
  WIDTH/2 blocks is one `cgc_adder`.
- `cgc_adder` computes `sum = Σ ±x_i·A_i mod 2^WIDTH` combinationally.
- `c_top` exposes the three carries leaving the top bit.

### Uses of one column

| use | configuration |
|---|---|
| 4-input adder | `neg = 0`, `cond = 0` |
| 4-input adder/subtractor, e.g. `A0 + A1 − A2 − A3` | `neg = 1100` |
| comparator | subtract and read the top bit of a wider result |
| 4-to-1 multiplexer | `cond = 1111`, one-hot `x` (exactly one operand passes, the others add zero) |
| multiple generator | feed `A`, `2A`, `4A`, `8A` as operands and use the 4 multiplier bits as `x` |

The paper builds the cell in three versions of growing complexity: adder only,
adder/subtractor, and conditional adder/subtractor. This model implements the last. The
other two are configurations of it (`cond = 0`, and `neg = 0`). The selection lines are
shared by every bit of a column, as in the paper, where they run vertically.

The multiple generator produces any of `0 … 15·A` in one column. This replaces Booth
encoding, which needs negative multiples.

## Dual-rail carry-select chain (`dr_clb`, `csel_adder`)

Each block carries two ripple rails:

- one computes the carry assuming a carry-in of 0;
- the other assumes a carry-in of 1.

Blocks are configured as either *non-last* or *last* in a segment of SEG bits:

- A non-last block passes both rails on.
- The last block of a segment uses the select wire from the previous segment. It picks
  one rail as the real carry and drives a new select wire.

This gives one level of carry select. An N-bit adder is N/SEG ripple segments. The delay
is one segment ripple plus one select stage per remaining segment.

Details:

- The first segment ripples the true carry-in.
- The select signal alternates polarity from segment to segment, to save an inverter per
  stage. `csel_adder` undoes this at the carry-out.
- The defaults are WIDTH = 32 and SEG = 4. The paper's simulations found 4-bit segments
  fastest up to 32 bits, and 12-bit segments fastest only at 64 bits.

## Applications built on the columns

All clocked units share `clk`. `rst_n` is asynchronous and active low, and it clears
valid bits and controllers only (and the FIR delay line). Other data registers are not
reset.

### Adder tree (`cgc_adder_tree`)

- Adds M unsigned W-bit numbers with ⌈log4 M⌉ levels of 4-input columns. A tree of
  2-input adders needs ⌈log2 M⌉ levels.
- Each level is registered.
- Latency is ⌈log4 M⌉ cycles, and it accepts one set per cycle.

### Multiplier (`cgc_ppgen`, `cgc_multiplier`)

- For N-bit operands, ⌈N/4⌉ columns each generate `m · (4 multiplier bits)` (0..15·M),
  with operands `M, 2M, 4M, 8M`.
- A 4-input adder tree sums the shifted partial products.
- Unsigned.
- Latency is 2 at N = 16 (one partial-product stage, one tree level). It accepts a new
  pair every cycle.

### Add-compare-select and Viterbi decoder (`acs_unit`, `viterbi_dec`)

**ACS unit.** The two path sums and their comparison collapse into one column computing
`(Λ0+Γ0) − (Λ1+Γ1)`. Its sign is the decision.

- A second column, in conditional mode with the decision on its selection lines, forms
  the surviving metric.
- The result is the minimum metric; ties choose path 1.
- Latency is 1.

**Decoder.** `viterbi_dec` uses four ACS units for the 4-state, rate-1/2, constraint-
length-3 code with generators (7,5) octal.

- It uses hard-decision Hamming branch metrics.
- Metrics are normalised by clearing the top bit when all metrics have it set.
- Traceback has depth DEPTH = 16, from the best state.
- One decoded bit leaves per input symbol after the traceback delay.

### Jacobi relaxation (`jacobi_grid`)

- An N×N array holds one register and one 4-input column per node. Each step replaces
  every node with `(up + down + left + right) / 4`, truncated.
- Boundary values come from ports.
- `load` writes initial values; `en` performs one step per cycle.
- A 2-input mapping needs about 2n² + 2n − 1 adders for n×n nodes. This uses n².

### 8-point DCT (`dct8`)

This is the Arai–Agui–Nakajima fast DCT, with the butterflies compressed into 4-input
add/subtract columns.

- **Stage 1** forms the sums of four inputs directly, for example `x0+x3+x4+x7`. A
  2-input fabric needs two butterfly levels for this.
- The multiplications are by constants in Q8 (181/256 = cos(π/4), 237/256 = cos(π/8),
  98/256 = cos(3π/8)), two cycles each. The algorithm's 5 multiplications become 7
  constant multipliers, because the odd part is regrouped into four-operand sums.
- **A last 4-input stage** forms the outputs.
- Inputs are signed 8-bit and outputs are signed 12-bit. The final AAN scale factors are
  not applied, as is usual when they are folded into later stages.
- Latency is 4 cycles, fully pipelined.

### Heapify engine (`heap_node`, `heap_array`)

**Node.** Each node does two things on columns:

- **Selects its new value** with a column used as a 4-to-1 multiplexer: load input,
  parent, left child or right child, chosen by one-hot selection lines.
- **Compares** in two phases on one subtracting column, with its operands chosen through
  the selection lines. Phase 0 compares the two children. Phase 1 compares the parent
  with the larger child.

**Array.** `heap_array` is a tree of 2^DEPTH − 1 nodes.

- Parents on even and odd levels take turns, so no node is in two swaps at once.
- Runs stop after two quiet steps without a swap.
- The result is a max-heap.
- Ports: `load`, `start`, `busy`, `done`.

### Integer matrix multiplier (`int_matmul`)

- Matrix A (M×M, unsigned N-bit) is loaded once. B is then shifted in one column per
  cycle.
- M·M multipliers form all products of a column at once. M adder trees, one per row,
  give one column of C per cycle.
- Latency is 3 at M = 4, N = 8.
- A whole product takes 1 + M + 3 cycles.

### FIR filter in distributed arithmetic (`fir_da`)

The filter computes `y[n] = Σ h[t]·x[n−t]` with M taps over signed N-bit numbers, in
bit-parallel distributed arithmetic. It has no multipliers.

1. **Coefficient tables.** The taps are split into groups of four. Each group has a
   16-entry table, filled from the `h` port on `load_coef`. Entry `a` holds the sum of
   the coefficients whose bit is set in `a`. In an FPGA these tables are configured
   lookup tables. Entries are N+2 bits wide.
2. **Lookup.** Every cycle, bit b of the four samples of a group addresses the group's
   table. That gives the group's contribution for bit plane b.
3. **Group sum.** For M > 4, the groups of one bit plane are summed by a 4-input adder
   tree.
4. **Bit-plane sum.** The N bit planes, each shifted by its weight, are summed four at a
   time by coarse-grain columns, then by a tree. The sign plane of a two's-complement
   sample has weight −2^(N−1). Its operand is subtracted, using the column's inversion
   bit and an LSB carry-in.

Timing and interface:

- The output is exact and 2N + ⌈log2 M⌉ bits wide.
- Latency is 4 at M = 4, N = 8, with one output per sample.
- `rst_n` also clears the delay line.

## Top level (`cgc_top`) and defaults

The architecture is a fabric, not a single circuit. `cgc_top` therefore places one
instance of each unit side by side, each with its own prefixed ports.

| prefix | unit | default size |
|---|---|---|
| `col_` | one coarse-grain column | CW = 16 bits |
| `cs_` | carry-select adder | CSW = 32, SEG = 4 |
| `mul_` | multiplier | MULN = 16 |
| `acs_` | ACS unit | ACSW = 8 |
| `jac_` | Jacobi array | JN = 4, JW = 16 |
| `vit_` | Viterbi decoder | 4 states, VDEPTH = 16 |
| `dct_` | 8-point DCT | 8-bit in, 12-bit out |
| `heap_` | heapify engine | HDEPTH = 3 (7 keys), HW = 8 |
| `mm_` | matrix multiplier | MMM = 4, MMN = 8 |
| `fir_` | FIR filter | FIRM = 4 taps, FIRN = 8 bits |

### Sizes the paper evaluates, against these defaults

| workload | runs at defaults? |
|---|---|
| 16-bit and 8-bit multipliers | yes |
| 2×2 and 4×4 8-bit matrix multiply | yes |
| 4-tap 8-bit FIR filter | yes |
| 4×4 Jacobi grid | yes |
| 4-state rate-1/2 Viterbi | yes |
| 8-point 8-bit DCT | yes |
| 8/16/32-bit carry-select adders | yes |
| multipliers up to 64 bits | needs `MULN` |
| Jacobi grids up to 64×64 | needs `JN` |
| matrix multiply up to 64×64, 32 bits | needs `MMM`/`MMN` |
| FIR filters up to about 80 taps, 20 bits | needs `FIRM`/`FIRN` |
| 64-bit carry-select adder | needs `CSW` |

Sizes that need a parameter change were not all simulated. These were: the 64-bit
carry-select adder, the 2×2 Jacobi and matrix cases, and a 12-tap FIR filter.

## Simulation

Every testbench is self-checking:

- It compares against an integer or real-number model.
- It prints `TB_RESULT checks=<n> failures=<n>`.
- It has a watchdog.

With Verilator 5:

```
verilator --binary --timing -Irtl rtl/cgc_pkg.sv rtl/dr_pkg.sv -y rtl -y tb \
    tb/tb_cgc_top.sv --top-module tb_cgc_top
./obj_dir/Vtb_cgc_top
```

Replace `tb_cgc_top` with any other `tb_*` to run that unit's test. The packages must be
listed before the other sources.

**`tb_cgc_top`** runs every unit at the default sizes, concurrently, for 4000 cycles. It
counts how often each mechanism was exercised, and fails if any never was. The
mechanisms are:

- subtraction, including three at once;
- conditional masking;
- a carry crossing a select segment, and a carry rippling through the whole select adder;
- back-to-back multiplies;
- both ACS decisions;
- Jacobi load, step and hold;
- corrected channel errors;
- DCT transforms;
- heap runs that move keys;
- full 4×4 matrix products;
- FIR outputs from negative samples, including after a coefficient reload.

**Unit tests.** The unit testbenches also exercise other sizes: 8-bit multipliers, 64-bit
and 8/12-bit-segment carry-select adders, a 2×2 Jacobi grid, a 2×2 matrix multiplier and a 12-tap FIR
filter. The single-bit cell is tested exhaustively.

## Where this model departs from, or goes beyond, the paper

The paper describes the carry cell and dual-rail chain at the circuit level. For the
applications it mostly gives block counts and dataflow. Everything below is this model's
choice.

**Carry cell and chain**

1. **Configuration.** The configuration bits are grouped into a struct. Which LSB carry
   constant is used first for subtraction is a choice.
   - The paper's second, unexplained configuration multiplexer after the XOR in the cell
     is not modelled.
   - The sum XOR, done by a lookup table in the FPGA, is placed inside the slice.
2. **Dual-rail chain.** Rail initialisation at a segment start, and the exact place of
   the polarity inverters, are inferred. A disabled select output drives 0 instead of
   floating.
3. **Segment size.** The paper reports 4-bit segments as best up to 32 bits. It also
   quotes its largest gain for 8-bit segments. The default here follows the first
   statement; 8 and 12 are parameter values.

**Arithmetic units**

4. **Adder tree.** Every level is built at the full output width, where the paper's count
   widens each level by 2 bits. The function is the same; the area is larger.
5. **Pipelining.** Register placement in the adder tree, multiplier and matrix multiplier
   is a choice. The paper only says they are fully pipelined.
   - The extra final stage counted in the paper's multiplier area formula is not built,
     because the tree result is already exact.
6. **Number formats.** Operands are unsigned in the multiplier, matrix multiplier, Jacobi
   array and heap. The paper does not say.

**Application mappings**

7. **Viterbi.** These details are not in the paper and are standard choices:
   - the (7,5) code generators;
   - hard decisions;
   - normalisation;
   - traceback depth 16.
8. **ACS.** Forming the survivor metric with a second conditional column, and the update
   enable, are additions.
9. **DCT.**
   - The coefficient values are the standard AAN constants rounded to 8 fractional bits.
     The paper does not print them.
   - The odd part is regrouped into four-operand sums.
   - Constant multipliers are written as multiplication by a constant, not as lookup
     tables.
   - Two of the stage-1 sums printed in the paper's 4-input DCT figure disagree with the
     algorithm it is derived from. The algorithm is followed.
10. **Heap.** Tie-breaking, the even/odd schedule and the stop rule are choices.
    - The paper compares "left with right, then the larger with the parent" in two
      phases. The model does the same on one column, choosing the operands with the
      selection lines.
11. **Jacobi.** Truncating division, the boundary ports and the load port are choices.
12. **Matrix multiplier.** The column-per-cycle order for B is a choice. So is the rule
    that a column accepted on the same edge as a new A uses the old A.
13. **FIR filter.** The paper gives only an area formula and says the filter uses
    distributed arithmetic. These details are standard distributed arithmetic, read to
    match that formula:
    - the bit-parallel form;
    - groups of four taps per table;
    - summing the groups before the bit planes;
    - signed numbers with a subtracted sign plane.

    The coefficient port stands in for configured tables.

## What is not modelled

- **Fabric and timing.**
  - The baseline FPGA: lookup tables, routing, switch matrices and the baseline 2-input
    carry chain.
  - Transistor sizes, circuit delays and area figures.
  - All throughput-density, area-reduction and cycle-time results. These are measurements
    of a physical layout, not logic, and no RTL can reproduce them.
- **Other circuit variants.** Alternative carry cells the paper only compares against,
  such as pass-transistor multiplexer chains, variable-size carry-select segments and
  multi-level carry select, are not built. The encoded (2-wire) form of the selection lines,
  which the paper considers and rejects, is not built either.

## How far to trust it

- Every module has a self-checking testbench that passes.
- Each testbench was shown to catch a deliberately injected bug in its module. Examples:
  a wrong partial-product shift, a transposed matrix, a sign bit plane added instead of
  subtracted, and the carry-in of the select adder tied low.
- The bit-level cell is checked exhaustively. The arithmetic units are checked against
  exact integer models with random and corner-case operands.
- The model is functional only. It says nothing about the speed or area claims, which
  depend on the circuit and the layout.
- Where the paper is silent, the choices listed above are plausible but are not the
  authors'.
