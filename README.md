# Reconfigurable sub-word parallel Booth multiply-accumulate unit

One N-bit multiply-accumulator (N = 32 by default) computes

    m_out = accu + mcand * mlier

either as one N-bit operation or as several narrower operations at once. The
operand word is cut into 8-bit lanes. A `kill` bit between two lanes separates
them. Lanes that are not separated form a *sub-word* of 8, 16, 32 ... bits,
and each sub-word does its own multiply-accumulate into its own 2w-bit field
of the result. Each sub-word also has its own arithmetic mode: unsigned,
signed, or mixed (signed multiplicand and accumulator, unsigned multiplier).
For a 32-bit unit that gives five layouts (sizes listed from the most
significant lane down):

| `kill[2:0]` | sub-words | result fields |
|---|---|---|
| 000 | (32) | m_out[63:0] |
| 010 | (16,16) | m_out[63:32], m_out[31:0] |
| 111 | (8,8,8,8) | four 16-bit fields |
| 110 | (8,8,16) | m_out[63:48], m_out[47:32], m_out[31:0] |
| 011 | (16,8,8) | m_out[63:32], m_out[31:16], m_out[15:0] |

Patterns 001, 100 and 101 would need a 16-bit sub-word that straddles the
middle of the word. The partial-product array has no such sub-word, so these
patterns are rejected: the unit runs the operation in scalar mode and raises
`cfg_illegal`. In general a sub-word must be a power-of-two number of lanes
that starts at a multiple of its own size. The 64-bit unit therefore takes
either one 64-bit word or any pair of legal 32-bit halves.

All layouts share one datapath: a radix-4 Booth array, one reduction tree and
one final adder. Reconfiguring costs only multiplexers at sub-word borders
and a few carry masks, not a copy of the multiplier per size. Layout and
modes may change on every operation.

## Datapath

    mlier ──> mlier_prep ──> trip ──┐
    kill, mode_v ──> sw_config ─────┤ lane sizes, modes, kill_eff
    mcand, accu ───────────────> swppg (mbe_enc + swppa_row per row)
                                   │  N/2 Booth rows, correction row, accu row
                                 swpprt (delay-ordered full-adder tree, carry-out masking)
                                   │  sum row, carry row
                                 fong_adder (Ling prefix, 16-bit segments)
                                   │
                                 m_out, cout_v, cout

`swp_mac` is this chain as combinational logic. `swp_mac_unit` (the top) adds
a result register and an accumulate-feedback select.

### Configuration decode (`sw_config`)

This block checks the kill pattern and falls back to scalar mode if it is
illegal. For every lane it then reports the log2 of its sub-word size and the
sub-word's mode. A sub-word takes the mode of its **most significant lane**.
The mode inputs of its other lanes are ignored, so give every lane of a
sub-word the same mode if you want no surprises. Mode encoding per lane:
`00` unsigned, `01` signed, `1?` mixed.

### Multiplier preparation (`mlier_prep`)

Booth row i reads the triplet {y[2i+1], y[2i], y[2i-1]}. Where row i is the
lowest row of its sub-word, the bit below it is forced to 0. That is the
"assumed zero" of every sub-word, and it cuts the triplets that would
otherwise overlap two sub-words.

An unsigned or mixed-mode multiplier needs one more Booth digit above its
MSB. That digit comes from the triplet {s, s, m}, where m is the sub-word's
multiplier MSB and s = m only in signed mode. This digit is +1 exactly when
m = 1 and the sub-word is not signed. The block turns it into a select
(`corr_sel`): the correction row adds the multiplicand, instead of building
a whole extra Booth row.

### Partial-product array (`swppg`, `swppa_row`, `mbe_enc`)

**Encoding.** `mbe_enc` uses a race-free radix-4 encoding:

- p1 = y[2i] ^ y[2i-1]
- p2 = ~p1
- neg = y[2i+1]
- z = ~(y[2i+1] ^ y[2i])

The row decoder forms:

- select-X = p1
- select-2X = p2 & ~z
- invert = neg & ~(p2 & z)

so the triplet 111 (−0) does not invert the row.

**Placement.** Row i sits at output column b + 2i, where b is the first
input bit of its sub-word. This places a row's significant bits on the same
columns in every layout. What differs between layouts is only near sub-word
borders:

- the multiplicand bits the row sees;
- the extension bit above the multiplicand (its sign in signed and mixed
  mode, 0 in unsigned mode);
- the sign-encoding bits;
- the hot-one bit.

`swppa_row` builds the row once for each sub-word size its lane can belong
to and multiplexes by the lane's current size. Synthesis collapses the
columns where the candidates agree.

**Sign encoding.** Rows are not sign-extended. Instead:

- the first row of a sub-word carries `{~n, n, n}` above its top bit;
- every other row carries `{1, ~n}`;

where n is the row's sign. These constants add up to a multiple of 2^(2w),
which falls outside the sub-word's field.

**Hot-one modification.** A negative row needs +1 at its LSB. The row's LSB
and that +1 are added in place: LSB_new stays in the row, and the carry
(hot2) goes one column left. All the hot2 bits of a layout fall on columns
that the correction row leaves free, so they are merged into it.

**Row count.** The array hands N/2 Booth rows, one correction/hot-one row
and the accumulator row (N/2 + 2 = 18 for N = 32) to the tree.

### Reduction tree (`swpprt`, `full_adder`, `fa_cout_mask`)

A tree of full adders reduces the rows to a sum row and a carry row. The
wiring is not a fixed level-by-level Wallace pattern. It is worked out
column by column, LSB first, at elaboration by a constant function, using a
timing-driven greedy method (the "three-dimensional method"):

- every signal has an estimated arrival time; all tree inputs arrive at
  time 0;
- a column's pool holds its own input bits plus the carries from the column
  to its right;
- while more than two signals are left, take the three earliest. The two
  earliest go to the slow inputs a and b, and the latest to the fast input
  cin;
- the sum returns to the pool, and the carry goes to the next column's pool;
- when two signals or fewer are left, they become that column's bits of the
  sum and carry rows.

The delay model is a unit-gate estimate, with XOR = 2 and NAND = 1:

- a or b to either output: 4;
- cin to either output: 2.

To retarget the tree to a real cell, change those two constants in
`tdm_table`.

Only the columns that a Booth row can reach in *some* sub-word layout enter
the tree. Row i spans from column 2i up to its highest reachable column.
This leaves 602 adders for N = 32.

Every adder in the top column of a 16-bit output lane (columns 16k+15) is an
`fa_cout_mask` cell. Its carry-out is 0 while `kill[k]` is set. Since all
carries into column 16k+16 come from that column, no carry crosses a
sub-word border. Because the carry-*out* of the border cell is masked,
rather than the carry-in of the cell above, the greedy wiring is free to
connect the masked cells like any other.

### Final adder (`fong_adder`)

This is a hybrid Ling adder:

- bit generators g = a&b, t = a|b;
- Ling pairs on odd bits;
- 4-bit groups combined by a Kogge–Stone prefix, giving the Ling carry at
  every fourth bit;
- a ripple-carry block at bits 3:0;
- 4-bit carry-select blocks above.

`brk[k]` masks g and t at the top bit of segment k, so no carry leaves the
segment while the bits below are unchanged. In the MAC, W = 64, SEG = 16 and
`brk` is the effective kill vector. The adder is also tested as a 32-bit
adder with 8-bit segments.

## Interface and timing (`swp_mac_unit`)

| port | dir | width (N=32) | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; synchronous active-low reset of the result register |
| in_valid | in | 1 | an operation is on the inputs |
| acc_fb | in | 1 | 1: accumulate onto the registered m_out instead of `accu` |
| mcand, mlier | in | 32 | operands; lane k = bits 8k+7:8k |
| accu | in | 64 | accumulator; a sub-word at input bit b uses bits 2b .. 2b+2w-1 |
| mode_v | in | 4 × 2 | mode per lane (the top lane of each sub-word counts) |
| kill | in | 3 | kill[k] separates lanes k and k+1 |
| out_valid | out | 1 | in_valid delayed by one clock |
| m_out | out | 64 | result, fields as above |
| cout_v | out | 3 | raw carry out of the final adder at each 16-bit boundary |
| cout | out | 1 | raw carry out of bit 63 |
| cfg_illegal | out | 1 | the kill pattern was unsupported; scalar mode was used |

Latency is one clock and throughput one operation per clock. With in_valid
low the outputs hold. With `acc_fb` set, back-to-back operations form an
accumulation chain with no bubbles.

`cout_v` and `cout` are the carries of the final adder as it adds the tree's
two rows. Because the Booth rows carry sign-encoding constants, these carries
are **not** overflow flags of the arithmetic result. They are brought out
as-is; do not use them to detect overflow without extra logic.

## Parameters

`N` (default 32) sets the operand width. It must be a power of two of at
least 16, and an elaboration-time assertion checks this. With N = 16 or 64
the port widths scale: kill becomes N/8−1 bits and mode_v N/8 entries.
Inside, the tree depth and adder width follow N. Every size has been
simulated against the reference model. An 8-bit unit with no sub-word
support is not provided; run 8-bit work as 8-bit sub-words of a wider unit.

## Departures from the published design

- **Tree timing data.** The published tree is generated from the pin
  delays of a specific library full adder. Those numbers are not available,
  so the same greedy method runs here on a unit-gate delay model. The
  function is identical; only the wiring that would be best for a real
  cell may differ.
- **Cells.** Full adders, the carry-masked full adder and the final adder's
  operators are written as plain logic, not as library cells or copies of
  published gate schematics.
- **Correction row.** The hot-one carries of the Booth rows are merged into
  the free columns of the unsigned/mixed correction row, rather than kept
  as bits of their own. This holds the tree input at N/2 + 2 rows.
- **Port shapes.** The published interface numbers its scalar signals:
  mode_v0 …, kill0 …, cout_v0 …. Here those are arrays (`mode_v[k]`,
  `kill[k]`, `cout_v[k]`) with the same numbering.
- **Register and feedback.** The result register, in_valid/out_valid,
  acc_fb and the cfg_illegal flag are additions for use in a pipeline. The
  published design is combinational and only suggests registers at the
  tree's inputs and outputs.
- **Prefix network.** The Ling group carries use a Kogge–Stone prefix.
- **Not included.** Multiply-negate / multiply-subtract, saturation and
  rounding for fixed-point formats are extensions around the unit and are
  not built.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The expected values
come from `tb/mac_ref_pkg.sv`, a plain integer model of the sub-word MAC: it
uses no Booth encoding and is independent of the RTL.

| testbench | what it checks |
|---|---|
| tb_swp_mac_unit | top at N=32 (the default): reset, hold, latency, accumulation chains, illegal fallback. Counts 15 mechanisms (each layout, each mode, mixed modes, feedback, a killed border carry, top carry, hold, reset) and fails any never exercised |
| tb_mac_workloads | N=16/32/64 units side by side: 10,000 random all-8-bit operations, 2,000 scalar ones, accumulation chains |
| tb_swp_mac | combinational core at N=16/32/64: every kill pattern, random and corner operands, per-lane modes |
| tb_swppg | sum of all rows per sub-word field equals the model (N=32) |
| tb_swpprt | sum + carry equals the row sum per killed field |
| tb_fong_adder | per-segment sums and carries, 64/16 and 32/8 shapes |
| tb_sw_config, tb_mlier_prep, tb_swppa_row, tb_mbe_enc, tb_full_adder, tb_fa_cout_mask | the blocks alone |

`cout_v` and `cout` are only checked for occurrence, because the model does
not know how the tree splits sum and carry.

To run a testbench with Verilator 5 from the repository root:

    verilator --binary --timing --assert -Wno-fatal -Mdir /tmp/obj \
      -y rtl -y tb rtl/swp_mac_pkg.sv tb/mac_ref_pkg.sv tb/tb_swp_mac_unit.sv \
      --top-module tb_swp_mac_unit -o sim && /tmp/obj/sim

Replace `tb_swp_mac_unit` with any testbench name. The full set takes a few
minutes.

## Files

- `rtl/swp_mac_pkg.sv` — mode type, Booth signal struct, helpers.
- `rtl/swp_mac_unit.sv` — top.
- `rtl/swp_mac.sv` — combinational core.
- `rtl/sw_config.sv`, `rtl/mlier_prep.sv`, `rtl/mbe_enc.sv`,
  `rtl/swppa_row.sv`, `rtl/swppg.sv` — partial-product side.
- `rtl/full_adder.sv`, `rtl/fa_cout_mask.sv`,
  `rtl/swpprt.sv` — tree.
- `rtl/fong_adder.sv` — final adder.
- `tb/` — testbenches and the reference model.
