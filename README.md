# Hyper-X 256-radix crossbar switch

A plain N-radix matrix crossbar connects every input line to N tri-state
drivers and every output line to N more. Each node's load grows with N, so
delay grows with N and power with N². At N = 256 that is impractical. This
design splits the switch into an **8 × 8 matrix of small 4-radix
sub-switches**. Each word crosses the matrix in four short hops, so no circuit
node fans out to more than 4 or 8 others. The result is a 256-input,
256-output, 16-bit crossbar whose data path is purely combinational. Its mux
selects are loaded through a serial scan chain.

This RTL follows the architecture of Baek, Jung and Kim, *Design of Low-Power
and Low-Latency 256-Radix Crossbar Switch Using Hyper-X Network Topology*.
That work is a 65 nm transistor-level design: it reports 641 ps worst-case
delay, 13.01 W at 1 GHz and 1.2 V, and 0.93 × 1.25 mm². This RTL is a
logic-level model of it. It is not by those authors, and it has no timing,
power or area of its own.

## Topology: row, diagonal, row, diagonal

Every sub-switch at matrix position (r, c) is split into two halves:

* an **upper half**, which holds the hops *before* the diagonal;
* a **lower half**, which holds the hops *after* the diagonal.

The upper halves of one matrix row form an *upper row block*. The lower
halves form a *lower row block*. A word entering external input `j` of
sub-switch (r, c) makes four hops: row, diagonal, row, diagonal.

```
 ex_in[r][c][j]
   │ 1 upper half (r,c): 4:1 row mux k picks input j      → track k of row r
   │   upper half (r,c'): 8:1 mux k picks column c        → diag_out k
   │ 2 diagonal (transpose): upper (r,c') → lower (c',r), diag_in k
   │ 3 lower half (c',r): 4:1 row mux m picks diag_in k   → track m of row c'
   │   lower half (c',r'): 8:1 mux m picks column r       → output m
   │ 4 diagonal (transpose, wiring only): lower (c',r') → sub-switch (r',c')
   ▼
 ex_out[r'][c'][m]
```

The first row hop chooses the destination column c'. The second row hop
chooses the destination row r'.

Three restrictions keep the fanout small. Together they replace the basic
Hyper-X "any sub-switch to any sub-switch in the same row or column" wiring:

1. **Dimension order.** A word always moves along a row first. It never
   moves along a column first.
2. **Signal ordering.** A row has four numbered tracks. Track k of each half
   reaches only 8:1 mux k of the eight halves in that row. A 4:1 mux output
   therefore drives 8 loads, not 32.
3. **Transposed diagonal instead of column links.** Diagonal output k of
   upper half (r, c) drives exactly one node: diagonal input k of lower half
   (c, r). The sub-switches on the matrix diagonal (r = c) connect to
   themselves. The external outputs go through the same transpose, so a
   column move costs one row hop plus two transposes.

Every input-to-output path therefore crosses exactly four muxes: 4:1, 8:1,
4:1, 8:1. The design has no other path.

## Routing rules: what the crossbar can carry

This part matters most when you configure the switch. The network is not a
full crossbar, because some words compete for the same wires:

* A word from source row r to destination column c' must cross the **four
  diagonal links** of upper half (r, c') → lower half (c', r). Words going
  from row r to column c' therefore need **distinct track numbers k**.
* The last row hop keeps the track number as the output port number.
  Track m ends on external output m. Words going from row r to column c'
  therefore also need **distinct output port numbers m**.
* Each 4:1 mux and each 8:1 mux carries one word.

A full permutation of all 256 ports can be carried when every source row
sends exactly one word to each (destination column, output port) pair.
Permutations outside that class cannot be set up all at once. The original
design names extra track capacity as the remedy: "the number of available
tracks is doubled". It does not say where those wires go, so **this RTL does not build them**. See *Departures* below.

### A route that is always valid

The end-to-end testbench builds its routes from four families of random
permutations. This is a simple recipe that you can reuse:

* `pi[r][c]`, a permutation of 0..3: input j uses track `k = pi[r][c][j]`.
* `sigma[r][k]`, a permutation of 0..7: track k from column c goes to
  lower row `R = sigma[r][k][c]`, which is the destination column.
* `tau[r][R]`, a permutation of 0..3: it sets the output port
  `m = tau[r][R][k]`.
* `rho[R][m]`, a permutation of 0..7: it sets the lower-half column
  `C = rho[R][m][r]`.

This set of choices sends input (r, c, j) to output m of lower half (R, C).
That is external output `ex_out[C][R][m]`. It sets these
selects:

| half | mux | select |
|---|---|---|
| upper (r, c) | 4:1 mux k | input j |
| upper (r, R) | 8:1 mux k | column c |
| lower (R, r) | 4:1 mux m | diagonal input k |
| lower (R, C) | 8:1 mux m | column r |

## Mux circuits and how they are modelled

In silicon, each N:1 mux is N tri-state inverters driving a shared node,
followed by an inverter. Every input has its own select line, so the
selects are **one-hot**. `onehot_mux` models this as an AND-OR:

* With exactly one select high, the selected word passes.
* With no select high, the output is 0. In silicon the node would float.
* With several selects high, the output is the OR of those inputs. In
  silicon the drivers would fight.

Keep every select group one-hot, or all zero for an unused mux. The mux does
not assert one-hotness, because patterns pass through the chain while it
shifts.

Each external input passes three inverters in series before the upper mux
stage. That chain is an electrical buffer. The function of a crossbar is to
deliver the data unchanged, so the model keeps data polarity and treats the
drivers as wires.

## Configuration scan chain

All 6144 select lines sit in one serial chain. There are 128 halves with 48
stages each:

* The 48 stages of a half are 16 for the four 4:1 muxes (4 one-hot bits
  each), then 32 for the four 8:1 muxes (8 bits each).
* Stage `k*4 + j` selects input j of 4:1 mux k.
* Stage `16 + k*8 + c` selects column c of 8:1 mux k.
* Halves are chained in this order: upper row blocks 0..7, then lower row
  blocks 0..7, and columns 0..7 inside each block.
* Global stage index: `g = ((half*8 + row)*8 + col)*48 + bit`, where `half`
  is 0 for upper and 1 for lower.
* The first bit shifted in ends in the last stage. To load a configuration,
  shift `cfg[6143 - s]` at step `s`, for s = 0..6143. While it shifts in,
  the old configuration comes out on `sel_out`, one bit per step.

Each scan stage (`scan_cell`) works like this:

* The bit is inverted, then held by a latch on phase `clk1`, then by a latch
  on phase `clk2`, then inverted again.
* Each latch (`scan_latch`) is a two-transmission-gate loop with an inverting
  output. It is **transparent while its clock is low**.
* The stored bit drives the mux select.
* Both clock phases are buffered in each stage and passed on.

Protocol for each shift step: present `sel_in`, pulse `clk1` low and back
high, then pulse `clk2` low and back high. Keep both phases high when idle.
They must never be low together. `scan_cell` asserts this rule.

The scan latches have no reset. The switch is unconfigured until the chain
has been loaded.

## Module hierarchy

| module | role |
|---|---|
| `hyperx_pkg` | sizes `DIM` = 8, `PORTS` = 4, `WIDTH` = 16 and the scan bit counts |
| `hyperx_crossbar` | top: 8 upper and 8 lower row blocks, transposed diagonal and output wiring, one scan chain |
| `upper_row_block`, `lower_row_block` | the 8 halves of one row and the row tracks between them |
| `upper_sub_switch`, `lower_sub_switch` | one half: a 48-stage scan chain and a mux stage |
| `mux_stage` | four 4:1 and four 8:1 muxes; used by both halves |
| `onehot_mux` | N:1 mux with one-hot selects |
| `scan_chain` | NBITS scan stages in series, with parallel select outputs |
| `scan_cell`, `scan_latch` | the two-phase shift stage and its latch |

Top-level ports:

* `ex_in[r][c][j]` is input j of sub-switch (r, c).
* `ex_out[r][c][m]` is output m of sub-switch (r, c). It is driven by lower
  half (c, r).
* `sel_in`, `sel_out`, `clk1`, `clk2`, `clk1_out` and `clk2_out` are the
  scan chain.

All modules take `DIM`, `PORTS` and `WIDTH` parameters. The defaults are the
256-radix, 16-bit configuration. The transpose requires a square matrix.

## Departures from the original design and open points

* **Final diagonal hop.** The source gives the hop order "row, diagonal,
  row, diagonal", but its drawings show no logic after the lower 8:1 muxes.
  The final hop is modelled as a second transpose in the long
  external-output wiring. If your floorplan numbers outputs by the lower
  half's own position, drop the `ex_out[c][r] = lo_out[r][c]` transpose in
  `hyperx_crossbar`.
* **Extra tracks not built.** The source says the tracks between
  sub-switches are doubled to avoid path conflicts, but it does not say
  where. Only the four diagonal links per sub-switch exist here. Routing is
  therefore blocking, as described in *Routing rules*.
* **Row inputs.** One of the source's block diagrams labels the 8:1-mux
  inputs of a half as 8 words. Its mux-level drawing labels them as 32, and
  its text agrees with 32 (mux k sees track k of all eight halves). The
  model has 32 (`[PORTS][DIM]`).
* **Polarity.** The three-inverter input driver would invert the data. The
  model passes data unchanged.
* **One-hot select encoding.** Taken from the one-select-per-driver mux
  circuit.
* **Scan details chosen for this model.** These are not given by the source:
  * the bit layout and chain order;
  * the node that drives the mux select;
  * the non-overlap rule for the two clock phases.
* **No reset and no timing.** Latency is purely combinational. The source's
  1 GHz figure is the rate at which the circuit was characterised, not a
  pipeline clock.

## Simulating

Every testbench in `tb/` checks its own results and prints
`TB_RESULT checks=N failures=M`. Use the package file and the library paths:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/hyperx_pkg.sv tb/tb_hyperx_crossbar.sv --top-module tb_hyperx_crossbar
./obj_dir/Vtb_hyperx_crossbar
```

* `tb_hyperx_crossbar` runs the full 256 × 256 × 16 crossbar at default
  parameters. For each of three random routable permutations it:
  * shifts in all 6144 bits;
  * checks the read-back of the previous configuration;
  * applies 16 random data vectors and checks every output.

  It also counts these mechanisms and fails if any never occurs:
  * reconfiguration;
  * read-back;
  * a row hop to another column, and one within the same column, in each
    row block;
  * a diagonal hop between two different rows, and one within the same row.

  Build time is about 1 minute and run time about 10 s.
* `tb_critical_path` runs at full size. It routes the four inputs of
  sub-switch (0, 0) along the longest route: across row 0, over the
  diagonal to lower half (7, 0), and across row 7 to sub-switch (7, 7). It
  checks that every other output reads 0.
* `tb_upper_row_block` and `tb_lower_row_block` check the row wiring of one
  block after a scan load.
* `tb_upper_sub_switch` and `tb_lower_sub_switch` check one half: its scan
  load and read-back, and both mux groups.
* `tb_mux_stage`, `tb_onehot_mux`, `tb_scan_chain`, `tb_scan_cell` and
  `tb_scan_latch` check the leaf blocks. The leaf tests cover:
  * latch transparency and hold;
  * that a bit moves only on a clk1-then-clk2 pair;
  * the order of the parallel outputs.

The scan latches are level-sensitive storage on purpose. Lint and synthesis
tools report them as latches.
