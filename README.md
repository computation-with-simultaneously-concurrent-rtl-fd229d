# BIDO multiplier: an array multiplier that recomputes its own product in its idle cells

An array multiplier does not keep all of its cells busy. The wave of
computation starts at the least significant corner of the array and ends at
the most significant one, so for the first half of a multiplication the cells
near the top end of the product wait for data, and for the second half the
cells near the bottom end have nothing left to do. The bi-directional operand
(BIDO) method puts that idle time to use for concurrent error detection. A
second copy of the operands enters the array from the opposite corner and
flows the other way. Each half of the array works on the normal computation in
one half of the multiplication time and on the recomputation in the other.
At the end, two products are ready: one from the normal computation and one
from the recomputation. They took about the time of a single ordinary
multiplication. The two are compared, and any difference raises `error`.

The two computations use different cells for each bit weight. A cell that
disturbs bit weight 2^i of the normal product disturbs roughly weight
2^(2N-2-i) of the recomputed one. As a result a single faulty cell cannot
corrupt both results in the same way.

The only duplicated hardware is the middle column of the array. The rest of
the cost is one extra AND gate and a set of input selectors ("bi-switches")
per cell, a few hold registers and an equality checker.

This repository holds synthesizable SystemVerilog for an unsigned N x N BIDO
multiplier (default N = 16) and self-checking testbenches for it.

## Array geometry

The array is a ripple-row unsigned array multiplier with N rows of N cells.
Cell `(r, c)` is in row `r` and column `j = r + c`:

* Row `r` adds the multiplier bit `q[r]` times the multiplicand.
* Column `j` holds the bit products of weight 2^j.

The table below lists what one cell gets in each direction.

| | normal computation | recomputation |
|---|---|---|
| bit pair | `m[c] & q[r]` | `m_bar[N-1-c] & q_bar[N-1-r]` |
| sum input | from row `r-1`, same column | from row `r+1`, same column |
| carry input | from column `j-1`, same row | from column `j+1`, same row |
| its row index | `r` | `N-1-r` |
| its column weight | 2^j | 2^(2N-2-j) |

The recomputation is the same multiplication with the array turned by 180
degrees. `m_bar` and `q_bar` have the same values as `m` and `q`; they simply
enter from the other side, on wires of their own. Recomputed bit `p_bar[k]`
therefore leaves the array at the place that mirrors `p[k]`:

* `p[k]` for `k < N` comes out at the right end of row `k`.
* `p[N..2N-2]` come out along the bottom row.
* `p[2N-1]` is the bottom row's final carry.
* `p_bar` comes out along the top row and the left ends of the rows, mirror-imaged.

`bido_array` routes both results back into normal bit order, so the checker
compares bit `k` with bit `k`.

The columns fall into three parts:

| part | columns | cells | use in T1 | use in T2 |
|---|---|---|---|---|
| M1 | 0 .. N-2 | bi-directional (`bido_bfa`) | normal computation, low half | recomputation, high half |
| C1 | N-1 | plain (`bido_fa`) | normal computation, low half | hold |
| C2 | N-1 (duplicate) | plain (`bido_fa`) | recomputation, low half | hold |
| M2 | N .. 2N-2 | bi-directional (`bido_bfa`) | recomputation, low half | normal computation, high half |

Why the split works: in the normal direction a cell only depends on cells
in the same column or a lower one. So M1 and C1 together can finish columns
0..N-1 on their own, without waiting for M2. The recomputation has the mirror
property, so M2 and C2 can finish its first half on their own. The middle
column is needed by both computations in the same interval, which is why it
is the one column that exists twice.

## The two half-computations

A multiplication takes two clock cycles, T1 and T2. Each cycle covers about
half of the array's delay. One control signal, `sw`, sets every bi-switch in
the array.

**T1 (`sw = 0`).**
* M1 cells take their inputs from their normal-direction neighbours. M2 cells
  take theirs from their reverse-direction neighbours.
* M1 and C1 produce `p[N-1:0]`. M2 and C2 produce `p_bar[N-1:0]`.
* Each computation sends N carries across the middle column:
  * C1 sends one carry per row into M2. For row 0, this is the row's final carry.
  * C2 sends the mirror set into M1.
* At the clock edge that ends T1, these 2N carries are stored in the hold
  registers of the central part (`bido_central`). The two low halves are
  stored too.

**T2 (`sw = 1`).**
* Every bi-switch turns.
* M2 continues the normal computation from the carries held for C1 and
  produces `p[2N-1:N]`.
* M1 continues the recomputation from the carries held for C2 and produces
  `p_bar[2N-1:N]`.
* At the edge that ends T2, the complete products and the comparison result
  are registered.

Each M cell thus runs one full adder for the normal computation in one
cycle and for the recomputation in the other. Only the central cells and the
hold registers exist once per direction.

## Bi-switches and the loops tools report

A BFA (`bido_bfa`) has two full sets of inputs, one per direction, and a
bi-switch (`bido_bi_switch`) picks one set. The selected set feeds a single
AND gate and full adder (`bido_fa`). The cell's sum and carry go to both its
normal-direction neighbours and its reverse-direction neighbours.

Seen as a graph, this makes loops: a cell's carry goes to its left
neighbour's normal input, and that neighbour's carry comes back through this
cell's reverse input. Lint and synthesis tools report these loops as circular
combinational logic (Verilator `UNOPTFLAT`, yosys logic loops). No signal
ever actually travels around them, because all cells of one part share one
`sw` setting and so all select the same direction. The simulations settle
normally. A timing analysis of this netlist needs those paths declared false.

## Error detection and its limits

`bido_eq_checker` takes the XOR of the two 2N-bit products and ORs the
result into `error`.

How a fault shows up depends on where the faulty cell sits:
* **In M1, column i.** It adds an error of weight 2^i or 2^(i+1) to the
  normal product and of weight 2^(2N-2-i) or 2^(2N-1-i) to the recomputed
  one. The two sets of possible errors do not overlap, so the two products
  can never come out equal and wrong.
* **In M2.** The mirror argument applies.
* **In the middle column.** The fault touches only one of the two
  computations, so the other one stays correct.

The testbenches check this exhaustively at N = 4. Every cell's sum and
carry is made stuck at 0 and at 1, one fault at a time, and all 256 operand
pairs are run for each fault. Every wrong result raises `error`, and no
correct result does.

Limits:
* Several faulty cells on the same side (all in M1 or all in M2) are still
  detected. The testbenches check every pair at N = 4.
* Two faults can hide each other when they sit at mirror positions. A
  fault in column i and another in column 2N-1-i, 2N-2-i or 2N-3-i may
  produce matching errors in both products. For the exact mirror pair (an
  M1 cell and the M2 cell at the 180-degree position, stuck the same way),
  the recomputation meets the very fault the normal computation meets. The
  two products then always agree, even when they are wrong.
* Detection needs at least one good cell to check a bad one.
* The equality checker, the operand registers and the hold registers are not
  themselves checked. A fault in a hold register corrupts only one of the two
  computations, so it is detected. A fault in the checker is not.
* `error` is only reported. Retrying, isolating the unit or reconfiguring is
  left to the system around it.

## Interface and timing (`bido_multiplier`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `start` | in | 1 | request a multiplication of `m` and `q` |
| `m`, `q` | in | N | unsigned multiplicand and multiplier |
| `ready` | out | 1 | a `start` in this cycle is accepted (low during T1) |
| `valid` | out | 1 | `product`, `product_bar`, `error` are new (one cycle) |
| `product` | out | 2N | normal product |
| `product_bar` | out | 2N | recomputed product |
| `error` | out | 1 | the two products differ |
| `phase` | out | 2 | `ST_IDLE`, `ST_T1` or `ST_T2` (`bido_pkg::state_e`) |

```
edge        0          1          2          3
start/ready accepted
phase       IDLE ----> T1 ------> T2 ------> IDLE or T1 (next op)
registered  operands   low halves results
                       + carries
valid                                        1
```

* The operands are taken at the edge where `start` and `ready` are both high.
  Two copies are registered, one for each direction.
* Results are valid in the cycle after the third edge.
* A new `start` is accepted during T2, so back-to-back requests give one
  result every two cycles.
* A `start` during T1 is not taken; keep it high until `ready`.

## Cost

The published analysis of the method estimates the hardware
overhead as 1/7 + 3/(2N). That is about 24 % at N = 16 and 20 % at N = 32,
against about 106-142 % for shift-and-recompute (RESO) schemes. It also
estimates almost no added time, against about 200 % for RESO.

Compare this RTL with a plain 16-bit array multiplier clocked the same way,
in two half-cycles with the middle-column carries and the low product half
registered. Against that, the extra hardware is:
* 16 cells for C2,
* a second AND gate and a 4-bit bi-switch in each of the 240 M cells,
* 16 hold flip-flops for the C2 carries,
* 16 flip-flops for the low half of `product_bar`,
* 32 flip-flops for the second operand copy,
* a 32-bit equality checker.

## Modules

| file | role |
|---|---|
| `rtl/bido_pkg.sv` | `dir_e` (normal/reverse) and `state_e` (IDLE/T1/T2) |
| `rtl/bido_fa.sv` | AND + full adder cell; the cells of C1 and C2 |
| `rtl/bido_bi_switch.sv` | W-bit two-way input selector of a BFA |
| `rtl/bido_bfa.sv` | bi-directional cell of M1 and M2 |
| `rtl/bido_central.sv` | C1, C2 and the hold registers for the crossing carries |
| `rtl/bido_array.sv` | the whole array: M1, central part, M2, output routing |
| `rtl/bido_eq_checker.sv` | XOR/OR comparison of the two products |
| `rtl/bido_ctrl.sv` | IDLE/T1/T2 sequencing, `sw`, hold and capture enables, handshake |
| `rtl/bido_multiplier.sv` | top: controller, operand registers, array, result registers, checker |

`N` is the only size parameter. The array is generated from it, and any
N >= 2 works.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. To run
one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bido_pkg.sv tb/tb_bido_multiplier.sv \
          --top-module tb_bido_multiplier -Wno-UNOPTFLAT
./obj_dir/Vtb_bido_multiplier
```

| testbench | what it shows |
|---|---|
| `tb_bido_fa`, `tb_bido_bfa` | exhaustive truth tables; the BFA ignores the unselected side |
| `tb_bido_bi_switch` | selection for both settings |
| `tb_bido_central` | middle-column sums and held carries against a bit-level column model |
| `tb_bido_array` | N = 4, all 256 pairs, and N = 16, random and corner pairs; both products equal m*q |
| `tb_bido_eq_checker` | every single-bit difference, equal and random words |
| `tb_bido_ctrl` | phase sequence, refused start in T1, back-to-back start in T2 |
| `tb_bido_multiplier` | default N = 16, end to end. It checks every result, the 3-edge latency and the 2-cycle repeat rate. It also forces stuck-at faults in M1, C1, C2 and M2, plus a temporary fault active only in T2; all must be flagged. |
| `tb_bido_multiplier32` | N = 32, streamed requests and a stuck-at fault |
| `tb_bido_single_fault` | N = 4: all 80 single stuck-at cell faults over all 256 operand pairs. For the row-1, column-1 cell it also checks the error sizes: ±2, ±4 or ±6 in `product` and ±32, ±64 or ±96 in `product_bar`. |
| `tb_bido_multi_fault` | N = 4: every pair of faulty cells within M1 or within M2 is detected; mirror-image pairs give equal, undetectable products |

The fault tests use `force` on cell outputs inside the array, for example
`dut.u_array.g_row[1].g_col[0].g_m1.u_bfa.u_fa.sum`. The generate-block
names encode the part: `g_m1`, `g_m2`, and `u_central.g_cell[r].u_c1` or
`.u_c2`.

## Where this design chooses for itself

The BIDO method is described at the level of array parts, data-flow
directions and fault sets. These points are this implementation's own
choices:

* **Array type.** A ripple-row unsigned array multiplier. Row 0 adds its
  bit products to zeros; each row's final carry enters the next row at its
  left end. Signed operands are not handled.
* **Timing.** T1 and T2 are one clock cycle each. The crossing carries are
  held in edge-triggered registers. The low result halves are registered at
  the end of T1 and everything else at the end of T2.
* **Two operand copies.** Each direction has its own operand registers, so
  the two computations share no operand wire.
* **Bi-switch.** Modelled as a selector on a cell's four inputs (two
  operand bits, sum, carry), not as a transistor-level bidirectional switch.
  The cell outputs go to both sides without switching.
* **Central cells.** C1 and C2 are plain one-direction cells, since each one
  serves only one computation.
* **Control.** The handshake (`start`/`ready`/`valid`), the reset values and
  the acceptance of a new request during T2 are not part of the method.
* **Main size.** The default width is 16. N = 32 is the other evaluated
  size and is set through the parameter.
