# Regular negative-logic carry-lookahead adder

A binary adder whose carries are computed by a tree of small, identical
cells, so that an N-bit addition takes O(log N) gate delays while every wire
joins neighbouring cells only. Two ideas shape it:

* **Block carry-lookahead with a mixed blocking factor.** Bits are grouped in
  threes, the groups again in threes twice, and from then on in fours. The
  tree therefore uses only four kinds of cell: the primitive unit **P** (three
  bits), the block carry units **BC3** and **BC4**, and one block carry
  generation unit **BG** at the root. The sizes this gives are
  9, 27, 108, 432, 1728, ... bits.
* **Alternating polarity.** Every cell is built from single inverting
  AND-OR ("complex") gates. Instead of re-inverting after each gate, each
  level of the tree works on the *complemented* carry chain of the level
  below. This removes an inverter per level, giving about two gate delays per
  level where a positive-logic version needs four.

The RTL describes the logic of these cells and of the tree, plus a variant in
which the operands are loaded and the sum read over a shared, addressed bus.
It is written as ordinary synthesizable SystemVerilog; the cell equations are
kept in their complemented complex-gate form, but a synthesis tool is free to
restructure them.

## The tree

`LEVELS` (default 5) sets the depth. Level 0 is the row of P units; level
`LEVELS-1` is the BG.

| LEVELS | N bits | P   | BC3 (levels 1, 2) | BC4 (level 3+) | BG inputs |
|--------|--------|-----|-------------------|----------------|-----------|
| 2      | 9      | 3   | -                 | -              | 3         |
| 3      | 27     | 9   | 3                 | -              | 3         |
| 4      | 108    | 36  | 12 + 4            | -              | 4         |
| 5      | 432    | 144 | 48 + 16           | 4              | 4         |
| 6      | 1728   | 576 | 192 + 64          | 16             | 4         |

The blocking factor of level i is 3 for i < 3 and 4 above
(`cla_pkg::blk_factor`). This rule reproduces both the 27-bit tree built
only from threes and the 108/432-bit arrangements. 432 bits is the default
because it is the smallest size that uses all four cell types.

Signals move up the tree, then down:

1. **Up:** each P unit forms a block generate/propagate pair `(g, p)` from its
   three bit pairs. Each BC merges the pairs of its children into one pair
   for its parent.
2. **Root:** BG takes the carry-in and the top-level pairs and produces one
   block carry per child, plus the carry-out.
3. **Down:** each BC, once its own block carry arrives, produces the carries
   of its children. Each P unit then forms its three bit carries and sums.

## Polarity: the part to read carefully

For a carry chain `c_out = g + p·c_in`, the complemented chain obeys

    ~c_out = G + P·(~c_in),   with  G = ~(g + p),  P = ~g

so `(G, P)` (a "kill" and a "not-generate") are a generate/propagate pair for
the inverted carries. The tree uses this at every level. Number the
polarities by *domain*: domain 0 is the true carry, and a domain-d carry is
the true carry inverted d times.

* The pair leaving a unit of level i is in domain i+1.
* The block carry entering a unit of level i is also in domain i+1.
* So a unit whose inputs are in domain i turns them into a domain-(i+1)
  pair. It receives a domain-(i+1) carry, and hands domain-i carries down to
  its children.

With `g_j, p_j` the children's pairs (domain i) and `cin` the unit's carry
(domain i+1), the cells are:

**P unit** (children are single bits, `g = a·b`, `p = a + b`, and `cd` is
the complemented carry into bit 0):

    g1 = ~[(g2+p2)(g2+g1+p1)(g2+g1+g0+p0)]        p1 = ~(g2+g1+g0)
    c0 = ~cd    c1 = ~(G0 + P0·cd)    c2 = ~(G1 + P1·G0 + P1·P0·cd)
    s_i = a_i ^ b_i ^ c_i

**BC3 / BC4**

    gk = ~(g3 + p3(g2 + p2(g1 + p1(g0 + p0))))    (BC3: without the g3/p3 level)
    pk = ~(g3 + g2 + g1 + g0)
    c0 = ~cin
    c1 = ~(G0 + P0·cin)
    c2 = ~((G1 + P1·G0) + (P1·P0)·cin)
    c3 = ~((G2 + P2(G1 + P1·G0)) + (P2·P1·P0)·cin)     (BC4 only)

`gk` is the complement of "block generates or block propagates", which is
the block's kill. `pk` is "no child generates". This is a simpler gate than
the complement of the block generate. It is exact nonetheless: whenever
every child propagates but the block does not generate, no child generates
either. The testbenches check these identities for every input combination,
including pairs where `p` does not cover `g`.

**BG** works in the domain of its inputs, K = LEVELS-1. It inverts the
carry-in when K is odd (`INVERT`) and then forms carries in positive form:
`c1 = g0 + p0·c0`, `c2 = g1 + p1·c1`, `c3 = (g2 + p2·g1) + (p2·p1)·c1`, and
for four inputs `c4 = g3 + p3·c3`. The last carry, inverted back to true
polarity when K is odd, is the adder's carry-out.

### Delay

One addition passes up through `LEVELS-1` gate levels (P, then each BC),
through BG, and down through the same levels to the P units' carry gates and
the sum XOR. That is about two complex-gate delays per level plus the XOR.
Estimated in units T of a simple gate delay, with an XOR at 2T, the design
reaches about 8T, 12T, 16T and 20T at 9, 27, 108 and 432 bits. A ripple adder
needs about 18T to 866T over the same range, and a radix-2 tree
(Brent-Kung) needs about 2·log2(N) stage delays. The RTL is purely
combinational and these delays are not modelled. They depend on the
transistor-level gates, which RTL does not capture.

## Shared-bus I/O variant

Bringing 3N operand and sum wires out of a compact array is the practical
problem of this adder. `cla_bus_adder` gives every P unit an I/O subunit
(`cla_io_subunit`): 3+3 operand register bits, a 3-bit sum register, and an
address decoder on a common bus (`cla_pkg::cla_bus_t`):

| field   | meaning                                                        |
|---------|----------------------------------------------------------------|
| `addr`  | P unit addressed; unit i holds bits 3i+2..3i (16 bits)         |
| `wr`    | load `wr_a`, `wr_b` into the addressed unit at the clock edge  |
| `latch` | every unit captures its sum bits; carry-out captured too       |
| `rd`    | addressed unit drives its sum register onto `rd_data` (same cycle) |

An addition is N/3 write clocks, one latch clock and N/3 read clocks: 289
clocks at 432 bits. The adder itself settles within the latch cycle, so with
one bus the transfers take almost all of the time. The read bus is an
AND-OR of all units' outputs (each unit outputs 0 unless addressed). An
assertion flags accesses to a unit that does not exist. Reset is
synchronous and active-low, and clears all registers. The carry-in is a
plain control input.

The arrangement of registers plus a decoder per unit on a shared
address/data bus is the design's. The field layout, the three strobes, the
same-cycle read, the 16-bit address and the single bus are this
implementation's choices. A layout with roughly √N parallel buses would cut
the transfer time to about √N clocks; it is not implemented.

## Top level

`cla_top` holds both arrangements side by side, each with its own ports:

* the parallel adder (`par_a`, `par_b`, `par_cin` → `par_s`, `par_cout`);
* the bus adder (`clk`, `rst_n`, `bus`, `bus_cin` → `bus_rd_data`, `bus_cout`).

Both have the size set by `LEVELS`.

## Files

| file | contents |
|------|----------|
| `rtl/cla_pkg.sv` | blocking-factor and sizing functions, bus struct |
| `rtl/cla_p_unit.sv` | primitive unit P |
| `rtl/cla_bc3.sv`, `rtl/cla_bc4.sv` | block carry units |
| `rtl/cla_bg.sv` | block carry generation unit (`R` = 3 or 4 inputs, `INVERT`) |
| `rtl/cla_adder.sv` | the tree, parameter `LEVELS` |
| `rtl/cla_io_subunit.sv` | per-unit registers and decoder |
| `rtl/cla_bus_adder.sv` | adder with shared-bus I/O |
| `rtl/cla_top.sv` | both arrangements side by side |
| `tb/tb_<module>.sv` | a self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
(it has a watchdog). From the directory above `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/cla_pkg.sv tb/tb_cla_top.sv --top-module tb_cla_top --Mdir obj_top
    ./obj_top/Vtb_cla_top

Replace `tb_cla_top` with any other testbench name. Every run takes well
under a second.

What the testbenches check:

* `tb_cla_p_unit`, `tb_cla_bc3`, `tb_cla_bc4`, `tb_cla_bg` check every input
  combination against a ripple-carry model, including polarity and
  carry-out.
* `tb_cla_adder` checks the 9, 27, 108 and 432-bit trees against integer
  addition. It uses corner cases and carry runs of every length, then 4000
  random vectors each, half of them propagate-heavy.
* `tb_cla_io_subunit` runs random bus cycles against a register model.
* `tb_cla_bus_adder` runs complete additions over the bus at 432 bits,
  checks the clock count of each (2N/3+1), and checks a partial rewrite.
* `tb_cla_top` runs both adders at the default size. It checks the bus
  result against the parallel adder too. It also counts carries delivered
  across each kind of block boundary (P, level-2 BC3, BC4, BG), full-width
  carry runs, carry-outs, bus writes, latches, reads and partial rewrites,
  and fails if any never occurs.

## Where this departs from, or adds to, the original cell design

* The cells were designed as NMOS complex gates and pass transistors with a
  planar layout; here they are logic equations. Area, wire length and the
  floorplans have no RTL counterpart.
* Reading the blocking factors as 3, 3, 3, then 4 is an interpretation. It
  is the one consistent with the 9/27/108/432-bit sizes and the recursive
  floorplan.
* BC4 has no drawn layout; its ports follow BC3.
* The carry-out of the adder is not part of the original equations. It is
  taken from the last BG carry.
* A 4-input BG's fourth carry extends the given three-carry pattern.
* The bus protocol details are this implementation's (see above).
* Not implemented: the suggested extension of the P unit with an
  accumulator for multiplication. It is only outlined, with no function or
  structure given.
