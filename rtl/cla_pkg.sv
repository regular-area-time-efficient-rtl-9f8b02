// cla_pkg: shared constants, sizing functions and bus types for the
// negative-logic carry-lookahead adder.
//
// The adder is a tree. Level 0 is a row of primitive units (P) that each take
// three operand bit pairs. Every higher level groups the units below it by a
// blocking factor: 3 at levels 0, 1 and 2, and 4 at level 3 and above. The
// last level is a single block carry generation unit (BG). With LEVELS levels
// the adder is therefore 9, 27, 108, 432, 1728 ... bits wide. These are the
// widths the delay comparison of the design is given for. The rule "3,3,3
// then 4" is this design's reading of the blocking scheme; it matches both the
// 27-bit tree (P, BC3, BG) and the recursive 432-bit floorplan.
//
// Polarity: the (g, p) signals leaving level i, and the carries entering a
// unit of level i, are in "domain i+1". Domain 0 is true polarity. Crossing one
// level complements the carry, so a domain-d carry is the true carry inverted
// d times. See cla_adder for the full description.
package cla_pkg;

  // Blocking factor of tree level `lvl` (0 = P units).
  function automatic int unsigned blk_factor(input int unsigned lvl);
    return (lvl < 3) ? 3 : 4;
  endfunction

  // Operand bits covered by one unit of level `lvl`.
  function automatic int unsigned span_bits(input int unsigned lvl);
    int unsigned s = 1;
    for (int unsigned i = 0; i <= lvl; i++) s *= blk_factor(i);
    return s;
  endfunction

  // Adder width for a tree of `levels` levels (the top one being BG).
  function automatic int unsigned adder_width(input int unsigned levels);
    return span_bits(levels - 1);
  endfunction

  // Number of units at level `lvl` of a tree of `levels` levels.
  function automatic int unsigned units_at(input int unsigned levels,
                                           input int unsigned lvl);
    return adder_width(levels) / span_bits(lvl);
  endfunction

  // Bits handled by one primitive unit.
  localparam int unsigned P_BITS = 3;

  // Shared-bus I/O: one transfer moves one primitive unit's operand bits.
  // 16 address bits reach 65536 units, i.e. adders up to LEVELS = 9
  // (110592 bits).
  localparam int unsigned BUS_ADDR_W = 16;

  typedef struct packed {
    logic [BUS_ADDR_W-1:0] addr;   // primitive unit addressed
    logic                  wr;     // load a/b of the addressed unit
    logic [P_BITS-1:0]     wr_a;   // operand A bits for that unit
    logic [P_BITS-1:0]     wr_b;   // operand B bits for that unit
    logic                  latch;  // all units capture their sum bits
    logic                  rd;     // addressed unit drives its sum register
  } cla_bus_t;

endpackage
