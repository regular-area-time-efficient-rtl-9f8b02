// cla_adder: N-bit carry-lookahead adder built as a regular tree of
// primitive units (P), block carry units (BC3, BC4) and one block carry
// generation unit (BG), all in negative logic.
//
// Structure. Level 0 holds N/3 P units, each adding three bit pairs. Level i
// (1 <= i <= LEVELS-2) holds block carry units that each combine
// blk_factor(i) units of level i-1: BC3 for a factor of 3 (levels 1 and 2),
// BC4 for a factor of 4 (level 3 and above). Level LEVELS-1 is one BG with
// blk_factor(LEVELS-1) inputs. With the default LEVELS = 5 the adder is
// 432 bits wide (3*3*3*4*4): 144 P, 48 + 16 BC3, 4 BC4, one BG. LEVELS = 2, 3
// and 4 give the 9, 27 and 108-bit adders.
//
// Negative logic. Each unit hands upward a (g, p) pair for the carry chain of
// the opposite polarity to the one it receives, so every gate is a single
// complemented AND-OR ("complex") gate. The pair leaving level i describes
// carries in domain i+1, where the domain-d carry is the true carry inverted
// d times. Carries travel down the same tree: BG converts the carry-in into
// domain LEVELS-1 and forms its children's carries; each BC receives its
// carry in its output domain and returns its children's carries in theirs;
// each P unit receives the complemented carry into its bit 0 and forms its
// true internal carries and sums. An addition takes one pass up and one pass
// down the tree: 2*LEVELS+1 complex-gate levels plus the sum XOR, that is,
// O(log N).
//
// Interface: a, b, cin in; s, cout out, all in true polarity. Purely
// combinational; the operands and the sum are all brought out in parallel.
module cla_adder
  import cla_pkg::*;
#(
  parameter int unsigned LEVELS = 5,
  localparam int unsigned N     = adder_width(LEVELS)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  // Position of level `lvl`'s units in the flat per-level signal vectors,
  // which hold the units of levels 0..LEVELS-2 one level after the other.
  function automatic int unsigned lvl_off(input int unsigned lvl);
    int unsigned o = 0;
    for (int unsigned i = 0; i < lvl; i++) o += units_at(LEVELS, i);
    return o;
  endfunction

  localparam int unsigned TOTAL = lvl_off(LEVELS - 1);

  // gu/pu: block (g, p) leaving each unit; cu: block carry entering it.
  logic [TOTAL-1:0] gu, pu, cu;

  initial begin : check_levels
    assert (LEVELS >= 2) else $fatal(1, "cla_adder: LEVELS must be at least 2");
  end

  // Level 0: primitive units.
  for (genvar j = 0; j < int'(units_at(LEVELS, 0)); j++) begin : g_p
    cla_p_unit u_p (
      .a  (a[3*j +: 3]),
      .b  (b[3*j +: 3]),
      .cd (cu[j]),
      .g1 (gu[j]),
      .p1 (pu[j]),
      .s  (s[3*j +: 3])
    );
  end

  // Levels 1 .. LEVELS-2: block carry units.
  for (genvar lv = 1; lv < int'(LEVELS) - 1; lv++) begin : g_lvl
    localparam int unsigned F   = blk_factor(lv);
    localparam int unsigned OFF = lvl_off(lv);      // this level
    localparam int unsigned CH  = lvl_off(lv - 1);  // level below
    for (genvar j = 0; j < int'(units_at(LEVELS, lv)); j++) begin : g_u
      if (F == 3) begin : g_bc3
        cla_bc3 u_bc (
          .g   (gu[CH + 3*j +: 3]),
          .p   (pu[CH + 3*j +: 3]),
          .cin (cu[OFF + j]),
          .gk  (gu[OFF + j]),
          .pk  (pu[OFF + j]),
          .c   (cu[CH + 3*j +: 3])
        );
      end else begin : g_bc4
        cla_bc4 u_bc (
          .g   (gu[CH + 4*j +: 4]),
          .p   (pu[CH + 4*j +: 4]),
          .cin (cu[OFF + j]),
          .gk  (gu[OFF + j]),
          .pk  (pu[OFF + j]),
          .c   (cu[CH + 4*j +: 4])
        );
      end
    end
  end

  // Top level: block carry generation unit.
  localparam int unsigned RT  = blk_factor(LEVELS - 1);
  localparam int unsigned TCH = lvl_off(LEVELS - 2);
  cla_bg #(
    .R      (RT),
    .INVERT (((LEVELS - 1) % 2) == 1)
  ) u_bg (
    .g    (gu[TCH +: RT]),
    .p    (pu[TCH +: RT]),
    .c0   (cin),
    .c    (cu[TCH +: RT]),
    .cout (cout)
  );
endmodule
