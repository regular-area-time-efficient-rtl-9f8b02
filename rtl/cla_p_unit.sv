// cla_p_unit: primitive unit (P) of the carry-lookahead adder, 3 bits wide.
//
// Leaf of the adder tree. From operand bits a[2:0], b[2:0] it forms the
// level-1 block signals in negative logic:
//   g1 = not[(g2+p2)(g2+g1+p1)(g2+g1+g0+p0)]   (the block "kill")
//   p1 = not(g2+g1+g0)                        (no bit generates)
// with g_i = a_i b_i and p_i = a_i + b_i. Those are the generate/propagate of
// the complemented carry chain. The block carry cd handed down by the level
// above is likewise the complemented carry into bit 0. The internal carries
// use the per-bit negative-logic terms G_i = not(a_i + b_i) and
// P_i = not(a_i b_i):
//   c0 = not cd,  c1 = not(G0 + P0 cd),  c2 = not(G1 + P1 G0 + P1 P0 cd)
// and s_i = a_i xor b_i xor c_i. Every equation is one complemented complex
// gate of the design; the ports follow its layout cell (a, b, s, cin, G, P).
// The operand register / decoder ("input/output subunit") is not included
// here; for shared-bus I/O it is cla_io_subunit.
//
// Purely combinational.
module cla_p_unit (
  input  logic [2:0] a,
  input  logic [2:0] b,
  input  logic       cd,   // complemented block carry into bit 0
  output logic       g1,   // block generate, level-1 polarity
  output logic       p1,   // block propagate, level-1 polarity
  output logic [2:0] s
);
  logic [2:0] g, p;       // true-polarity bit generate / propagate
  logic [1:0] gn, pn;     // negative-logic G_i, P_i of bits 0 and 1
  logic [2:0] c;          // true carries into bits 0..2

  always_comb begin
    g  = a & b;
    p  = a | b;
    g1 = ~((g[2] | p[2]) & (g[2] | g[1] | p[1]) & (g[2] | g[1] | g[0] | p[0]));
    p1 = ~(g[2] | g[1] | g[0]);

    gn = ~p[1:0];
    pn = ~g[1:0];
    c[0] = ~cd;
    c[1] = ~(gn[0] | (pn[0] & cd));
    c[2] = ~(gn[1] | (pn[1] & gn[0]) | (pn[1] & pn[0] & cd));
    s    = a ^ b ^ c;
  end
endmodule
