// cla_bc3: 3-input block carry unit (BC3).
//
// Sits between two tree levels. Upward it merges its three children's block
// signals (g, p), which are in the polarity of the level below, into one pair
// of the next level's (opposite) polarity:
//   gk = not(g2 + p2(g1 + p1(g0 + p0)))     pk = not(g2 + g1 + g0)
// Downward, once the block carry cin of its own level arrives from above, it
// produces the carries of its three children in their polarity, using the
// complemented terms G_j = not(g_j + p_j), P_j = not g_j:
//   c0 = not cin
//   c1 = not(G0 + P0 cin)
//   c2 = not((G1 + P1 G0) + (P1 P0) cin)
// Each output is a single complemented complex gate, as in the design's BC3
// layout cell (ports g0..g2, p0..p2, c0..c2, gk, pk, cin).
//
// Purely combinational.
module cla_bc3 (
  input  logic [2:0] g,    // children's block generates
  input  logic [2:0] p,    // children's block propagates
  input  logic       cin,  // block carry from above, this unit's output polarity
  output logic       gk,   // block generate to the level above
  output logic       pk,   // block propagate to the level above
  output logic [2:0] c     // carries to the children, their polarity
);
  logic [1:0] gn, pn;      // complemented G_j, P_j of children 0 and 1

  always_comb begin
    gk = ~(g[2] | (p[2] & (g[1] | (p[1] & (g[0] | p[0])))));
    pk = ~(g[2] | g[1] | g[0]);

    gn = ~(g[1:0] | p[1:0]);
    pn = ~g[1:0];
    c[0] = ~cin;
    c[1] = ~(gn[0] | (pn[0] & cin));
    c[2] = ~((gn[1] | (pn[1] & gn[0])) | ((pn[1] & pn[0]) & cin));
  end
endmodule
