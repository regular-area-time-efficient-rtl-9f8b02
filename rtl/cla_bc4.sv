// cla_bc4: 4-input block carry unit (BC4), used at tree level 3 and above.
//
// Same job as cla_bc3 with four children. Upward:
//   gk = not(g3 + p3(g2 + p2(g1 + p1(g0 + p0))))    pk = not(g3 + g2 + g1 + g0)
// Downward, with G_j = not(g_j + p_j) and P_j = not g_j:
//   c0 = not cin
//   c1 = not(G0 + P0 cin)
//   c2 = not(G1' + P1' cin),  G1' = G1 + P1 G0,             P1' = P1 P0
//   c3 = not(G2' + P2' cin),  G2' = G2 + P2(G1 + P1 G0),    P2' = P2 P1 P0
// Port names follow the BC3 cell; no BC4 layout is drawn in the design.
//
// Purely combinational.
module cla_bc4 (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       cin,
  output logic       gk,
  output logic       pk,
  output logic [3:0] c
);
  logic [2:0] gn, pn;      // complemented G_j, P_j of children 0..2
  logic       g1x, p1x;    // G1', P1'
  logic       g2x, p2x;    // G2', P2'

  always_comb begin
    gk = ~(g[3] | (p[3] & (g[2] | (p[2] & (g[1] | (p[1] & (g[0] | p[0])))))));
    pk = ~(g[3] | g[2] | g[1] | g[0]);

    gn  = ~(g[2:0] | p[2:0]);
    pn  = ~g[2:0];
    g1x = gn[1] | (pn[1] & gn[0]);
    p1x = pn[1] & pn[0];
    g2x = gn[2] | (pn[2] & (gn[1] | (pn[1] & gn[0])));
    p2x = pn[2] & pn[1] & pn[0];
    c[0] = ~cin;
    c[1] = ~(gn[0] | (pn[0] & cin));
    c[2] = ~(g1x | (p1x & cin));
    c[3] = ~(g2x | (p2x & cin));
  end
endmodule
