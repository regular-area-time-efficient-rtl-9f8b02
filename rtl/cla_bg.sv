// cla_bg: block carry generation unit (BG), the root of the adder tree.
//
// Receives the R block signals (g, p) of the highest level, which are in that
// level's polarity (the true carry complemented K times, K being the number
// of levels below BG). It first brings the adder carry-in into that polarity
// (inverted when K is odd, set by INVERT) and then forms the carries for its
// R children directly in positive form; no further polarity change is needed
// because the children expect carries in this same polarity:
//   c1 = g0 + p0 c0
//   c2 = g1 + p1 c1                  (= g1 + p1(g0 + p0 c0))
//   c3 = (g2 + p2 g1) + (p2 p1) c1
//   c4 = g3 + p3 c3                  (4-input BG only; the carry-out)
// The first three are the design's BG equations; c4 and the R = 4 case are
// this implementation's extension of the same pattern. With R = 4 and
// INVERT = 0, c[0] is the carry-in itself. The carry out of the last child, c[R], converted back to true
// polarity, is the adder's carry-out (the design's BG cell brings out c3).
// R defaults to 4, the blocking factor of the upper levels; the 27-bit tree
// uses R = 3.
//
// Purely combinational.
module cla_bg #(
  parameter int unsigned R      = 4,
  parameter bit          INVERT = 1'b0   // K odd: carry-in is complemented
) (
  input  logic [R-1:0] g,
  input  logic [R-1:0] p,
  input  logic         c0,    // adder carry-in, true polarity
  output logic [R-1:0] c,     // carries to the children, top-level polarity
  output logic         cout   // adder carry-out, true polarity
);
  logic [R:0] cc;   // cc[j]: carry into child j, top-level polarity

  assign cc[0] = INVERT ? ~c0 : c0;
  // The carry out of child 0 or of an odd-numbered child comes from the
  // carry one step below; that out of an even-numbered child j >= 2 skips
  // two steps with the merged pair (g_j + p_j g_{j-1}, p_j p_{j-1}).
  for (genvar j = 0; j < int'(R); j++) begin : g_carry
    if (j == 0 || j % 2 == 1) begin : g_one
      assign cc[j+1] = g[j] | (p[j] & cc[j]);
    end else begin : g_two
      assign cc[j+1] = (g[j] | (p[j] & g[j-1])) | ((p[j] & p[j-1]) & cc[j-1]);
    end
  end
  assign c    = cc[R-1:0];
  assign cout = INVERT ? ~cc[R] : cc[R];
endmodule
