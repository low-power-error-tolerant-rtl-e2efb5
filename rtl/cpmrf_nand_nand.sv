// cpmrf_nand_nand: non-complementary CPMRF group of two NAND gates.
// NAND outputs are strong in 1 and weak in 0. An OR gate g4 codes the two
// first-stage outputs into an aided signal tc, and the AND gates g1, g2 turn
// the weak 0s into strong 0s:
//   t1 = ~(a1 & b1),  t2 = ~(a2 & b2)      first stage (g5, g6)
//   tc = t1 | t2                            coding (g4)
//   y1 = t1 & tc,     y2 = t2 & tc          second stage (g1, g2)
// Noise-free, y1 and y2 are the two NANDs. Combinational.
module cpmrf_nand_nand (
  input  logic a1,
  input  logic b1,
  input  logic a2,
  input  logic b2,
  output logic y1,
  output logic y2
);
  logic t1, t2, tc;
  assign t1 = ~(a1 & b1);
  assign t2 = ~(a2 & b2);
  assign tc = t1 | t2;
  assign y1 = t1 & tc;
  assign y2 = t2 & tc;
endmodule
