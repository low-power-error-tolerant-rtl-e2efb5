// cpmrf_nor_nor: non-complementary CPMRF group of two NOR gates.
// NOR outputs are strong in 0 and weak in 1. A coding gate g4 combines the
// two first-stage outputs so that no weak 1 is weakened twice, and the
// second-stage NOR gates g1, g2 restore each output:
//   t1 = ~(a1 | b1),  t2 = ~(a2 | b2)      first stage (g5, g6)
//   tc = t1 & t2                            coding (g4)
//   y1 = ~~(t1 | tc),  y2 = ~~(t2 | tc)     g1, g2 (NOR) and output inverters
// The gate kinds follow the text; the coding function of g4 is this
// design's choice. Noise-free, y1 and y2 are the two NORs. Combinational.
module cpmrf_nor_nor (
  input  logic a1,
  input  logic b1,
  input  logic a2,
  input  logic b2,
  output logic y1,
  output logic y2
);
  logic t1, t2, tc, u1, u2;
  assign t1 = ~(a1 | b1);
  assign t2 = ~(a2 | b2);
  assign tc = t1 & t2;
  assign u1 = ~(t1 | tc);
  assign u2 = ~(t2 | tc);
  assign y1 = ~u1;
  assign y2 = ~u2;
endmodule
