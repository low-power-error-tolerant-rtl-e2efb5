// cpmrf_and_nor: coding-based partial-MRF (CPMRF) AND-NOR gate pair.
//
// An AND gate and a NOR gate on the same two inputs share one MRF network.
// Each gate keeps only the part of its clique energy that its likely output
// value supplies; the coding unit restores the two missing terms,
// x1*x2*~y_NOR and ~x1*~x2*~y_AND, and the XOR-dependent terms:
//   t1 = x1 & x2,  t2 = ~(x1 | x2)          first-stage gates
//   t3 = x1 ^ x2                            coding gate g3
//   tc1 = t1 & ~t3,  tc2 = t2 & ~t3         coding gates g4, g5
// A cross-coupled NAND pair (g1, g2) closes the network,
//   y1 = ~(tc1 & y2),  y2 = ~(tc2 & y1),
// and the outputs are out_and = ~y1, out_nor = ~y2. Because tc1 and tc2 are
// never 1 together when the inputs are clean, the pair never holds in
// noise-free operation and the outputs equal AND and NOR of the inputs.
// The feedback pair and the output inverters follow the design; the
// exact coding gates are this design's reading of the XOR terms of the
// energy function. Combinational (the pair is modelled by mrf_nand_latch).
module cpmrf_and_nor (
  input  logic in_a,
  input  logic in_b,
  output logic out_and,
  output logic out_nor
);
  logic t1, t2, t3, tc1, tc2, y1, y2, hold;

  assign t1  = in_a & in_b;
  assign t2  = ~(in_a | in_b);
  assign t3  = in_a ^ in_b;
  assign tc1 = t1 & ~t3;
  assign tc2 = t2 & ~t3;

  mrf_nand_latch u_fb (.s1(tc1), .s2(tc2), .y1(y1), .y2(y2), .holding(hold));

  assign out_and = ~y1;
  assign out_nor = ~y2;
endmodule
