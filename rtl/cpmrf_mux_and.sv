// cpmrf_mux_and: the MUX-AND block of a MUX-based tree carry-lookahead adder,
// built from two CPMRF gate pairs.
//
// The multiplexer is not made of two ANDs and an OR (an AND-AND pair is
// non-complementary). Instead
//   y_mux = x_a & x_s  |  ~(~x_b | x_s)      ( = x_s ? x_a : x_b )
// g1 = AND(x_a, x_s) and g2 = NOR(~x_b, x_s) form an AND-NOR pair whose two
// outputs are never 1 together, so they share a cross-coupled NAND network
// like cpmrf_and_nor. g4 = OR(g1, g2) gives the MUX output and is paired with
// g3 = AND(p_a, p_b), the AND of the block. The document does not show the
// shared network of that AND-OR pair, so here g3 and g4 are plain gates.
// In a prefix carry tree: x_s = P_high, x_a = G_low, x_b = G_high,
// p_a = P_high, p_b = P_low. Combinational.
module cpmrf_mux_and (
  input  logic x_a,
  input  logic x_b,
  input  logic x_s,
  input  logic p_a,
  input  logic p_b,
  output logic y_mux,
  output logic y_and
);
  logic g1, g2, y1, y2, hold, m1, m2;

  // AND-NOR pair sharing the select input
  assign g1 = x_a & x_s;
  assign g2 = ~(~x_b | x_s);
  mrf_nand_latch u_fb (.s1(g1), .s2(g2), .y1(y1), .y2(y2), .holding(hold));
  assign m1 = ~y1;
  assign m2 = ~y2;

  // AND-OR pair (g3, g4)
  assign y_mux = m1 | m2;
  assign y_and = p_a & p_b;
endmodule
