// mrf_or_or_group: two OR gates with no common input that share one
// MRF network. An OR output is strong in 1 and weak in 0.
// A helper gate g10 joins the two first-stage outputs (tc = t_a | t_b), and
// NAND gates g9 and g11 combine each output with it, so a weak 0 is turned
// into a strong 0 by an AND-type gate; without g10 the pair would fall into
// a latch state when both outputs are 0.
//   t_a = p1 | q1,  t_b = p2 | q2
//   tc  = t_a | t_b                       (g10)
//   y_a = ~(~(t_a & tc)),  y_b likewise   (g9, g11 and output inverters)
// Noise-free, y_a and y_b are the two ORs. The gate names follow the
// document; their exact wiring is this design's reading. Combinational.
module mrf_or_or_group (
  input  logic p1,
  input  logic q1,
  input  logic p2,
  input  logic q2,
  output logic y_a,
  output logic y_b
);
  logic t_a, t_b, tc, n_a, n_b;
  assign t_a = p1 | q1;
  assign t_b = p2 | q2;
  assign tc  = t_a | t_b;
  assign n_a = ~(t_a & tc);
  assign n_b = ~(t_b & tc);
  assign y_a = ~n_a;
  assign y_b = ~n_b;
endmodule
