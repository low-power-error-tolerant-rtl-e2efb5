// sc_as_pair: two stochastic scaled adders/subtractors with separate
// operands that share one select stream and one OR-OR group.
// For bipolar streams and a select stream s of probability 0.5:
//   y1 = s ? a1 : (SUB1 ? ~b1 : b1)    value (a1 +- b1) / 2
//   y2 = s ? a2 : (SUB2 ? ~b2 : b2)    value (a2 +- b2) / 2
// Each multiplexer is a NAND-NOR group and an OR gate,
//   mux(a, b', s) = ~NAND(a, s) | NOR(~b', s),
// and the two closing OR gates form an OR-OR group, exactly as in the AS
// unit. The DCT uses it twice: with SUB1 = 0, SUB2 = 1 it is the AS unit of
// the last odd-half level, whose adder and subtractor take different
// operands; with SUB1 = SUB2 = 1 it is the pair of stand-alone subtractors
// that form X(3) and X(5), grouped to share their MRF network as the
// published structure describes. The parameter form is this design's own.
// Combinational, one bit per clock of the stream.
module sc_as_pair #(
  parameter bit SUB1 = 1'b0,
  parameter bit SUB2 = 1'b1
) (
  input  logic a1,
  input  logic b1,
  input  logic a2,
  input  logic b2,
  input  logic s,
  output logic y1,
  output logic y2
);
  logic nb1, nb2, na1, nr1, na2, nr2;

  // NOR input of each group is the complement of the data chosen when s = 0
  assign nb1 = SUB1 ? b1 : ~b1;
  assign nb2 = SUB2 ? b2 : ~b2;

  mrf_nand_nor_group u_g1 (.a(a1), .b(nb1), .s(s), .y1(na1), .y2(nr1));
  mrf_nand_nor_group u_g2 (.a(a2), .b(nb2), .s(s), .y1(na2), .y2(nr2));
  mrf_or_or_group    u_or (.p1(~na1), .q1(nr1), .p2(~na2), .q2(nr2), .y_a(y1), .y_b(y2));
endmodule
