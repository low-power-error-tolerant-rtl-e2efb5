// sc_as_unit: stochastic ADD-SUB (AS) unit of the DCT butterfly.
// For bipolar streams a, b and a select stream s of probability 0.5:
//   add = s ? a :  b     value (a + b) / 2
//   sub = s ? a : ~b     value (a - b) / 2   (inverting a bipolar stream negates it)
// Each multiplexer is split into a NAND-NOR group and an OR gate:
//   mux(a, b, s) = ~NAND(a, s) | NOR(~b, s)
// and the two OR gates form an OR-OR group. Combinational, one bit per clock
// of the stream.
module sc_as_unit (
  input  logic a,
  input  logic b,
  input  logic s,
  output logic add,
  output logic sub
);
  logic na_add, nr_add, na_sub, nr_sub;

  mrf_nand_nor_group u_add (.a(a), .b(~b), .s(s), .y1(na_add), .y2(nr_add));
  mrf_nand_nor_group u_sub (.a(a), .b(b),  .s(s), .y1(na_sub), .y2(nr_sub));
  mrf_or_or_group    u_or  (.p1(~na_add), .q1(nr_add), .p2(~na_sub), .q2(nr_sub),
                            .y_a(add), .y_b(sub));
endmodule
