// sc_asm_unit: stochastic ADD-SUB with MUL (ASM) unit, the rotation of the
// DCT butterfly.
//   add = (m_a*c_x + m_b*c_y) / 2
//   sub = (m_a*c_y - m_b*c_x) / 2
// Four XNOR gates multiply the bipolar streams, grouped in two XNOR-XNOR
// pairs (m_a*c_x with m_b*c_y, m_a*c_y with m_b*c_x); two scaled adders
// (multiplexers on the select stream s, the second with its lower input
// inverted for subtraction) use two NAND-NOR groups and one OR-OR group.
// Combinational.
module sc_asm_unit (
  input  logic m_a,
  input  logic m_b,
  input  logic c_x,
  input  logic c_y,
  input  logic s,
  output logic add,
  output logic sub
);
  logic pax, pby, pay, pbx;
  logic na_add, nr_add, na_sub, nr_sub;

  mrf_xnor_xnor_group u_m1 (.p1(m_a), .q1(c_x), .p2(m_b), .q2(c_y), .y_a(pax), .y_b(pby));
  mrf_xnor_xnor_group u_m2 (.p1(m_a), .q1(c_y), .p2(m_b), .q2(c_x), .y_a(pay), .y_b(pbx));

  mrf_nand_nor_group u_add (.a(pax), .b(~pby), .s(s), .y1(na_add), .y2(nr_add));
  mrf_nand_nor_group u_sub (.a(pay), .b(pbx),  .s(s), .y1(na_sub), .y2(nr_sub));
  mrf_or_or_group    u_or  (.p1(~na_add), .q1(nr_add), .p2(~na_sub), .q2(nr_sub),
                            .y_a(add), .y_b(sub));
endmodule
