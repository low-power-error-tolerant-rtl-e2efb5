// sc_dct8: stochastic-computing core of an 8-point 1D-DCT, one bit of every
// stream per clock (purely combinational; the clocking is in the stream
// generators and counters around it).
//
// Even part, the butterfly of the DCT:
//   P0,M0 = x0 +- x7   P1,M1 = x3 +- x4   P2,M2 = x1 +- x6   P3,M3 = x2 +- x5
//   P10,M10 = P0 +- P1   P11,M11 = P2 +- P3   P100,M100 = P10 +- P11
//   X0 = C4*P100   X4 = C4*M100
//   X2 = M10*C2 + M11*C6   X6 = M10*C6 - M11*C2        (ASM unit)
// Odd part, rewritten with angle-sum identities to save multipliers:
//   K3 = M0*C5 + M1*C3   K1 = M0*C3 - M1*C5            (ASM unit)
//   K2 = M2*C7 + M3*C1   K4 = M2*C1 - M3*C7            (ASM unit)
//   X3 = K1 - K2   X5 = K3 - K4                       (subtractor pair)
//   X1 = C4*[(K1 + K3) + (K2 + K4)]                    (AS units on K1,K3
//   X7 = C4*[(K1 - K3) - (K4 - K2)]                     and K4,K2, then one
//                                                       AS unit, sc_as_pair)
// That is 10 AS units (nine sc_as_unit and the split-operand sc_as_pair),
// 3 ASM units, two stand-alone subtractors grouped in one sc_as_pair, and 4
// more multipliers by C4, which form two XNOR-XNOR groups: 28 adders and 16
// multipliers, the counts of the published structure.
// Every scaled adder halves its result, so the output streams carry
// X(k)/8 for k = 0, 2, 3, 4, 5, 6 and X(k)/16 for k = 1, 7, where X(k) is the
// unnormalised DCT sum_n x(n)*cos(k*pi*(2n+1)/16) (X(0) uses C4 for every term).
// sel[j] is the select stream (probability 0.5) of adder level j:
//   0: first butterfly  1: second  2: third  3: ASM units  4: K sums  5: last.
module sc_dct8 (
  input  logic [7:0] x,      // input streams x0..x7
  input  logic [7:1] c,      // coefficient streams C1..C7
  input  logic [5:0] sel,    // select streams, one per adder level
  output logic [7:0] y       // output streams X0..X7 (scaled, see above)
);
  logic p0, m0, p1, m1, p2, m2, p3, m3;
  logic p10, m10, p11, m11, p100, m100;
  logic k1, k2, k3, k4, s13, d13, s42, d42, sa, sd;

  // first butterfly level
  sc_as_unit u_as0 (.a(x[0]), .b(x[7]), .s(sel[0]), .add(p0), .sub(m0));
  sc_as_unit u_as1 (.a(x[3]), .b(x[4]), .s(sel[0]), .add(p1), .sub(m1));
  sc_as_unit u_as2 (.a(x[1]), .b(x[6]), .s(sel[0]), .add(p2), .sub(m2));
  sc_as_unit u_as3 (.a(x[2]), .b(x[5]), .s(sel[0]), .add(p3), .sub(m3));
  // even part
  sc_as_unit u_as4 (.a(p0),  .b(p1),  .s(sel[1]), .add(p10),  .sub(m10));
  sc_as_unit u_as5 (.a(p2),  .b(p3),  .s(sel[1]), .add(p11),  .sub(m11));
  sc_as_unit u_as6 (.a(p10), .b(p11), .s(sel[2]), .add(p100), .sub(m100));
  mrf_xnor_xnor_group u_c4a (.p1(p100), .q1(c[4]), .p2(m100), .q2(c[4]), .y_a(y[0]), .y_b(y[4]));
  sc_asm_unit u_asm0 (.m_a(m10), .m_b(m11), .c_x(c[2]), .c_y(c[6]), .s(sel[3]), .add(y[2]), .sub(y[6]));
  // odd part
  sc_asm_unit u_asm1 (.m_a(m0), .m_b(m1), .c_x(c[5]), .c_y(c[3]), .s(sel[3]), .add(k3), .sub(k1));
  sc_asm_unit u_asm2 (.m_a(m2), .m_b(m3), .c_x(c[7]), .c_y(c[1]), .s(sel[3]), .add(k2), .sub(k4));
  sc_as_unit u_as7 (.a(k1), .b(k3), .s(sel[4]), .add(s13), .sub(d13));
  sc_as_unit u_as8 (.a(k4), .b(k2), .s(sel[4]), .add(s42), .sub(d42));
  sc_as_pair #(.SUB1(1'b1), .SUB2(1'b1)) u_sub (
    .a1(k1), .b1(k2), .a2(k3), .b2(k4), .s(sel[4]), .y1(y[3]), .y2(y[5]));
  sc_as_pair #(.SUB1(1'b0), .SUB2(1'b1)) u_as9 (
    .a1(s13), .b1(s42), .a2(d13), .b2(d42), .s(sel[5]), .y1(sa), .y2(sd));
  mrf_xnor_xnor_group u_c4b (.p1(sa), .q1(c[4]), .p2(sd), .q2(c[4]), .y_a(y[1]), .y_b(y[7]));
endmodule
