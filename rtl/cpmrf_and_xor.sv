// cpmrf_and_xor: CPMRF AND-XOR gate pair, a half adder with one shared MRF
// network. It uses the same cross-coupled NAND feedback as cpmrf_and_nor
// with a different coding unit:
//   t1 = a & b (carry),  t2 = a ^ b (sum)
//   tc1 = t1 & ~t2,  tc2 = t2 & ~t1         coding gates
//   y1 = ~(tc1 & y2),  y2 = ~(tc2 & y1)     feedback pair
//   carry = ~y1,  sum = ~y2,  sum_n = y2
// The network also gives the XNOR (sum_n) for free, as the design notes
// that a CPMRF network can produce functions beyond those of its input
// gates. The coding gates are this design's own choice: the document names
// the group and its function but its schematic is not reproduced.
// Combinational.
module cpmrf_and_xor (
  input  logic a,
  input  logic b,
  output logic carry,
  output logic sum,
  output logic sum_n
);
  logic t1, t2, tc1, tc2, y1, y2, hold;

  assign t1  = a & b;
  assign t2  = a ^ b;
  assign tc1 = t1 & ~t2;
  assign tc2 = t2 & ~t1;

  mrf_nand_latch u_fb (.s1(tc1), .s2(tc2), .y1(y1), .y2(y2), .holding(hold));

  assign carry = ~y1;
  assign sum   = ~y2;
  assign sum_n = y2;
endmodule
