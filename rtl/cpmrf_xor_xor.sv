// cpmrf_xor_xor: CPMRF group of two XOR gates. XOR is symmetric: its 0s and
// 1s are equally weak, so each output gets both kinds of support from a
// shared coding pair: an OR of the two XORs backs the 0s through an AND, and
// an AND of the two backs the 1s through an OR.
//   t1 = a1 ^ b1,  t2 = a2 ^ b2
//   tc_or = t1 | t2,  tc_and = t1 & t2
//   y1 = (t1 & tc_or) | (t1 & tc_and),  likewise y2
// The document gives this pair's function only; the coding is this
// design's choice. Noise-free, y1 and y2 are the two XORs. Combinational.
module cpmrf_xor_xor (
  input  logic a1,
  input  logic b1,
  input  logic a2,
  input  logic b2,
  output logic y1,
  output logic y2
);
  logic t1, t2, tc_or, tc_and;
  assign t1     = a1 ^ b1;
  assign t2     = a2 ^ b2;
  assign tc_or  = t1 | t2;
  assign tc_and = t1 & t2;
  assign y1 = (t1 & tc_or) | (tc_and & t1);
  assign y2 = (t2 & tc_or) | (tc_and & t2);
endmodule
