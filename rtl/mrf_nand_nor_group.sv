// mrf_nand_nor_group: a NAND gate and a NOR gate that share one MRF network,
// the building block of the stochastic scaled adder (multiplexer).
//   t1 = ~(a & s)       (NAND, strong in 1, weak in 0)
//   t2 = ~(b | s)       (NOR,  strong in 0, weak in 1)
// The two outputs share the select input s, so only three of the four
// (t1, t2) patterns are valid: 11, 10 and 00 (t2 = 1 forces t1 = 1). The
// shared network uses each gate as a second witness for the other, picking
// for every output the gate kind that is strong in that output's weak value:
//   y1 = t1 | t2        an OR makes the NAND's weak 0 need both to be 0
//   y2 = t1 & t2        an AND makes the NOR's weak 1 need both to be 1
// so a lone upset of t1 to 0 or of t2 to 1 (the invalid pattern 01) leaves
// both outputs unchanged. Noise-free, y1 = t1 and y2 = t2.
// The valid-state table and the pairing follow the document; its schematic
// is not reproduced, so this two-gate network is this design's reading of
// the compatibility function. Combinational.
module mrf_nand_nor_group (
  input  logic a,
  input  logic b,
  input  logic s,
  output logic y1,
  output logic y2
);
  logic t1, t2;
  assign t1 = ~(a & s);
  assign t2 = ~(b | s);
  assign y1 = t1 | t2;
  assign y2 = t1 & t2;
endmodule
