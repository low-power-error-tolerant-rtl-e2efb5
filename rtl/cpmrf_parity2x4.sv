// cpmrf_parity2x4: two 4-bit even-parity generators built from three CPMRF
// XOR-XOR groups. The first two groups pair the same XOR of both generators
// (bits 1:0 of each word, then bits 3:2); the third pair forms the two
// parity bits. A parity bit is the XOR of its four data bits, so that data
// and parity together hold an even number of ones. Combinational.
// The three-group structure follows the source; which gate pairs with
// which is this design's reading.
module cpmrf_parity2x4 (
  input  logic [3:0] d_a,
  input  logic [3:0] d_b,
  output logic       par_a,
  output logic       par_b
);
  logic xa_lo, xb_lo, xa_hi, xb_hi;
  cpmrf_xor_xor u_g12 (.a1(d_a[0]), .b1(d_a[1]), .a2(d_b[0]), .b2(d_b[1]), .y1(xa_lo), .y2(xb_lo));
  cpmrf_xor_xor u_g34 (.a1(d_a[2]), .b1(d_a[3]), .a2(d_b[2]), .b2(d_b[3]), .y1(xa_hi), .y2(xb_hi));
  cpmrf_xor_xor u_g56 (.a1(xa_lo),  .b1(xa_hi),  .a2(xb_lo),  .b2(xb_hi),  .y1(par_a), .y2(par_b));
endmodule
