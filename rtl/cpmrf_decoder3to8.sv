// cpmrf_decoder3to8: 3-line to 8-line decoder from CPMRF gate groups.
// Two AND-NOR groups predecode the low address bits: on (a1, a0) they give
// p3 = a1&a0 and p0 = ~a1&~a0; on (a1, ~a0) they give p2 = a1&~a0 and
// p1 = ~a1&a0. Four NAND-NAND groups then combine each pk with a2 and ~a2,
// and inverters give the active-high lines d[k+4] = pk&a2, d[k] = pk&~a2.
// `en` gates a2's two polarities, so all lines are 0 while en = 0.
// The document gives the decoder as an example of the method without
// listing its gates; the enable input and this grouping are this design's own. Combinational.
module cpmrf_decoder3to8 (
  input  logic [2:0] a,
  input  logic       en,
  output logic [7:0] d
);
  logic [3:0] p;
  logic       hi, lo;

  cpmrf_and_nor u_p30 (.in_a(a[1]), .in_b(a[0]),  .out_and(p[3]), .out_nor(p[0]));
  cpmrf_and_nor u_p21 (.in_a(a[1]), .in_b(~a[0]), .out_and(p[2]), .out_nor(p[1]));

  assign hi = en & a[2];
  assign lo = en & ~a[2];

  for (genvar k = 0; k < 4; k++) begin : g_out
    logic n_hi, n_lo;
    cpmrf_nand_nand u_nn (.a1(p[k]), .b1(hi), .a2(p[k]), .b2(lo), .y1(n_hi), .y2(n_lo));
    assign d[k+4] = ~n_hi;
    assign d[k]   = ~n_lo;
  end
endmodule
