// cpmrf_cla8: 8-bit MUX-based tree carry-lookahead adder built from CPMRF gate
// groups, the circuit of the fabricated test chip (pins I_A[7:0], I_B[7:0],
// O_S[7:0], O_C; no carry input).
//
// Bit level: a CPMRF AND-XOR half adder gives generate g = a&b and
// propagate p = a^b, which are never 1 together. Carry tree: a Kogge-Stone
// prefix tree of log2(N) levels whose nodes are CPMRF MUX-AND blocks,
//   G = P_hi ? G_lo : G_hi     P = P_hi & P_lo,
// which equals G_hi | P_hi&G_lo because g and p exclusive. Sum: s_i = p_i ^
// c_i with c_i = G[i-1:0], computed by CPMRF XOR-XOR pairs; O_C = G[N-1:0].
// The document names the adder, its MUX-AND carry blocks and the gate groups
// used; the prefix topology (Kogge-Stone) is this design's choice. Combinational.
module cpmrf_cla8 #(
  parameter int N = 8          // must be a power of two
) (
  input  logic [N-1:0] i_a,
  input  logic [N-1:0] i_b,
  output logic [N-1:0] o_s,
  output logic         o_c
);
  localparam int LV = $clog2(N);

  logic [N-1:0] g [LV+1];
  logic [N-1:0] p [LV+1];
  logic [N-1:0] p0;
  logic [N-1:0] xn_unused;
  logic [N:0]   c;

  for (genvar i = 0; i < N; i++) begin : g_ha
    cpmrf_and_xor u_ha (.a(i_a[i]), .b(i_b[i]), .carry(g[0][i]), .sum(p[0][i]), .sum_n(xn_unused[i]));
  end
  assign p0 = p[0];

  for (genvar l = 0; l < LV; l++) begin : g_lv
    localparam int D = 1 << l;
    for (genvar i = 0; i < N; i++) begin : g_node
      if (i >= D) begin : g_op
        cpmrf_mux_and u_ma (.x_a(g[l][i-D]), .x_b(g[l][i]), .x_s(p[l][i]),
                            .p_a(p[l][i]), .p_b(p[l][i-D]),
                            .y_mux(g[l+1][i]), .y_and(p[l+1][i]));
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  assign c[0] = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g_c
    assign c[i+1] = g[LV][i];
  end

  for (genvar i = 0; i < N; i += 2) begin : g_sum
    cpmrf_xor_xor u_x (.a1(p0[i]), .b1(c[i]), .a2(p0[i+1]), .b2(c[i+1]),
                       .y1(o_s[i]), .y2(o_s[i+1]));
  end
  assign o_c = c[N];
endmodule
