// cdmr_rca: N-bit ripple-carry adder protected by CDMR.
//
// Two adder chains run side by side: one of true full adders (M) and one of
// inverting full adders (M-bar). CDMR voters (cdmr_voter) combine them.
//   SCHEME = 1: voters only at the final outputs (N sum bits and carry out).
//               The M-bar chain passes its carries to the next stage through
//               an inverter.
//   SCHEME = 2: a voter after every full adder, for its sum and its carry;
//               the voted carry drives the next stage of both chains.
// The document evaluates a 4-bit adder (N = 4) in both schemes. `bypass`
// switches every voter to pass the M outputs through (test mode).
// `hold_count` reports how many voters currently hold because their two
// inputs disagree. Combinational apart from the voters' hold latches.
// Note for synthesis: M and M-bar are logically equivalent, so a flow that
// flattens and optimises the whole adder proves that the voters can never
// disagree, merges the two chains and removes the hold latches, leaving a
// plain adder with hold_count tied to 0. A physical implementation of this
// scheme must keep the two chains and the voters as separate instances
// (hierarchy and don't-touch constraints of the back-end flow).
module cdmr_rca #(
  parameter int N      = 4,
  parameter int SCHEME = 1
) (
  input  logic         [N-1:0] a,
  input  logic         [N-1:0] b,
  input  logic                 cin,
  input  logic                 bypass,
  output logic         [N-1:0] sum,
  output logic                 cout,
  output logic [$clog2(2*N+2)-1:0] hold_count
);
  logic [N-1:0] s_m, s_mn, c_m, c_mn;   // raw module outputs
  logic [N:0]   c_v;                    // voted carries (scheme 2)
  logic [N-1:0] s_hold, c_hold;
  logic [N-1:0] unused_g;

  assign c_v[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    logic cin_m, cin_mn;
    if (SCHEME == 2) begin : g_s2
      assign cin_m  = c_v[i];
      assign cin_mn = c_v[i];
    end else begin : g_s1
      assign cin_m  = (i == 0) ? cin : c_m[i-1];
      assign cin_mn = (i == 0) ? cin : ~c_mn[i-1];
    end

    cdmr_full_adder #(.INVERT(1'b0)) u_m  (.a(a[i]), .b(b[i]), .cin(cin_m),
                                           .s(s_m[i]),  .cout(c_m[i]));
    cdmr_full_adder #(.INVERT(1'b1)) u_mn (.a(a[i]), .b(b[i]), .cin(cin_mn),
                                           .s(s_mn[i]), .cout(c_mn[i]));

    cdmr_voter u_vs (.x_a(s_m[i]), .x_b_n(s_mn[i]), .bypass(bypass),
                     .x_f(sum[i]), .x_g(unused_g[i]), .holding(s_hold[i]));

    if (SCHEME == 2 || i == N-1) begin : g_cv
      logic g_c;
      cdmr_voter u_vc (.x_a(c_m[i]), .x_b_n(c_mn[i]), .bypass(bypass),
                       .x_f(c_v[i+1]), .x_g(g_c), .holding(c_hold[i]));
    end else begin : g_nocv
      assign c_v[i+1]  = c_m[i];
      assign c_hold[i] = 1'b0;
    end
  end

  assign cout = c_v[N];

  always_comb begin
    hold_count = '0;
    for (int i = 0; i < N; i++)
      hold_count = hold_count + ($bits(hold_count))'(s_hold[i]) + ($bits(hold_count))'(c_hold[i]);
  end
endmodule
