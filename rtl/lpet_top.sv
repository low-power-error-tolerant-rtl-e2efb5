// lpet_top: the four low-power error-tolerant designs side by side. They do
// not share signals; each brings out its own ports.
//
//  1. CDMR adder (cdmr_rca): a 4-bit ripple-carry adder protected by
//     complementary dual modular redundancy, instantiated once in Scheme 1
//     (voters at the outputs) and once in Scheme 2 (voters between stages),
//     both on the same operands. Combinational.
//  2. Stochastic 8-point 1D-DCT (sc_dct8_system): clocked; start / busy /
//     done handshake, L + 1 clocks per transform.
//  3. CPMRF circuits: the 8-bit MUX-based carry-lookahead adder of the test
//     chip (cpmrf_cla8), two 4-bit even-parity generators, a 3-to-8 decoder
//     and a stand-alone NOR-NOR group. Combinational.
//  4. PCL gates: a PCL multiplexer and a PCL XOR. Combinational.
module lpet_top (
  // CDMR 4-bit adders
  input  logic [3:0] cdmr_a,
  input  logic [3:0] cdmr_b,
  input  logic       cdmr_cin,
  input  logic       cdmr_bypass,
  output logic [3:0] cdmr_s1_sum,
  output logic       cdmr_s1_cout,
  output logic [3:0] cdmr_s2_sum,
  output logic       cdmr_s2_cout,
  output logic [3:0] cdmr_s1_holds,
  output logic [3:0] cdmr_s2_holds,
  // stochastic DCT
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dct_start,
  input  logic signed [7:0] dct_x [8],
  output logic              dct_busy,
  output logic              dct_done,
  output logic signed [9:0] dct_y [8],
  // CPMRF circuits
  input  logic [7:0] cla_a,
  input  logic [7:0] cla_b,
  output logic [7:0] cla_s,
  output logic       cla_c,
  input  logic [3:0] par_da,
  input  logic [3:0] par_db,
  output logic       par_a,
  output logic       par_b,
  input  logic [2:0] dec_a,
  input  logic       dec_en,
  output logic [7:0] dec_d,
  input  logic [3:0] nn_in,
  output logic [1:0] nn_nor,
  // PCL gates
  input  logic       pcl_d0,
  input  logic       pcl_d1,
  input  logic       pcl_s,
  output logic       pcl_mux_z,
  output logic       pcl_xor_z
);
  cdmr_rca #(.N(4), .SCHEME(1)) u_rca_s1 (
    .a(cdmr_a), .b(cdmr_b), .cin(cdmr_cin), .bypass(cdmr_bypass),
    .sum(cdmr_s1_sum), .cout(cdmr_s1_cout), .hold_count(cdmr_s1_holds));
  cdmr_rca #(.N(4), .SCHEME(2)) u_rca_s2 (
    .a(cdmr_a), .b(cdmr_b), .cin(cdmr_cin), .bypass(cdmr_bypass),
    .sum(cdmr_s2_sum), .cout(cdmr_s2_cout), .hold_count(cdmr_s2_holds));

  sc_dct8_system #(.W(8), .L(256)) u_dct (
    .clk(clk), .rst_n(rst_n), .start(dct_start), .x(dct_x),
    .busy(dct_busy), .done(dct_done), .y(dct_y));

  cpmrf_cla8 #(.N(8)) u_cla (.i_a(cla_a), .i_b(cla_b), .o_s(cla_s), .o_c(cla_c));
  cpmrf_parity2x4 u_par (.d_a(par_da), .d_b(par_db), .par_a(par_a), .par_b(par_b));
  cpmrf_decoder3to8 u_dec (.a(dec_a), .en(dec_en), .d(dec_d));
  cpmrf_nor_nor u_nn (.a1(nn_in[0]), .b1(nn_in[1]), .a2(nn_in[2]), .b2(nn_in[3]),
                      .y1(nn_nor[0]), .y2(nn_nor[1]));

  pcl_mux u_pmux (.d0(pcl_d0), .d1(pcl_d1), .s(pcl_s), .z(pcl_mux_z));
  pcl_xor u_pxor (.a(pcl_d0), .b(pcl_d1), .z(pcl_xor_z));
endmodule
