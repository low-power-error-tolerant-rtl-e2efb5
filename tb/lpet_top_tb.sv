// lpet_top_tb: end-to-end test of the whole design at its default sizes.
// The four designs are driven at the same time:
//  - CDMR adders: random operands for both schemes; every 50th vector an
//    upset is forced onto one sum bit of module M (Scheme 1) and onto one
//    internal carry of M-bar (Scheme 2) -- the voted results must stay
//    correct while the voters report hold -- and every 40th vector runs in
//    bypass mode, where the raw module outputs appear.
//  - Stochastic DCT: four complete transforms (start / done, L + 1 clocks
//    each) compared with the floating-point scaled DCT (tolerance 0.25); in
//    the third, a second start pulse mid-run must not change the timing.
//  - CPMRF circuits: 8-bit carry-lookahead adder, parity generators,
//    decoder (enabled and disabled) and NOR-NOR group, with random inputs.
//  - PCL multiplexer and XOR.
// Each mechanism is counted and must have happened at least once.
module lpet_top_tb;
  import dct_ref_pkg::*;
  logic [3:0] cdmr_a, cdmr_b, s1_sum, s2_sum, s1_h, s2_h;
  logic cdmr_cin, cdmr_bypass, s1_cout, s2_cout;
  logic clk = 0, rst_n = 0, dct_start = 0, dct_busy, dct_done;
  logic signed [7:0] dct_x [8];
  logic signed [9:0] dct_y [8];
  logic [7:0] cla_a, cla_b, cla_s, dec_d;
  logic cla_c, par_a, par_b, dec_en, pcl_d0, pcl_d1, pcl_s, pcl_mux_z, pcl_xor_z;
  logic [3:0] par_da, par_db, nn_in;
  logic [2:0] dec_a;
  logic [1:0] nn_nor;
  int checks = 0, failures = 0;
  int n_add_s1 = 0, n_add_s2 = 0, n_hold = 0, n_bypass = 0, n_dct = 0, n_cla_carry = 0,
      n_dec_on = 0, n_dec_off = 0, n_pcl_s1 = 0, n_pcl_s0 = 0, n_start_ignored = 0;

  lpet_top dut (
    .cdmr_a(cdmr_a), .cdmr_b(cdmr_b), .cdmr_cin(cdmr_cin), .cdmr_bypass(cdmr_bypass),
    .cdmr_s1_sum(s1_sum), .cdmr_s1_cout(s1_cout), .cdmr_s2_sum(s2_sum), .cdmr_s2_cout(s2_cout),
    .cdmr_s1_holds(s1_h), .cdmr_s2_holds(s2_h),
    .clk(clk), .rst_n(rst_n), .dct_start(dct_start), .dct_x(dct_x),
    .dct_busy(dct_busy), .dct_done(dct_done), .dct_y(dct_y),
    .cla_a(cla_a), .cla_b(cla_b), .cla_s(cla_s), .cla_c(cla_c),
    .par_da(par_da), .par_db(par_db), .par_a(par_a), .par_b(par_b),
    .dec_a(dec_a), .dec_en(dec_en), .dec_d(dec_d), .nn_in(nn_in), .nn_nor(nn_nor),
    .pcl_d0(pcl_d0), .pcl_d1(pcl_d1), .pcl_s(pcl_s), .pcl_mux_z(pcl_mux_z), .pcl_xor_z(pcl_xor_z));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // combinational designs, one vector per clock while the DCT runs
  task automatic comb_vector(input int t);
    logic [4:0] r;
    logic [3:0] true_s, true_c;
    logic [8:0] cr;
    {cdmr_cin, cdmr_b, cdmr_a} = 9'($urandom);
    cdmr_bypass = 1'b0;
    {cla_a, cla_b} = 16'($urandom);
    {par_da, par_db} = 8'($urandom);
    {dec_en, dec_a} = 4'($urandom);
    nn_in = 4'($urandom);
    {pcl_d0, pcl_d1, pcl_s} = 3'($urandom);
    #1;
    r = 5'(cdmr_a) + 5'(cdmr_b) + 5'(cdmr_cin);
    chk({s1_cout, s1_sum} == r, "cdmr scheme 1 sum"); n_add_s1++;
    chk({s2_cout, s2_sum} == r, "cdmr scheme 2 sum"); n_add_s2++;
    if (t % 50 == 7) begin
      // upsets: one M sum bit in Scheme 1, one M-bar carry in Scheme 2
      true_s = r[3:0];
      for (int i = 0; i < 4; i++) begin
        logic [4:0] m;
        m = 5'((5'd1 << (i + 1)) - 1);
        true_c[i] = 1'(((5'(cdmr_a) & m) + (5'(cdmr_b) & m) + 5'(cdmr_cin)) >> (i + 1));
      end
      force dut.u_rca_s1.s_m  = true_s ^ 4'b0100;
      force dut.u_rca_s2.c_mn = ~true_c ^ 4'b0001;
      #1;
      chk({s1_cout, s1_sum} == r, "cdmr scheme 1 under upset");
      chk({s2_cout, s2_sum} == r, "cdmr scheme 2 under upset");
      chk(s1_h == 4'd1 && s2_h == 4'd1, "voters hold under upset");
      if (s1_h != 0 && s2_h != 0) n_hold++;
      release dut.u_rca_s1.s_m;
      release dut.u_rca_s2.c_mn;
      #1;
    end
    if (t % 40 == 3) begin
      cdmr_bypass = 1'b1; #1;
      chk({s1_cout, s1_sum} == r, "cdmr bypass (clean modules)");
      n_bypass++;
      cdmr_bypass = 1'b0;
    end
    cr = 9'(cla_a) + 9'(cla_b);
    chk({cla_c, cla_s} == cr, "cla8 sum");
    if (cla_c) n_cla_carry++;
    chk(par_a == ^par_da && par_b == ^par_db, "parity");
    chk(dec_d == (dec_en ? 8'(8'd1 << dec_a) : 8'd0), "decoder");
    if (dec_en) n_dec_on++; else n_dec_off++;
    chk(nn_nor == {~(nn_in[2] | nn_in[3]), ~(nn_in[0] | nn_in[1])}, "nor-nor");
    chk(pcl_mux_z == (pcl_s ? pcl_d1 : pcl_d0), "pcl mux");
    chk(pcl_xor_z == (pcl_d0 ^ pcl_d1), "pcl xor");
    if (pcl_s) n_pcl_s1++; else n_pcl_s0++;
  endtask

  initial begin
    real xv [8];
    real got, want;
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      for (int n = 0; n < 8; n++) begin
        dct_x[n] = (run == 0) ? 8'sd64 : 8'($urandom);
        xv[n] = real'(dct_x[n]) / 128.0;
      end
      @(negedge clk); dct_start = 1; @(negedge clk); dct_start = 0;
      lat = 1;
      while (!dct_done) begin
        // a second start in the middle of a run must be ignored
        dct_start = (run == 2 && lat == 100);
        if (dct_start) n_start_ignored++;
        comb_vector(lat + 300 * run);
        @(negedge clk); lat++;
      end
      dct_start = 0;
      chk(lat == 257, "dct latency L + 1");
      for (int k = 0; k < 8; k++) begin
        got = real'(dct_y[k]) / 256.0;
        want = dct_scaled(xv, k);
        chk((got - want) < 0.25 && (want - got) < 0.25, "dct value");
      end
      n_dct++;
    end
    chk(n_add_s1 > 0, "mechanism: scheme 1 addition");
    chk(n_add_s2 > 0, "mechanism: scheme 2 addition");
    chk(n_hold > 0, "mechanism: voter hold on upset");
    chk(n_bypass > 0, "mechanism: voter bypass");
    chk(n_dct > 0, "mechanism: DCT transform");
    chk(n_start_ignored > 0, "mechanism: start ignored while busy");
    chk(n_cla_carry > 0, "mechanism: CLA carry out");
    chk(n_dec_on > 0 && n_dec_off > 0, "mechanism: decoder enable / disable");
    chk(n_pcl_s1 > 0 && n_pcl_s0 > 0, "mechanism: PCL mux both selects");
    $display("scheme1 %0d scheme2 %0d holds %0d bypass %0d dct %0d start-ignored %0d cla_carry %0d dec %0d/%0d",
             n_add_s1, n_add_s2, n_hold, n_bypass, n_dct, n_start_ignored, n_cla_carry, n_dec_on, n_dec_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
