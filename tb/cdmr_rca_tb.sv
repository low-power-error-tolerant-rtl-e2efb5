// cdmr_rca_tb: test of the CDMR 4-bit ripple-carry adder in both schemes.
// 1. All 512 operand combinations (a, b, cin) against a + b + cin, for the
//    Scheme 1 and the Scheme 2 instance, with no voter holding.
// 2. Error injection: with the operands fixed, the raw outputs of one module
//    chain are forced to a corrupted value (one sum bit of M, then one carry
//    of M-bar). The voted result must not change and a voter must report
//    hold. In Scheme 2 a corrupted internal carry is stopped by its voter.
// 3. Bypass: with bypass = 1 the corrupted M sum bit reaches the output.
`timescale 1ns/1ps
module cdmr_rca_tb;
  logic [3:0] a, b, sum1, sum2;
  logic cin, bypass, cout1, cout2;
  logic [3:0] h1, h2;
  logic [4:0] exp_r;
  int checks = 0, failures = 0;

  cdmr_rca #(.N(4), .SCHEME(1)) u1 (.a(a), .b(b), .cin(cin), .bypass(bypass), .sum(sum1), .cout(cout1), .hold_count(h1));
  cdmr_rca #(.N(4), .SCHEME(2)) u2 (.a(a), .b(b), .cin(cin), .bypass(bypass), .sum(sum2), .cout(cout2), .hold_count(h2));

  task automatic expect_eq(input logic [4:0] got, input logic [4:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bypass = 0;
    for (int v = 0; v < 512; v++) begin
      {cin, b, a} = 9'(v); #1;
      exp_r = 5'(a) + 5'(b) + 5'(cin);
      expect_eq({cout1, sum1}, exp_r, "scheme 1");
      expect_eq({cout2, sum2}, exp_r, "scheme 2");
      expect_eq({1'b0, h1}, 5'd0, "scheme 1 idle voters");
      expect_eq({1'b0, h2}, 5'd0, "scheme 2 idle voters");
    end
    // error injection: a = 5, b = 3, cin = 0 -> 8 (carry ripples through)
    a = 4'd5; b = 4'd3; cin = 1'b0; #1;
    exp_r = 5'd8;
    force u1.s_m = 4'b1000 ^ 4'b0100;     // M sum bit 2 upset
    force u2.s_m = 4'b1000 ^ 4'b0100;
    #1;
    expect_eq({cout1, sum1}, exp_r, "scheme 1 M upset");
    expect_eq({cout2, sum2}, exp_r, "scheme 2 M upset");
    expect_eq({1'b0, h1}, 5'd1, "scheme 1 hold on M upset");
    expect_eq({1'b0, h2}, 5'd1, "scheme 2 hold on M upset");
    bypass = 1; #1;
    expect_eq({1'b0, sum1}, 5'b01100, "scheme 1 bypass shows raw M");
    bypass = 0; #1;
    release u1.s_m; release u2.s_m; #1;
    // carry upset in the M-bar chain: true carries of 5+3 are 0111 -> M-bar has 1000
    force u2.c_mn = 4'b1000 ^ 4'b0010;    // carry out of bit 1 of M-bar upset
    #1;
    expect_eq({cout2, sum2}, exp_r, "scheme 2 M-bar carry upset");
    expect_eq({1'b0, h2}, 5'd1, "scheme 2 hold on carry upset");
    release u2.c_mn; #1;
    expect_eq({cout2, sum2}, exp_r, "scheme 2 after release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
