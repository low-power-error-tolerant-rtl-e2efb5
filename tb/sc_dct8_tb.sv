// sc_dct8_tb: test of the stochastic DCT core.
// 1. Bit level: 20000 random input vectors (8 input bits, 7 coefficient
//    bits, 6 select bits) against a bit-level model of the butterfly written
//    here from the equations (multiplexer adders, XNOR multipliers).
// 2. Value level: independent random streams with chosen probabilities
//    (inputs random in [-1, 1], coefficients cos(i*pi/16), selects 0.5) run
//    for 16384 clocks; each output's bipolar value must be within 0.06 of
//    the scaled DCT from dct_ref_pkg (about 4 standard deviations).
`timescale 1ns/1ps
module sc_dct8_tb;
  import dct_ref_pkg::*;
  logic [7:0] x, y, e;
  logic [7:1] c;
  logic [5:0] sel;
  int checks = 0, failures = 0;

  sc_dct8 dut (.x(x), .c(c), .sel(sel), .y(y));

  function automatic logic mx(input logic a, input logic b, input logic s); return s ? a : b; endfunction
  function automatic logic ml(input logic a, input logic b); return ~(a ^ b); endfunction

  function automatic logic [7:0] model(input logic [7:0] xi, input logic [7:1] ci, input logic [5:0] si);
    logic p0, m0, p1, m1, p2, m2, p3, m3, p10, m10, p11, m11, p100, m100;
    logic k1, k2, k3, k4, s13, d13, s42, d42;
    logic [7:0] r;
    p0 = mx(xi[0], xi[7], si[0]); m0 = mx(xi[0], ~xi[7], si[0]);
    p1 = mx(xi[3], xi[4], si[0]); m1 = mx(xi[3], ~xi[4], si[0]);
    p2 = mx(xi[1], xi[6], si[0]); m2 = mx(xi[1], ~xi[6], si[0]);
    p3 = mx(xi[2], xi[5], si[0]); m3 = mx(xi[2], ~xi[5], si[0]);
    p10 = mx(p0, p1, si[1]); m10 = mx(p0, ~p1, si[1]);
    p11 = mx(p2, p3, si[1]); m11 = mx(p2, ~p3, si[1]);
    p100 = mx(p10, p11, si[2]); m100 = mx(p10, ~p11, si[2]);
    r[0] = ml(p100, ci[4]); r[4] = ml(m100, ci[4]);
    r[2] = mx(ml(m10, ci[2]), ml(m11, ci[6]), si[3]);
    r[6] = mx(ml(m10, ci[6]), ~ml(m11, ci[2]), si[3]);
    k1 = mx(ml(m0, ci[3]), ~ml(m1, ci[5]), si[3]);
    k3 = mx(ml(m0, ci[5]), ml(m1, ci[3]), si[3]);
    k2 = mx(ml(m2, ci[7]), ml(m3, ci[1]), si[3]);
    k4 = mx(ml(m2, ci[1]), ~ml(m3, ci[7]), si[3]);
    r[3] = mx(k1, ~k2, si[4]); r[5] = mx(k3, ~k4, si[4]);
    s13 = mx(k1, k3, si[4]); d13 = mx(k1, ~k3, si[4]);
    s42 = mx(k4, k2, si[4]); d42 = mx(k4, ~k2, si[4]);
    r[1] = ml(mx(s13, s42, si[5]), ci[4]);
    r[7] = ml(mx(d13, ~d42, si[5]), ci[4]);
    return r;
  endfunction

  function automatic logic bern(input real p);
    return real'($urandom % 1000000) < p * 1000000.0;
  endfunction

  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real xv [8];
    real pc [8];
    int  ones [8];
    real got, want;
    // 1. bit level
    for (int t = 0; t < 20000; t++) begin
      {sel, c, x} = 21'($urandom);
      #1;
      e = model(x, c, sel);
      checks++;
      if (y !== e) begin failures++; if (failures < 10) $display("FAIL bits %h %h %h: %h vs %h", x, c, sel, y, e); end
    end
    // 2. value level, three input vectors
    for (int trial = 0; trial < 3; trial++) begin
      for (int n = 0; n < 8; n++) xv[n] = (real'($urandom % 2001) - 1000.0) / 1000.0;
      for (int i = 1; i < 8; i++) pc[i] = ($cos(i * PI / 16.0) + 1.0) / 2.0;
      for (int k = 0; k < 8; k++) ones[k] = 0;
      for (int t = 0; t < 16384; t++) begin
        for (int n = 0; n < 8; n++) x[n] = bern((xv[n] + 1.0) / 2.0);
        for (int i = 1; i < 8; i++) c[i] = bern(pc[i]);
        for (int j = 0; j < 6; j++) sel[j] = bern(0.5);
        #1;
        for (int k = 0; k < 8; k++) ones[k] += int'(y[k]);
      end
      for (int k = 0; k < 8; k++) begin
        got  = 2.0 * real'(ones[k]) / 16384.0 - 1.0;
        want = dct_scaled(xv, k);
        checks++;
        if (got - want > 0.06 || want - got > 0.06) begin
          failures++; $display("FAIL value trial %0d X%0d: %f vs %f", trial, k, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
