// cdmr_voter_tb: self-checking test of the two-stage CDMR voter.
// 1. Agreement: x_a = v, x_b_n = ~v passes v (and ~v on x_g) for v = 0, 1.
// 2. Single errors: from each agreed value, an upset of either module (x_a
//    flipped, or x_b_n flipped) must leave x_f at the last agreed value and
//    raise `holding`; removing the upset restores pass mode.
// 3. The bit stream of the document's example: x_a = 0 for bits 0..4 and 1
//    for bits 5..9, with upsets in the M path at bits 7 and 9 and in the
//    M-bar path at bits 1 and 2; every output bit must be correct.
// 4. Bypass: with bypass = 1 the raw module outputs appear at x_f / x_g,
//    upsets included.
`timescale 1ns/1ps
module cdmr_voter_tb;
  logic x_a, x_b_n, bypass, x_f, x_g, holding;
  int checks = 0, failures = 0, holds_seen = 0;

  cdmr_voter dut (.x_a(x_a), .x_b_n(x_b_n), .bypass(bypass), .x_f(x_f), .x_g(x_g), .holding(holding));

  task automatic check(input logic exp_f, input logic exp_g, input logic exp_hold, input string what);
    checks++;
    if (x_f !== exp_f || x_g !== exp_g || holding !== exp_hold) begin
      failures++;
      $display("FAIL %s: x_a=%b x_b_n=%b -> x_f=%b x_g=%b hold=%b (exp %b %b %b)",
               what, x_a, x_b_n, x_f, x_g, holding, exp_f, exp_g, exp_hold);
    end
    if (holding) holds_seen++;
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] stream, err_m, err_mn;
    bypass = 0;
    for (int v = 0; v < 2; v++) begin
      x_a = 1'(v); x_b_n = ~1'(v); #1;
      check(1'(v), ~1'(v), 1'b0, "agree");
      x_a = ~1'(v); #1;                       // upset in M
      check(1'(v), ~1'(v), 1'b1, "upset M");
      x_a = 1'(v); #1;
      check(1'(v), ~1'(v), 1'b0, "recover M");
      x_b_n = 1'(v); #1;                      // upset in M-bar
      check(1'(v), ~1'(v), 1'b1, "upset M-bar");
      x_b_n = ~1'(v); #1;
      check(1'(v), ~1'(v), 1'b0, "recover M-bar");
    end
    // bit stream with upsets
    stream = 10'b11111_00000;
    err_m  = 10'b10_1000_0000;   // bits 7 and 9 of the M path
    err_mn = 10'b00_0000_0110;   // bits 1 and 2 of the M-bar path
    for (int i = 0; i < 10; i++) begin
      x_a   = stream[i] ^ err_m[i];
      x_b_n = ~stream[i] ^ err_mn[i];
      #1;
      check(stream[i], ~stream[i], err_m[i] | err_mn[i], "stream");
    end
    // bypass
    bypass = 1;
    x_a = 1; x_b_n = 1; #1;
    checks++; if (x_f !== 1'b1 || x_g !== 1'b1) begin failures++; $display("FAIL bypass"); end
    x_a = 0; x_b_n = 0; #1;
    checks++; if (x_f !== 1'b0 || x_g !== 1'b0) begin failures++; $display("FAIL bypass 2"); end
    checks++; if (holds_seen < 8) begin failures++; $display("FAIL hold mode seen only %0d times", holds_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
