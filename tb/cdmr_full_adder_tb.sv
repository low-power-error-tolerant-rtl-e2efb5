// cdmr_full_adder_tb: exhaustive test of the CDMR full-adder module M
// (INVERT = 0) and its inverting twin M-bar (INVERT = 1) against a + b + cin.
`timescale 1ns/1ps
module cdmr_full_adder_tb;
  logic a, b, cin, s0, c0, s1, c1;
  logic [1:0] exp_sum;
  int checks = 0, failures = 0;

  cdmr_full_adder #(.INVERT(1'b0)) u_m  (.a(a), .b(b), .cin(cin), .s(s0), .cout(c0));
  cdmr_full_adder #(.INVERT(1'b1)) u_mn (.a(a), .b(b), .cin(cin), .s(s1), .cout(c1));

  initial begin
    #1000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v); #1;
      exp_sum = 2'(a) + 2'(b) + 2'(cin);
      checks += 2;
      if ({c0, s0} !== exp_sum)  begin failures++; $display("FAIL M %0d", v); end
      if ({c1, s1} !== ~exp_sum) begin failures++; $display("FAIL M-bar %0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
