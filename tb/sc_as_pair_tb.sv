// sc_as_pair_tb: exhaustive self-checking test of sc_as_pair in both of its
// uses: the split-operand AS unit (default, SUB1 = 0, SUB2 = 1) and the
// subtractor pair (SUB1 = SUB2 = 1). For all 32 input combinations each
// output must equal s ? a : b (adder) or s ? a : ~b (subtractor), the bit
// rule of a scaled bipolar add or subtract. A watchdog ends the run with a
// failure if it does not finish in time.
module sc_as_pair_tb;
  logic a1, b1, a2, b2, s;
  logic y1, y2, z1, z2;
  int checks = 0, failures = 0;

  sc_as_pair dut (.a1(a1), .b1(b1), .a2(a2), .b2(b2), .s(s), .y1(y1), .y2(y2));
  sc_as_pair #(.SUB1(1'b1), .SUB2(1'b1)) dut_sub (
    .a1(a1), .b1(b1), .a2(a2), .b2(b2), .s(s), .y1(z1), .y2(z2));

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("mismatch %s: a1 b1 a2 b2 s = %b%b%b%b%b", what, a1, b1, a2, b2, s);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {a1, b1, a2, b2, s} = 5'(v);
      #1;
      chk(y1, s ? a1 : b1,  "split AS unit, adder");
      chk(y2, s ? a2 : ~b2, "split AS unit, subtractor");
      chk(z1, s ? a1 : ~b1, "subtractor pair, first");
      chk(z2, s ? a2 : ~b2, "subtractor pair, second");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
