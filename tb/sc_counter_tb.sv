// sc_counter_tb: random stream bits, enables and clears against a reference
// count kept in the testbench, checked every clock; plus wrap-free counting
// of a full 256-cycle stream of ones.
`timescale 1ns/1ps
module sc_counter_tb;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, bit_i = 0;
  logic [8:0] count;
  int ref_count = 0, checks = 0, failures = 0;

  sc_counter #(.CW(9)) dut (.clk(clk), .rst_n(rst_n), .clear(clear), .en(en), .bit_i(bit_i), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks++;
      if (count !== 9'(ref_count)) begin failures++; $display("FAIL t=%0d %0d vs %0d", t, count, ref_count); end
      clear = ($urandom % 97) == 0;
      en    = ($urandom % 4) != 0;
      bit_i = 1'($urandom);
      if (clear) ref_count = 0;
      else if (en && bit_i) ref_count = (ref_count + 1) % 512;
    end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0; en = 1; bit_i = 1;
    repeat (256) @(negedge clk);
    en = 0;
    checks++;
    if (count !== 9'd256) begin failures++; $display("FAIL full stream %0d", count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
