// sc_sng_tb: test of the stochastic number generator.
// Over one full LFSR period (65535 clocks) every non-zero 16-bit state
// occurs once, so the top byte takes each value 1..255 256 times and the
// value 0 255 times. A threshold v >= 1 must therefore give exactly
// 256*v - 1 ones per period (0 for v = 0). The test also checks that the
// LFSR is back at its seed after one period, that it is never zero, and that
// `load` restarts the same sequence.
`timescale 1ns/1ps
module sc_sng_tb;
  localparam logic [15:0] SEED = 16'h52E7;
  logic clk = 0, rst_n = 0, load = 0, en = 0, bit_o;
  logic [7:0] value;
  int checks = 0, failures = 0;
  int ones;
  logic [31:0] first_bits, again_bits;
  int vals [5] = '{0, 1, 128, 200, 255};

  sc_sng #(.W(8), .SEED(SEED)) dut (.clk(clk), .rst_n(rst_n), .load(load), .en(en), .value(value), .bit_o(bit_o));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    value = 8'd0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (vals[i]) begin
      value = 8'(vals[i]);
      ones = 0;
      en = 1;
      for (int t = 0; t < 65535; t++) begin
        @(negedge clk);
        ones += int'(bit_o);
        if (dut.lfsr == 16'h0) begin failures++; $display("FAIL zero state"); end
      end
      en = 0;
      @(negedge clk);
      checks++;
      if (ones != ((vals[i] == 0) ? 0 : 256 * vals[i] - 1)) begin
        failures++; $display("FAIL value %0d: %0d ones", vals[i], ones);
      end
      checks++;
      if (dut.lfsr !== SEED) begin failures++; $display("FAIL period: state %h", dut.lfsr); end
    end
    // load restarts the sequence
    value = 8'd128; en = 1;
    for (int t = 0; t < 32; t++) begin @(negedge clk); first_bits[t] = bit_o; end
    load = 1; @(negedge clk); load = 0;
    for (int t = 0; t < 32; t++) begin @(negedge clk); again_bits[t] = bit_o; end
    checks++;
    if (first_bits !== again_bits) begin failures++; $display("FAIL load %h %h", first_bits, again_bits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
