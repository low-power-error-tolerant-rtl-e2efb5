// cpmrf_decoder3to8_tb: exhaustive self-checking test of cpmrf_decoder3to8.
// Checks the 3-to-8 decoder against a one-hot shift,
// for all 16 input combinations, one every time unit. A watchdog
// ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module cpmrf_decoder3to8_tb;
  logic [2:0] a;
  logic en;
  logic [7:0] d, exp_d;
  int checks = 0, failures = 0;
  cpmrf_decoder3to8 dut (.a(a), .en(en), .d(d));
  initial begin
    #(64'd10 * 64'd26);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 16; v++) begin
      a = 3'(v >> 0);
      en = 1'(v >> 3);
      #1;
      exp_d = en ? (8'd1 << a) : 8'd0;
      checks++;
      if (d !== exp_d) begin
        failures++;
        if (failures < 10) $display("mismatch d: inputs %0h got %0h expected %0h", v, d, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
