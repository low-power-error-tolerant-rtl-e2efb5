// cpmrf_parity2x4_tb: exhaustive self-checking test of cpmrf_parity2x4.
// Checks the two 4-bit even parity generators: data plus parity must hold an even number of ones,
// for all 256 input combinations, one every time unit. A watchdog
// ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module cpmrf_parity2x4_tb;
  logic [3:0] d_a;
  logic [3:0] d_b;
  logic par_a, exp_par_a;
  logic par_b, exp_par_b;
  int checks = 0, failures = 0;
  cpmrf_parity2x4 dut (.d_a(d_a), .d_b(d_b), .par_a(par_a), .par_b(par_b));
  initial begin
    #(64'd10 * 64'd266);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 256; v++) begin
      d_a = 4'(v >> 0);
      d_b = 4'(v >> 4);
      #1;
      exp_par_a = 1'($countones(d_a) % 2);
      checks++;
      if (par_a !== exp_par_a) begin
        failures++;
        if (failures < 10) $display("mismatch par_a: inputs %0h got %0h expected %0h", v, par_a, exp_par_a);
      end
      exp_par_b = 1'($countones(d_b) % 2);
      checks++;
      if (par_b !== exp_par_b) begin
        failures++;
        if (failures < 10) $display("mismatch par_b: inputs %0h got %0h expected %0h", v, par_b, exp_par_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
