// cpmrf_mux_and_tb: exhaustive self-checking test of cpmrf_mux_and.
// Checks the MUX-AND block against a multiplexer and an AND,
// for all 32 input combinations, one every time unit. A watchdog
// ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module cpmrf_mux_and_tb;
  logic x_a;
  logic x_b;
  logic x_s;
  logic p_a;
  logic p_b;
  logic y_mux, exp_y_mux;
  logic y_and, exp_y_and;
  int checks = 0, failures = 0;
  cpmrf_mux_and dut (.x_a(x_a), .x_b(x_b), .x_s(x_s), .p_a(p_a), .p_b(p_b), .y_mux(y_mux), .y_and(y_and));
  initial begin
    #(64'd10 * 64'd42);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 32; v++) begin
      x_a = 1'(v >> 0);
      x_b = 1'(v >> 1);
      x_s = 1'(v >> 2);
      p_a = 1'(v >> 3);
      p_b = 1'(v >> 4);
      #1;
      exp_y_mux = x_s ? x_a : x_b;
      checks++;
      if (y_mux !== exp_y_mux) begin
        failures++;
        if (failures < 10) $display("mismatch y_mux: inputs %0h got %0h expected %0h", v, y_mux, exp_y_mux);
      end
      exp_y_and = p_a & p_b;
      checks++;
      if (y_and !== exp_y_and) begin
        failures++;
        if (failures < 10) $display("mismatch y_and: inputs %0h got %0h expected %0h", v, y_and, exp_y_and);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
