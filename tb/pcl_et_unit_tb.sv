// pcl_et_unit_tb: exhaustive self-checking test of pcl_et_unit.
// Checks the PCL error-tolerant structure: noise-free output equals its input,
// for all 2 input combinations, one every time unit. A watchdog
// ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module pcl_et_unit_tb;
  logic y;
  logic z, exp_z;
  int checks = 0, failures = 0;
  pcl_et_unit dut (.y(y), .z(z));
  initial begin
    #(64'd10 * 64'd12);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 2; v++) begin
      y = 1'(v >> 0);
      #1;
      exp_z = y;
      checks++;
      if (z !== exp_z) begin
        failures++;
        if (failures < 10) $display("mismatch z: inputs %0h got %0h expected %0h", v, z, exp_z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
