// pcl_nand_tb: exhaustive self-checking test of pcl_nand.
// Checks the PCL NAND against NAND,
// for all 4 input combinations, one every time unit. A watchdog
// ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module pcl_nand_tb;
  logic a;
  logic b;
  logic z, exp_z;
  int checks = 0, failures = 0;
  pcl_nand dut (.a(a), .b(b), .z(z));
  initial begin
    #(64'd10 * 64'd14);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 4; v++) begin
      a = 1'(v >> 0);
      b = 1'(v >> 1);
      #1;
      exp_z = ~(a & b);
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
