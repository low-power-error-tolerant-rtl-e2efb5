// pcl_mux_tb: exhaustive self-checking test of pcl_mux.
// Checks the PCL multiplexer against s ? d1 : d0,
// for all 8 input combinations, one every time unit. A watchdog
// ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module pcl_mux_tb;
  logic d0;
  logic d1;
  logic s;
  logic z, exp_z;
  int checks = 0, failures = 0;
  pcl_mux dut (.d0(d0), .d1(d1), .s(s), .z(z));
  initial begin
    #(64'd10 * 64'd18);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      d0 = 1'(v >> 0);
      d1 = 1'(v >> 1);
      s = 1'(v >> 2);
      #1;
      exp_z = s ? d1 : d0;
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
