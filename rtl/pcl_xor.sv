// pcl_xor: PCL XOR gate, a plain XOR followed by the PCL error-tolerant
// structure (pcl_et_unit) that re-selects a robust 1 or robust 0 by the
// gate's own output. Noise-free, z = XOR(a, b). Combinational.
// The PCL XOR is named but not drawn in the source; building it like the
// PCL NAND, with an XOR core, is this design's choice.
module pcl_xor (
  input  logic a,
  input  logic b,
  output logic z
);
  logic y;
  assign y = a ^ b;
  pcl_et_unit u_et (.y(y), .z(z));
endmodule
