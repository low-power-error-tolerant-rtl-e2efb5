// pcl_or: PCL OR gate, a plain OR followed by the PCL error-tolerant
// structure (pcl_et_unit) that re-selects a robust 1 or robust 0 by the
// gate's own output. Noise-free, z = OR(a, b). Combinational.
// The PCL construction names an OR gate for the PCL multiplexer; building
// it like the PCL NAND is this design's choice.
module pcl_or (
  input  logic a,
  input  logic b,
  output logic z
);
  logic y;
  assign y = a | b;
  pcl_et_unit u_et (.y(y), .z(z));
endmodule
