// pcl_nand: PCL NAND gate, a plain NAND followed by the PCL error-tolerant
// structure (pcl_et_unit) that re-selects a robust 1 or robust 0 by the
// gate's own output. Noise-free, z = NAND(a, b). Combinational.
// The gate-plus-structure form is the published PCL NAND; in two-state logic
// the structure is transparent, its value is electrical noise margin.
module pcl_nand (
  input  logic a,
  input  logic b,
  output logic z
);
  logic y;
  assign y = ~(a & b);
  pcl_et_unit u_et (.y(y), .z(z));
endmodule
