// pcl_mux: 2-to-1 multiplexer from PCL gates, z = s ? d1 : d0.
// As in the document's construction it uses two PCL NAND gates, one inverter
// and a PCL OR gate. The OR takes the complements of the two NAND outputs
// (an OR with inverted inputs), so z = (d1&s) | (d0&~s). Combinational.
// Feeding the OR with the inverted NAND outputs is this design's choice.
module pcl_mux (
  input  logic d0,
  input  logic d1,
  input  logic s,
  output logic z
);
  logic s_n, n1, n0;
  assign s_n = ~s;
  pcl_nand u_n1 (.a(d1), .b(s),   .z(n1));
  pcl_nand u_n0 (.a(d0), .b(s_n), .z(n0));
  pcl_or   u_or (.a(~n1), .b(~n0), .z(z));
endmodule
