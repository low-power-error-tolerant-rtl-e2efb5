// pcl_et_unit: the error-tolerant structure of a probabilistic-based
// complementary logic (PCL) gate.
// The (noisy) result y of a logic operation and its inverse drive a NAND and
// a NOR. With complementary inputs a NAND can only give 1 and a NOR only 0,
// and both gates are at their most reliable there: the NAND supplies a
// robust 1 and the NOR a robust 0. A multiplexer selected by y passes the
// robust 1 when y is 1 and the robust 0 when y is 0. Noise-free, the output
// equals y. Combinational: inverter, NAND, NOR and MUX, as in the design.
module pcl_et_unit (
  input  logic y,
  output logic z
);
  logic y_n, r1, r0;
  assign y_n = ~y;
  assign r1  = ~(y & y_n);   // robust "1"
  assign r0  = ~(y | y_n);   // robust "0"
  assign z   = y ? r1 : r0;
endmodule
