// mrf_nand_latch: the cross-coupled NAND pair that forms the second-stage
// feedback of the MRF voter and of the complementary CPMRF gate groups.
//
//   y1 = ~(s1 & y2)      y2 = ~(s2 & y1)
//
// A real circuit closes this as a loop. Here the loop is written without a
// combinational cycle: when either input is 0 the outputs follow directly
// (s1=0 -> y1=1, y2=~s2; s1=1,s2=0 -> y1=0, y2=1), and when both inputs are 1
// the pair holds its last state, kept in a level-sensitive latch (q = y1).
// The latch is therefore intended: it is the state-holding "hold" mode of the
// feedback network, not an inferred accident. On release from s1=s2=0 (both
// outputs 1) straight to s1=s2=1 a real pair races; this model keeps y1=1.
// Purely combinational apart from that latch; no clock.
module mrf_nand_latch (
  input  logic s1,
  input  logic s2,
  output logic y1,
  output logic y2,
  output logic holding   // 1 while both inputs are 1 and the pair holds
);
  logic q;

  assign holding = s1 & s2;

  always_latch begin
    if (!holding) q = ~s1;
  end

  assign y1 = holding ? q  : ~s1;
  assign y2 = holding ? ~q : ~s2;
endmodule
