// cdmr_full_adder: the module M of the CDMR ripple-carry adder, a one-bit
// full adder, or, with INVERT = 1, its inverting twin M-bar, which returns
// the complements of sum and carry. CDMR needs one module of each kind so
// that the voter sees complementary signals. Combinational.
// The pairing of a true and an inverting module follows the CDMR scheme; a
// full adder with inverted outputs as M-bar is this design's reading of it.
module cdmr_full_adder #(
  parameter bit INVERT = 1'b0
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic s_t, c_t;
  assign s_t  = a ^ b ^ cin;
  assign c_t  = (a & b) | (cin & (a ^ b));
  assign s    = INVERT ? ~s_t : s_t;
  assign cout = INVERT ? ~c_t : c_t;
endmodule
