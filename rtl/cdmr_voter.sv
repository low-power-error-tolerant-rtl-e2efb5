// cdmr_voter: two-stage voter of complementary dual modular redundancy (CDMR).
//
// CDMR runs two copies of a module: M, which produces a bit x_a, and an
// inverting twin M-bar, which produces the complement x_b_n of the same bit.
// Stage 1 is a pair of NAND gates that map the two product terms of the
// clique energy -M*M*y - ~M*~M*~y:
//   x_d = ~(x_a & x_b)         (x_b = ~x_b_n, through an inverter)
//   x_e = ~(~x_a & x_b_n)
// A NAND output is robust in "1", so an upset in one module can only raise
// x_d or x_e to 1. Stage 2 is a cross-coupled NAND pair (mrf_nand_latch) fed
// by x_d and x_e: (1,0) passes 0, (0,1) passes 1, and (1,1) -- the two modules
// disagree -- holds the last agreed value. x_d = x_e = 0 needs both modules to
// say 1 and 0 at once and cannot come from stage 1.
// The outputs are x_f (the voted bit) and x_g (its complement). Two bypass
// multiplexers after stage 2 select the raw module outputs instead when
// `bypass` is 1, so the modules can be tested with the voter omitted.
// The two-stage structure (stable-bit first stage, feedback hold second
// stage) and the bypass multiplexers follow the published design; the exact
// gate wiring of stage 1 given above is this design's own reading of it.
// Combinational except for the hold latch; no clock.
module cdmr_voter (
  input  logic x_a,      // output of module M
  input  logic x_b_n,    // output of the inverting module M-bar
  input  logic bypass,   // test: 1 = pass x_a / x_b_n straight through
  output logic x_f,      // voted output
  output logic x_g,      // complement of the voted output
  output logic holding   // the two modules disagree; stage 2 holds
);
  logic x_b, x_a_n, x_d, x_e, y_f, y_g;

  // stage 1
  assign x_b   = ~x_b_n;
  assign x_a_n = ~x_a;
  assign x_d   = ~(x_a & x_b);
  assign x_e   = ~(x_a_n & x_b_n);

  // stage 2
  mrf_nand_latch u_stage2 (.s1(x_d), .s2(x_e), .y1(y_f), .y2(y_g), .holding(holding));

  // test bypass
  assign x_f = bypass ? x_a   : y_f;
  assign x_g = bypass ? x_b_n : y_g;
endmodule
