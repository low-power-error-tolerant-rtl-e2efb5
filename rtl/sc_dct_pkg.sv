// sc_dct_pkg: constants shared by the stochastic 8-point DCT.
//
// Stochastic numbers are bipolar: a value v in [-1, 1] is a bit stream whose
// probability of a 1 is (v + 1) / 2. A W-bit stream generator compares a
// W-bit random number with a W-bit threshold, so v maps to the threshold
// 2^(W-1) * (v + 1).
//
// COS_Q15[i] = round(cos(i*pi/16) * 32768), i = 0..7, the DCT coefficients
// C_i. coef_threshold() turns C_i into its W-bit generator threshold,
// 2^(W-1) + round(C_i * 2^(W-1)), saturated at 2^W - 1.
//
// NUM_SNG stream generators are used: 8 inputs, 7 coefficients and 6
// independent select streams (probability 0.5) for the scaled adders, one
// per adder level. SNG_SEED holds a distinct non-zero start state for each.
package sc_dct_pkg;
  localparam int NUM_X   = 8;
  localparam int NUM_C   = 7;
  localparam int NUM_SEL = 6;
  localparam int NUM_SNG = NUM_X + NUM_C + NUM_SEL;

  localparam int COS_Q15 [8] = '{32768, 32138, 30274, 27246, 23170, 18205, 12540, 6393};

  localparam logic [15:0] SNG_SEED [NUM_SNG] = '{
    16'h52E7, 16'hF2A8, 16'h269F, 16'h6514, 16'hA6A4, 16'h0C5D, 16'h128C,
    16'hD240, 16'h8930, 16'h1819, 16'h5D9E, 16'h9532, 16'h0EDA, 16'hE8E3,
    16'h81E8, 16'h36F7, 16'h099A, 16'h1601, 16'h6F04, 16'h6B0E, 16'h11E3};

  function automatic int unsigned coef_threshold(input int i, input int w);
    longint t;
    t = (longint'(COS_Q15[i]) * (longint'(1) << (w - 1)) + 16384) / 32768;
    t = t + (longint'(1) << (w - 1));
    if (t > (longint'(1) << w) - 1) t = (longint'(1) << w) - 1;
    return t[31:0];
  endfunction
endpackage
