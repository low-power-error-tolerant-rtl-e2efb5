// sc_sng: stochastic number generator (binary to stochastic converter).
// A 16-bit maximal-length Fibonacci LFSR (x^16 + x^14 + x^13 + x^11 + 1,
// period 65535) supplies a random number; its top W bits are compared with
// the W-bit threshold `value`, and the stream bit is 1 when the random
// number is below it, so P(1) = value / 2^W. The document describes this
// converter as a random number generator and a comparator; the LFSR is this
// design's choice of generator. `load` restarts the LFSR from SEED (so a
// run is repeatable), `en` advances it by one step per clock. bit_o is the
// combinational comparison of the current LFSR state. Reset is
// asynchronous, active low.
module sc_sng #(
  parameter int          W    = 8,
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  input  logic [W-1:0] value,
  output logic         bit_o
);
  logic [15:0] lfsr;
  logic        fb;

  assign fb = lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    lfsr <= SEED;
    else if (load) lfsr <= SEED;
    else if (en)   lfsr <= {lfsr[14:0], fb};
  end

  assign bit_o = lfsr[15 -: W] < value;

  initial assert (W >= 1 && W <= 16) else $error("sc_sng: W must be 1..16");
  initial assert (SEED != 16'h0) else $error("sc_sng: SEED must be non-zero");
endmodule
