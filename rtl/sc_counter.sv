// sc_counter: stochastic to binary converter, a counter of the ones in a
// stream. `clear` zeroes it (it has priority), `en` counts bit_i on each
// clock. CW bits must hold the stream length. Asynchronous active-low reset.
// The counter as the output converter follows the source; its width,
// clear/enable controls and reset are this design's choices.
module sc_counter #(
  parameter int CW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  input  logic          bit_i,
  output logic [CW-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          count <= '0;
    else if (clear)      count <= '0;
    else if (en & bit_i) count <= count + 1'b1;
  end
endmodule
