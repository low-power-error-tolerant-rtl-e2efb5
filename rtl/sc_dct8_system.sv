// sc_dct8_system: binary-in, binary-out stochastic 8-point 1D-DCT.
//
// Eight signed W-bit samples x[n] (bipolar range [-2^(W-1), 2^(W-1))) are
// converted by stream generators (sc_sng) with thresholds x + 2^(W-1); the
// seven DCT coefficients C1..C7 and six select streams of probability 0.5
// have generators of their own, all with distinct LFSR seeds. The streams
// run through the stochastic core (sc_dct8) for L clock cycles, and eight
// counters (sc_counter) count the ones of each output stream.
//
// Result: y[k] = 2*count[k] - L, the bipolar output value in units of 1/L,
// i.e. y[k]/L estimates X(k)/8 (k = 0, 2..6) or X(k)/16 (k = 1, 7), where
// X(k) is the DCT of x[n]/2^(W-1) as defined in sc_dct8.
//
// Handshake: pulse `start` for one clock while idle (x is sampled then). The
// generators restart from their seeds, `busy` is 1 for exactly L clocks while
// the streams run, and `done` pulses one clock after the last stream bit,
// L + 1 clocks after start; y then holds until the next start. A start
// while busy is ignored. Stream length and generator resolution are not
// given by the document: L = 256 and W = 8 are this design's defaults.
module sc_dct8_system
  import sc_dct_pkg::*;
#(
  parameter int W = 8,
  parameter int L = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] x [8],
  output logic                busy,
  output logic                done,
  output logic signed [$clog2(L+1):0] y [8]
);
  localparam int CW = $clog2(L + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;
  state_t state;

  logic [CW-1:0]  n_left;
  logic [W-1:0]   thr [NUM_SNG];
  logic [W-1:0]   x_thr [8];
  logic [NUM_SNG-1:0] sbits;
  logic [7:0]     xs, ys;
  logic [7:1]     cs;
  logic [5:0]     sel;
  logic [CW-1:0]  cnt [8];
  logic           load, run;

  // control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      n_left <= '0;
      for (int n = 0; n < 8; n++) x_thr[n] <= '0;
    end else begin
      case (state)
        S_IDLE, S_DONE:
          if (start) begin
            state  <= S_RUN;
            n_left <= CW'(L);
            for (int n = 0; n < 8; n++) x_thr[n] <= x[n] ^ {1'b1, {(W-1){1'b0}}};
          end else begin
            state <= S_IDLE;
          end
        S_RUN: begin
          n_left <= n_left - 1'b1;
          if (n_left == CW'(1)) state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign load = (state != S_RUN) && start;
  assign run  = (state == S_RUN);
  assign busy = run;
  assign done = (state == S_DONE);

  // stream thresholds: inputs, coefficients, selects
  always_comb begin
    for (int n = 0; n < NUM_X; n++)   thr[n] = x_thr[n];
    for (int i = 1; i <= NUM_C; i++)  thr[NUM_X + i - 1] = W'(coef_threshold(i, W));
    for (int j = 0; j < NUM_SEL; j++) thr[NUM_X + NUM_C + j] = W'(1) << (W - 1);
  end

  for (genvar g = 0; g < NUM_SNG; g++) begin : g_sng
    sc_sng #(.W(W), .SEED(SNG_SEED[g])) u_sng (
      .clk(clk), .rst_n(rst_n), .load(load), .en(run),
      .value(thr[g]), .bit_o(sbits[g]));
  end

  assign xs  = sbits[7:0];
  assign cs  = sbits[14:8];
  assign sel = sbits[20:15];

  sc_dct8 u_core (.x(xs), .c(cs), .sel(sel), .y(ys));

  for (genvar k = 0; k < 8; k++) begin : g_cnt
    sc_counter #(.CW(CW)) u_cnt (
      .clk(clk), .rst_n(rst_n), .clear(load), .en(run),
      .bit_i(ys[k]), .count(cnt[k]));
    assign y[k] = $signed({1'b0, cnt[k]} << 1) - $signed((CW+1)'(L));
  end

  initial assert (W >= 2 && W <= 16) else $error("sc_dct8_system: W must be 2..16");
endmodule
