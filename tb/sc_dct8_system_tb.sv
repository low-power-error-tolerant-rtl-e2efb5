// sc_dct8_system_tb: binary-in, binary-out test of the stochastic DCT at
// its default size (W = 8, L = 256).
// For a set of input vectors (constant, alternating, ramp, random) it checks
//  - the handshake: busy is 1 for exactly L clocks, done pulses once,
//    L + 1 clocks after start, and a start while busy is ignored;
//  - each result y[k] / L against the scaled DCT of x / 128 from
//    dct_ref_pkg, within TOL. The streams come from LFSRs and are L = 256
//    bits long, so one output's standard deviation is about 0.06 in bipolar
//    units (a full-scale output spans 2.0): each output must be within
//    TOL = 0.25, and the mean deviation over all outputs below 0.08.
`timescale 1ns/1ps
module sc_dct8_system_tb;
  import dct_ref_pkg::*;
  localparam int L = 256;
  localparam real TOL = 0.25;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic signed [7:0] x [8];
  logic signed [9:0] y [8];
  int checks = 0, failures = 0;
  real maxerr = 0.0, sumerr = 0.0;
  int  nerr = 0;

  sc_dct8_system dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x), .busy(busy), .done(done), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_one(input int vec);
    real xv [8];
    real got, want, err;
    int busy_cycles, lat;
    for (int n = 0; n < 8; n++) begin
      case (vec)
        0: x[n] = 8'sd100;
        1: x[n] = (n % 2) ? -8'sd90 : 8'sd90;
        2: x[n] = 8'(-112 + 32 * n);
        default: x[n] = 8'($urandom);
      endcase
      xv[n] = real'(x[n]) / 128.0;
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    busy_cycles = 0; lat = 1;
    while (!done) begin
      if (busy) busy_cycles++;
      if (lat == 10) begin start = 1; end         // ignored while busy
      @(negedge clk); start = 0; lat++;
    end
    checks++;
    if (busy_cycles != L || lat != L + 1) begin
      failures++; $display("FAIL timing: busy %0d clocks, done after %0d", busy_cycles, lat);
    end
    for (int k = 0; k < 8; k++) begin
      got  = real'(y[k]) / real'(L);
      want = dct_scaled(xv, k);
      err  = (got > want) ? got - want : want - got;
      if (err > maxerr) maxerr = err;
      sumerr += err; nerr++;
      checks++;
      if (err > TOL) begin failures++; $display("FAIL vec %0d X%0d: %f vs %f", vec, k, got, want); end
    end
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one clock"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 10; v++) run_one(v);
    $display("largest deviation %f, mean %f", maxerr, sumerr / nerr);
    checks++;
    if (sumerr / nerr > 0.08) begin failures++; $display("FAIL mean deviation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
