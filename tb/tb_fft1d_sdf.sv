// tb_fft1d_sdf: streams blocks of random complex samples through the
// streaming FFT and compares every output with a direct DFT computed here
// (slot m of a block = frequency bitrev(m)). Phase 1 sends 6 blocks back to
// back with the output always ready and checks one sample per clock (6N
// input clocks), the N-1 sample latency, and that the rest of the last block
// stays inside until the flush. Phase 2 sends
// blocks with random input gaps and output stalls, flushing each time the
// input runs dry.
module tb_fft1d_sdf;
  import poc_pkg::*;
  localparam int N = 32, W = 24, LOGN = 5, NB = 14;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, flush = 0, out_valid, out_ready = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0, out_re, out_im;
  logic [LOGN-1:0] out_idx;

  fft1d_sdf #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #(10 * 100_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [NB][N], xi [NB][N];
  real er [NB][N], ei [NB][N];
  int nout = 0;
  logic stall_mode = 0;

  // Output checker: samples the handshake between edges.
  always @(negedge clk) begin
    if (stall_mode) out_ready = ($urandom_range(0, 3) != 0);
    #1;
    if (out_valid && out_ready) begin
      int b, m;
      b = nout / N; m = nout % N;
      checks++;
      if (int'(out_idx) != m || (out_re - er[b][m]) > 64.0 || (er[b][m] - out_re) > 64.0 ||
          (out_im - ei[b][m]) > 64.0 || (ei[b][m] - out_im) > 64.0) begin
        failures++;
        if (failures < 6) $display("block %0d slot %0d: got %0d,%0d expected %0.1f,%0.1f",
                                   b, m, out_re, out_im, er[b][m], ei[b][m]);
      end
      nout++;
    end
  end

  task automatic send(int b, bit gaps);
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 0;
      if (gaps) while ($urandom_range(0, 3) == 0) @(negedge clk);
      in_valid = 1; in_re = W'(xr[b][n]); in_im = W'(xi[b][n]);
      #2;
      while (!in_ready) begin @(negedge clk); #2; end
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    longint t0;
    int k;
    real ang;
    for (int b = 0; b < NB; b++) begin
      for (int n = 0; n < N; n++) begin
        xr[b][n] = $urandom_range(0, 131070) - 65535;
        xi[b][n] = (b % 3 == 0) ? 0 : $urandom_range(0, 131070) - 65535;
      end
      for (int m = 0; m < N; m++) begin
        k = int'(bitrev(m, LOGN));
        er[b][m] = 0; ei[b][m] = 0;
        for (int n = 0; n < N; n++) begin
          ang = -2.0 * PI * k * n / N;
          er[b][m] += xr[b][n] * $cos(ang) - xi[b][n] * $sin(ang);
          ei[b][m] += xr[b][n] * $sin(ang) + xi[b][n] * $cos(ang);
        end
      end
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // Phase 1: back to back at one sample per clock.
    out_ready = 1;
    @(negedge clk);
    t0 = $time / 10;
    for (int b = 0; b < 6; b++)
      for (int n = 0; n < N; n++) begin
        in_valid = 1; in_re = W'(xr[b][n]); in_im = W'(xi[b][n]);
        #2;
        if (!in_ready) begin failures++; $display("input stalled"); end
        @(negedge clk);
      end
    in_valid = 0;
    checks++;
    if ($time / 10 - t0 != 6 * N) begin failures++; $display("rate wrong"); end
    checks++;
    if (nout != 5 * N + 1) begin failures++; $display("%0d outputs before flush, expected %0d", nout, 5 * N + 1); end
    repeat (5) @(negedge clk);
    checks++;
    if (nout != 5 * N + 1) begin failures++; $display("output without flush"); end
    flush = 1;
    repeat (2 * N) @(negedge clk);
    flush = 0;
    checks++;
    if (nout != 6 * N) begin failures++; $display("flush: %0d outputs", nout); end
    // Phase 2: gaps, stalls and a flush whenever the input is idle.
    stall_mode = 1;
    for (int b = 6; b < NB; b++) begin
      send(b, 1'b1);
      if (b % 2 == 1) begin
        flush = 1;
        repeat (3 * N) @(negedge clk);
        flush = 0;
      end
    end
    flush = 1;
    repeat (4 * N) @(negedge clk);
    checks++;
    if (nout != NB * N) begin failures++; $display("%0d outputs, expected %0d", nout, NB * N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
