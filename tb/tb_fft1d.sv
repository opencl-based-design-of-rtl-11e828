// tb_fft1d: checks the forward and inverse N-point FFT against a direct DFT
// computed here in floating point, for random complex inputs, and checks the
// bit-reversed output order and the 144-clock transform period (N = 32).
module tb_fft1d;
  import poc_pkg::*;
  localparam int N = 32, W = 24, LOGN = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid [2];
  logic in_ready [2];
  logic signed [W-1:0] in_re [2], in_im [2];
  logic out_valid [2], out_ready [2];
  logic signed [W-1:0] out_re [2], out_im [2];
  logic [LOGN-1:0] out_idx [2];

  fft1d #(.N(N), .W(W), .INVERSE(1'b0)) u_fwd (.clk, .rst_n,
    .in_valid(in_valid[0]), .in_ready(in_ready[0]), .in_re(in_re[0]), .in_im(in_im[0]),
    .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_re(out_re[0]),
    .out_im(out_im[0]), .out_idx(out_idx[0]));
  fft1d #(.N(N), .W(W), .INVERSE(1'b1)) u_inv (.clk, .rst_n,
    .in_valid(in_valid[1]), .in_ready(in_ready[1]), .in_re(in_re[1]), .in_im(in_im[1]),
    .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_re(out_re[1]),
    .out_im(out_im[1]), .out_idx(out_idx[1]));

  int checks = 0, failures = 0;
  initial begin
    #(10 * 200_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [N], xi [N];

  task automatic run(int inv, int trial);
    real er, ei, ang;
    int k, t0, t1, maxerr;
    for (int n = 0; n < N; n++) begin
      xr[n] = $urandom_range(0, 131070) - 65535;
      xi[n] = (trial == 0) ? 0 : $urandom_range(0, 131070) - 65535;
      if (trial == 1) begin xr[n] = (n == 3) ? 60000 : 0; xi[n] = 0; end
    end
    @(posedge clk);
    t0 = $time / 10;
    for (int n = 0; n < N; n++) begin
      in_valid[inv] <= 1; in_re[inv] <= W'(xr[n]); in_im[inv] <= W'(xi[n]);
      @(posedge clk);
      while (!in_ready[inv]) @(posedge clk);
    end
    in_valid[inv] <= 0;
    out_ready[inv] <= 1;
    maxerr = 0;
    for (int m = 0; m < N; m++) begin
      @(posedge clk);
      while (!out_valid[inv]) @(posedge clk);
      if (m == 0) t1 = $time / 10;
      k = int'(bitrev(m, LOGN));
      er = 0; ei = 0;
      for (int n = 0; n < N; n++) begin
        ang = (inv ? 2.0 : -2.0) * PI * k * n / N;
        er += xr[n] * $cos(ang) - xi[n] * $sin(ang);
        ei += xr[n] * $sin(ang) + xi[n] * $cos(ang);
      end
      checks++;
      if (int'(out_idx[inv]) != m ||
          (out_re[inv] - er) > 64.0 || (er - out_re[inv]) > 64.0 ||
          (out_im[inv] - ei) > 64.0 || (ei - out_im[inv]) > 64.0) begin
        failures++;
        $display("inv=%0d trial=%0d slot %0d (k=%0d): got %0d,%0d expected %0.1f,%0.1f",
                 inv, trial, m, k, out_re[inv], out_im[inv], er, ei);
      end
    end
    @(posedge clk);
    out_ready[inv] <= 0;
    // Load (N) + compute (N/2 log2 N) clocks, plus the clock on which the
    // first input is presented, until the first output is seen.
    checks++;
    if (t1 - t0 != N + N / 2 * LOGN + 1) begin
      failures++;
      $display("latency %0d, expected %0d", t1 - t0, N + N / 2 * LOGN + 1);
    end
  endtask

  initial begin
    for (int i = 0; i < 2; i++) begin
      in_valid[i] = 0; out_ready[i] = 0; in_re[i] = 0; in_im[i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 4; t++) begin
      run(0, t);
      run(1, t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
