// tb_find_peak: builds POC-like functions r(n) (a peak at a random shift
// n_s with random neighbours below it, noise elsewhere), sends them in the
// ifft1d bit-reversed slot order, and checks
//   * pixel passes: q = gc - n_s on the feedback output,
//   * final pass:   q = gc - n_s - d on the result output, with d the
//     parabola vertex computed here in floating point (1/256 pixel units,
//     one unit of tolerance for truncation),
// including peaks at the circular ends (n = 0 and n = N-1) and a flat top.
module tb_find_peak;
  import poc_pkg::*;
  localparam int N = 32, W = 28, LOGN = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, desc_valid = 0, desc_ready;
  logic signed [W-1:0] in_re = 0;
  logic [LOGN-1:0] in_idx = 0;
  match_desc_t desc = '0;
  logic fb_valid, fb_ready = 0, res_valid, res_ready = 0;
  coord_t fb_q;
  subpix_t res_q;

  find_peak #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #(10 * 100_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int r [N];

  initial begin
    int pk, ns, gc, fin, got, expq;
    real rm, r0, rp, d;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 60; t++) begin
      pk = (t == 0) ? 0 : (t == 1) ? N - 1 : $urandom_range(0, N - 1);
      for (int n = 0; n < N; n++) r[n] = $urandom_range(0, 20000) - 10000;
      r[pk] = 3_000_000 + $urandom_range(0, 1_000_000);
      r[(pk + 1) % N] = $urandom_range(0, r[pk]);
      r[(pk + N - 1) % N] = (t == 2) ? r[pk] - 1 : $urandom_range(0, r[pk]);
      if (t == 3) begin r[(pk + 1) % N] = r[pk] - 5; r[(pk + N - 1) % N] = r[pk] - 5; end
      ns  = (pk >= N/2) ? pk - N : pk;
      gc  = $urandom_range(0, 1200);
      fin = t % 2;
      rm = r[(pk + N - 1) % N]; r0 = r[pk]; rp = r[(pk + 1) % N];
      d  = (2 * r0 - rm - rp == 0) ? 0.0 : (rp - rm) / (2.0 * (2 * r0 - rm - rp));
      for (int m = 0; m < N; m++) begin
        @(negedge clk);
        in_valid = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
        in_valid = 1; in_re = W'(r[bitrev(m, LOGN)]); in_idx = LOGN'(m);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(posedge clk);
      end
      @(negedge clk);
      in_valid = 0;
      desc_valid = 1; desc.gc = coord_t'(gc); desc.final_ = fin[0];
      #1;
      while (!desc_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      @(negedge clk);
      desc_valid = 0;
      fb_ready = 1; res_ready = 1;
      #1;
      while (!(fb_valid || res_valid)) begin @(negedge clk); #1; end
      checks++;
      if (fin == 0) begin
        if (!fb_valid || res_valid || int'(fb_q) != gc - ns) begin
          failures++;
          $display("trial %0d: pixel pass got %0d expected %0d", t, fb_q, gc - ns);
        end
      end else begin
        got  = int'(res_q);
        expq = $rtoi((gc - ns - d) * 256.0);
        if (!res_valid || fb_valid || got - expq > 1 || expq - got > 1) begin
          failures++;
          $display("trial %0d: sub-pixel got %0.4f expected %0.4f", t, got / 256.0, gc - ns - d);
        end
      end
      @(posedge clk);
      #1;
      fb_ready = 0; res_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
