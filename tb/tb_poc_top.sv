// tb_poc_top: end-to-end test of the POC correspondence accelerator at its
// default size (1280x960 images, 4 layers, 32x15 windows).
// The reference image I is random texture. The input image J is I moved
// right by DISP pixels in the upper half and by DISP + 1/2 pixel in the
// lower half (mean of two neighbours), so the true correspondence of a
// point p is p.x + DISP or p.x + DISP + 0.5. After loading both images and
// NP reference points (one near a corner) and pulsing start, the test checks
//   * every pyramid layer of both images against a model of the 2x2 mean,
//   * every sub-pixel result against the true correspondence,
//   * done after the last result,
// and counts the mechanisms of the design: pyramid layers built,
// feedback-channel transfers (q_l handed back for the next layer), window
// clamping at an image border, clip stalls on a full FFT channel, FFT
// flushes (a line of bubbles pushing out the last window line), and
// result back-pressure. A mechanism that never occurs is a failure.
module tb_poc_top;
  import poc_pkg::*;

  localparam int W0 = 1280, H0 = 960, NL = 4, N = 32, NPTS = 10000;
  localparam int DISP = 37;
  localparam int NP = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic img_we = 0, pt_we = 0, start = 0, res_ready = 0;
  logic [$clog2(W0*H0)-1:0] img_addr = '0;
  logic [7:0] img_i = '0, img_j = '0;
  logic [$clog2(NPTS)-1:0] pt_addr = '0;
  point_t pt_data = '0;
  logic [$clog2(NPTS+1)-1:0] n_points = '0;
  logic busy, done, res_valid;
  subpix_t res_q;

  poc_top dut (.*);

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    #(10 * 20_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned imgI [NL][][];
  byte unsigned imgJ [NL][][];
  int px [NP], py [NP], qx2 [NP];   // qx2: twice the true correspondence

  // Mechanism counters, sampled between clock edges.
  int n_layers = 0, n_fb = 0, n_clamp = 0, n_stall = 0, n_bp = 0, n_done = 0, n_flush = 0;
  logic bubble_d = 0;
  always @(negedge clk) begin
    if (dut.mhl_done_i) n_layers++;
    if (dut.fbc_valid && dut.fbc_ready) n_fb++;
    if (dut.u_clip.issue && (dut.u_clip.xf != dut.u_clip.plx - N/2 + dut.u_clip.col ||
                             dut.u_clip.xg != dut.u_clip.gc  - N/2 + dut.u_clip.col)) n_clamp++;
    if (int'(dut.u_clip.state) == 4 && !dut.u_clip.issue) n_stall++;
    if (res_valid && !res_ready) n_bp++;
    if (done) n_done++;
    if (dut.u_fft_f.bubble && !bubble_d) n_flush++;
    bubble_d = dut.u_fft_f.bubble;
  end

  function automatic int layer_addr(int l, int x, int y);
    return layer_base(l, W0, H0) + y * (W0 >> l) + x;
  endfunction

  initial begin
    int got, err, idx, tol;
    longint t_start, t_match, t_end;
    for (int l = 0; l < NL; l++) begin
      imgI[l] = new[H0 >> l];
      imgJ[l] = new[H0 >> l];
      for (int y = 0; y < (H0 >> l); y++) begin
        imgI[l][y] = new[W0 >> l];
        imgJ[l][y] = new[W0 >> l];
      end
    end
    for (int y = 0; y < H0; y++)
      for (int x = 0; x < W0; x++) imgI[0][y][x] = 8'($urandom_range(0, 255));
    for (int y = 0; y < H0; y++)
      for (int x = 0; x < W0; x++)
        if (x < DISP + 1)      imgJ[0][y][x] = 8'($urandom_range(0, 255));
        else if (y < H0 / 2)   imgJ[0][y][x] = imgI[0][y][x-DISP];
        else imgJ[0][y][x] = 8'((int'(imgI[0][y][x-DISP]) + imgI[0][y][x-DISP-1] + 1) / 2);
    for (int l = 1; l < NL; l++)
      for (int y = 0; y < (H0 >> l); y++)
        for (int x = 0; x < (W0 >> l); x++) begin
          imgI[l][y][x] = 8'((int'(imgI[l-1][2*y][2*x]) + imgI[l-1][2*y][2*x+1] +
                              imgI[l-1][2*y+1][2*x] + imgI[l-1][2*y+1][2*x+1]) / 4);
          imgJ[l][y][x] = 8'((int'(imgJ[l-1][2*y][2*x]) + imgJ[l-1][2*y][2*x+1] +
                              imgJ[l-1][2*y+1][2*x] + imgJ[l-1][2*y+1][2*x+1]) / 4);
        end
    for (int i = 0; i < NP; i++) begin
      px[i] = 120 + i * 67;
      py[i] = (i % 2 == 0) ? 100 + i * 20 : H0 / 2 + 100 + i * 20;
      qx2[i] = 2 * (px[i] + DISP) + ((py[i] >= H0 / 2) ? 1 : 0);
    end
    // Near the top-left corner: the windows are clamped at the border.
    px[NP-1] = 10; py[NP-1] = 4; qx2[NP-1] = 2 * (10 + DISP);

    repeat (3) @(posedge clk);
    rst_n <= 1;
    // Load layer 0 of both images and the reference points.
    for (int y = 0; y < H0; y++)
      for (int x = 0; x < W0; x++) begin
        @(negedge clk);
        img_we = 1; img_addr = ($clog2(W0*H0))'(y * W0 + x);
        img_i = imgI[0][y][x]; img_j = imgJ[0][y][x];
      end
    for (int i = 0; i < NP; i++) begin
      @(negedge clk);
      img_we = 0;
      pt_we = 1; pt_addr = ($clog2(NPTS))'(i);
      pt_data.x = coord_t'(px[i]); pt_data.y = coord_t'(py[i]);
    end
    @(negedge clk);
    pt_we = 0;
    n_points = ($clog2(NPTS+1))'(NP);
    start = 1;
    t_start = cycles;
    @(negedge clk);
    start = 0;

    // Pyramid: compare all generated layers.
    #1;
    while (int'(dut.tstate) != 2) begin @(negedge clk); #1; end
    t_match = cycles;
    for (int l = 1; l < NL; l++) begin
      err = 0;
      for (int y = 0; y < (H0 >> l); y++)
        for (int x = 0; x < (W0 >> l); x++) begin
          if (dut.u_mem_i.mem[layer_addr(l, x, y)] != imgI[l][y][x]) err++;
          if (dut.u_mem_j.mem[layer_addr(l, x, y)] != imgJ[l][y][x]) err++;
        end
      checks++;
      if (err != 0) begin
        failures++;
        $display("layer %0d: %0d pyramid mismatches", l, err);
      end
    end

    // Results, in point order, taken with random back-pressure.
    idx = 0;
    while (idx < NP) begin
      @(negedge clk);
      res_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (res_valid && res_ready) begin
        got = int'(res_q);
        // Interior points within a quarter pixel of the true position,
        // the corner point within one pixel.
        tol = (idx == NP - 1) ? 256 : 64;
        checks++;
        if (2 * got - qx2[idx] * 256 > 2 * tol || qx2[idx] * 256 - 2 * got > 2 * tol) begin
          failures++;
          $display("point %0d (%0d,%0d): q=%0.3f expected %0.1f", idx, px[idx], py[idx],
                   real'(got) / 256.0, qx2[idx] / 2.0);
        end
        if (idx < 4 || idx == NP - 1) $display("point %0d: q=%0.3f", idx, real'(got) / 256.0);
        idx++;
      end
    end
    t_end = cycles;
    @(negedge clk);
    res_ready = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (n_done != 1 || busy) begin failures++; $display("done/busy wrong"); end

    $display("cycles: pyramid %0d, matching %0d (%0d per point)", t_match - t_start,
             t_end - t_match, (t_end - t_match) / NP);
    $display("mechanisms: layers=%0d feedback=%0d clamp=%0d stall=%0d flush=%0d backpressure=%0d",
             n_layers, n_fb, n_clamp, n_stall, n_flush, n_bp);
    checks++; if (n_layers != NL - 1) begin failures++; $display("pyramid layers"); end
    checks++; if (n_fb != NP * NL)    begin failures++; $display("feedback count"); end
    checks++; if (n_clamp == 0)       begin failures++; $display("no clamping"); end
    checks++; if (n_stall == 0)       begin failures++; $display("no stall"); end
    checks++; if (n_flush == 0)       begin failures++; $display("no FFT flush"); end
    checks++; if (n_bp == 0)          begin failures++; $display("no back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
