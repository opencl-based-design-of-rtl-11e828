// tb_clip_image: runs the pass / point sequencing of clip_image on a
// 64x32, two-layer pyramid with three reference points (one near a corner)
// and plays the part of find_peak: every descriptor is answered on the
// feedback channel with gc + offset. A model computes, independently, the
// expected descriptor sequence (gc = 2 q_{l+1}, or q_0 in the sub-pixel
// pass) and every windowed sample f = I(clamped) * w(c), g = J(clamped) * w(c)
// in order. The FFT channels report almost-full at random to cause stalls,
// and the feedback is held back at random so that clip_image must wait for
// it; starved must be high exactly while it is idle or waiting.
module tb_clip_image;
  import poc_pkg::*;
  localparam int N = 32, L = 5, NL = 2, W0 = 64, H0 = 32, NPTS = 4, OUT_W = 24;
  localparam int DEPTH = layer_base(NL, W0, H0);
  localparam int AW = $clog2(DEPTH);
  localparam int NP = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy;
  logic [$clog2(NPTS+1)-1:0] n_points = '0;
  logic [$clog2(NPTS)-1:0] pt_raddr;
  point_t pt_rdata;
  logic fb_valid, fb_ready, desc_valid, desc_ready;
  coord_t fb_q;
  match_desc_t desc;
  logic [AW-1:0] i_raddr, j_raddr;
  logic [7:0] i_rdata, j_rdata;
  logic f_afull = 0, g_afull = 0, f_valid, g_valid;
  logic signed [OUT_W-1:0] f_data, g_data;
  logic starved, fb_hold = 0;
  int n_starved = 0;

  clip_image #(.N(N), .L(L), .NLAYERS(NL), .W0(W0), .H0(H0), .NPTS(NPTS),
               .OUT_W(OUT_W), .DEPTH(DEPTH)) dut (.*);

  // Memory models, one clock of read latency.
  logic [7:0] mi [DEPTH];
  logic [7:0] mj [DEPTH];
  point_t     pts [NPTS];
  always @(posedge clk) begin
    i_rdata  <= mi[i_raddr];
    j_rdata  <= mj[j_raddr];
    pt_rdata <= pts[pt_raddr];
  end

  int checks = 0, failures = 0;
  initial begin
    #(10 * 100_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // find_peak stand-in: answer every descriptor with gc + offset.
  coord_t fbq [$];
  int desc_seen [$];
  int desc_final [$];
  int ndesc = 0;
  assign desc_ready = 1'b1;
  assign fb_valid   = (fbq.size() > 0) && !fb_hold;
  assign fb_q       = fb_valid ? fbq[0] : '0;
  // Handshakes are sampled between edges and take effect after the edge.
  always @(negedge clk) begin
    logic pop, got;
    match_desc_t dq;
    pop = fb_valid && fb_ready;
    got = desc_valid && desc_ready;
    dq  = desc;
    @(posedge clk);
    #1;
    if (pop) void'(fbq.pop_front());
    if (got) begin
      desc_seen.push_back(int'(dq.gc));
      desc_final.push_back(int'(dq.final_));
      if (!dq.final_) fbq.push_back(dq.gc + coord_t'(ndesc % 3) - 1);
      ndesc++;
    end
  end

  // Sample capture.
  int fs [$], gs [$];
  always @(negedge clk) begin
    if (f_valid) fs.push_back(int'(f_data));
    if (g_valid) gs.push_back(int'(g_data));
  end
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (starved != (!busy || (fb_ready && !fb_valid)) || (starved && dut.issue)) begin
        failures++;
        $display("starved=%0d busy=%0d fb_ready=%0d fb_valid=%0d", starved, busy, fb_ready, fb_valid);
      end
      if (starved && busy) n_starved++;
    end
  end
  always @(posedge clk) begin
    fb_hold <= ($urandom_range(0, 2) == 0);
    f_afull <= ($urandom_range(0, 3) == 0);
    g_afull <= ($urandom_range(0, 5) == 0);
  end

  function automatic int clampi(int v, int hi);
    return (v < 0) ? 0 : (v >= hi) ? hi - 1 : v;
  endfunction

  initial begin
    int px [NP], py [NP], q [NP];
    int exp_gc [$], exp_f [$], exp_g [$], exp_fin [$];
    int l, wl, hl, gc, k, err, xf, xg, yy;
    px[0] = 30; py[0] = 14; px[1] = 45; py[1] = 20; px[2] = 2; py[2] = 1;
    for (int i = 0; i < NPTS; i++) pts[i] = '0;
    for (int i = 0; i < NP; i++) begin pts[i].x = coord_t'(px[i]); pts[i].y = coord_t'(py[i]); end
    for (int a = 0; a < DEPTH; a++) begin mi[a] = 8'($urandom); mj[a] = 8'($urandom); end
    // Model of the whole sequence.
    k = 0;
    for (int pass = 0; pass <= NL; pass++) begin
      l = (pass == NL) ? 0 : NL - 1 - pass;
      wl = W0 >> l; hl = H0 >> l;
      for (int i = 0; i < NP; i++) begin
        if (pass == 0) q[i] = px[i] >>> NL;
        gc = (pass == NL) ? q[i] : 2 * q[i];
        exp_gc.push_back(gc);
        exp_fin.push_back(pass == NL);
        if (pass != NL) q[i] = gc + (k % 3) - 1;
        k++;
        for (int r = 0; r < L; r++)
          for (int c = 0; c < N; c++) begin
            yy = clampi((py[i] >>> l) - (L - 1) / 2 + r, hl);
            xf = clampi((px[i] >>> l) - N / 2 + c, wl);
            xg = clampi(gc - N / 2 + c, wl);
            exp_f.push_back(mi[layer_base(l, W0, H0) + yy * wl + xf] * int'(hann_q8(c, N)));
            exp_g.push_back(mj[layer_base(l, W0, H0) + yy * wl + xg] * int'(hann_q8(c, N)));
          end
      end
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    start = 1; n_points = ($clog2(NPTS+1))'(NP);
    @(negedge clk);
    start = 0;
    #1;
    while (busy) begin @(negedge clk); #1; end
    repeat (3) @(posedge clk);
    checks++;
    if (desc_seen.size() != exp_gc.size()) begin
      failures++;
      $display("%0d descriptors, expected %0d", desc_seen.size(), exp_gc.size());
    end else
      for (int i = 0; i < exp_gc.size(); i++) begin
        checks++;
        if (desc_seen[i] != exp_gc[i] || desc_final[i] != exp_fin[i]) begin
          failures++;
          $display("descriptor %0d: gc %0d/%0d final %0d/%0d", i, desc_seen[i], exp_gc[i],
                   desc_final[i], exp_fin[i]);
        end
      end
    checks++;
    if (fs.size() != exp_f.size() || gs.size() != exp_g.size()) begin
      failures++;
      $display("%0d/%0d samples, expected %0d", fs.size(), gs.size(), exp_f.size());
    end else begin
      err = 0;
      for (int i = 0; i < exp_f.size(); i++) begin
        checks++;
        if (fs[i] != exp_f[i] || gs[i] != exp_g[i]) begin
          failures++;
          if (err++ < 5) $display("sample %0d: f %0d/%0d g %0d/%0d", i, fs[i], exp_f[i], gs[i], exp_g[i]);
        end
      end
    end
    checks++;
    if (n_starved == 0) begin failures++; $display("never waited for feedback"); end
    checks++;
    if (fbq.size() != 0) begin failures++; $display("feedback left over"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
