// tb_eval_cps: feeds two windows of random F(k), G(k) spectra (L lines of N
// slots each, slot m holding frequency bitrev(m)) with random gaps, and
// compares the N accumulated outputs with
//   sum over lines of H(k) e^{j(atan2(F) - atan2(G))},  H(k) = 0.5 + 0.5 cos(2 pi k / N)
// computed here in floating point (Q1.14 units). Output back-pressure is
// applied on the second window.
module tb_eval_cps;
  import poc_pkg::*;
  localparam int N = 32, L = 15, IN_W = 24, OUT_W = 20, LOGN = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic f_valid = 0, g_valid = 0, f_ready, g_ready, out_valid, out_ready = 0;
  logic signed [IN_W-1:0] f_re = 0, f_im = 0, g_re = 0, g_im = 0;
  logic [LOGN-1:0] f_idx = 0, out_idx;
  logic signed [OUT_W-1:0] out_re, out_im;

  eval_cps #(.N(N), .L(L), .IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #(10 * 100_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real er [N], ei [N];

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic window(int bp);
    int fr, fi, gr, gi, k;
    real d, h;
    for (int m = 0; m < N; m++) begin er[m] = 0; ei[m] = 0; end
    for (int line = 0; line < L; line++)
      for (int m = 0; m < N; m++) begin
        fr = $urandom_range(0, 200000) - 100000; fi = $urandom_range(0, 200000) - 100000;
        gr = $urandom_range(0, 200000) - 100000; gi = $urandom_range(0, 200000) - 100000;
        k = int'(bitrev(m, LOGN)); if (k >= N/2) k -= N;
        h = 0.5 + 0.5 * $cos(2.0 * PI * k / N);
        d = $atan2(real'(fi), real'(fr)) - $atan2(real'(gi), real'(gr));
        er[m] += 16384.0 * h * $cos(d);
        ei[m] += 16384.0 * h * $sin(d);
        // Inputs change at the falling edge; a pair moves at a rising edge
        // on which f_ready is high.
        @(negedge clk);
        f_valid = 0; g_valid = 0;
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        f_valid = 1; g_valid = 1; f_re = IN_W'(fr); f_im = IN_W'(fi);
        g_re = IN_W'(gr); g_im = IN_W'(gi); f_idx = LOGN'(m);
        #1;
        while (!f_ready) begin @(negedge clk); #1; end
        @(posedge clk);
      end
    @(negedge clk);
    f_valid = 0; g_valid = 0;
    for (int m = 0; m < N; m++) begin
      // Sample the handshake between clock edges, then let it complete.
      forever begin
        @(negedge clk);
        out_ready = bp ? ($urandom_range(0, 1) == 1) : 1'b1;
        #1;
        if (out_valid && out_ready) break;
      end
      checks++;
      if (int'(out_idx) != m || fabs(out_re - er[m]) > 60.0 * L || fabs(out_im - ei[m]) > 60.0 * L) begin
        failures++;
        $display("slot %0d/%0d: got %0d,%0d expected %0.1f,%0.1f", out_idx, m, out_re, out_im,
                 er[m], ei[m]);
      end
      @(posedge clk);
      #1;
      out_ready = 0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    window(0);
    window(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
