// fft1d_sdf: streaming N-point FFT (radix-2 single-path delay feedback,
// decimation in frequency), the forward fft1d kernel of the matching chain.
// It takes one sample per clock, so the window lines stream through it
// back to back.
//
// Structure: log2(N) stages; stage s has a feedback delay line of
// D = N / 2^(s+1) samples. In the first D clocks of every 2D, a stage
// stores its input in the delay line and passes on what the line held
// (the (a-b)W results of the previous group). In the second D clocks it
// forms a + b with a from the line and b at the input, passes a + b on,
// and stores (a - b) W_N^(pos 2^s), where pos is the position in the half.
// All stages advance together on `adv`; the only storage is the delay lines,
// so a block of N samples leaves N-1 advances after it enters. The output
// is in bit-reversed order: the m-th output of a block (out_idx = m) is
// frequency bitrev(m), as from the iterative fft1d.
// Each sample carries a valid tag. When the input runs dry while samples
// are still inside (flush high, at a block boundary), the stage advances
// through one block of zero-tagged bubbles to push the last block out.
// Interface: in_valid/in_ready; out_valid/out_ready, where the whole pipe
// stalls while out_ready is low. flush asks for the drain described above.
// Arithmetic: W-bit signed, no scaling, twiddles Q1.14, rounded products,
// as in fft1d. The stages are chained without registers between them (the
// delay lines are the only registers), which keeps the control simple at
// the cost of a long combinational path through log2(N) butterflies.
module fft1d_sdf
  import poc_pkg::*;
#(
  parameter int N = 32,
  parameter int W = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  input  logic                 flush,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [W-1:0]  out_re,
  output logic signed [W-1:0]  out_im,
  output logic [$clog2(N)-1:0] out_idx
);
  localparam int LOGN = $clog2(N);

  typedef logic signed [15:0] tw_tab_t [N/2];
  function automatic tw_tab_t gen_cos();
    for (int k = 0; k < N/2; k++) gen_cos[k] = tw_cos(k, N);
  endfunction
  function automatic tw_tab_t gen_sin();
    for (int k = 0; k < N/2; k++) gen_sin[k] = -tw_sin(k, N);
  endfunction
  localparam tw_tab_t TW_RE = gen_cos();
  localparam tw_tab_t TW_IM = gen_sin();

  logic [LOGN-1:0] cnt;          // position of the current input in its block
  logic            bubble;       // draining with a block of bubbles
  logic            adv;
  logic [LOGN:0]   in_flight;    // tagged samples inside the pipe
  logic [LOGN-1:0] out_cnt;

  assign in_ready = out_ready && !bubble;
  assign adv      = out_ready && (bubble || in_valid);

  // Pipe input: bubbles are zero samples with a clear tag.
  logic signed [W-1:0] x0_re, x0_im;
  logic                x0_t;
  assign x0_re = bubble ? '0 : in_re;
  assign x0_im = bubble ? '0 : in_im;
  assign x0_t  = !bubble && in_valid;

  for (genvar s = 0; s < LOGN; s++) begin : g_stage
    localparam int D = N >> (s + 1);

    logic signed [W-1:0] a_re, a_im;    // stage input
    logic                a_t;
    logic signed [W-1:0] o_re, o_im;    // stage output
    logic                o_t;
    if (s == 0) begin : g_first
      assign a_re = x0_re;
      assign a_im = x0_im;
      assign a_t  = x0_t;
    end else begin : g_next
      assign a_re = g_stage[s-1].o_re;
      assign a_im = g_stage[s-1].o_im;
      assign a_t  = g_stage[s-1].o_t;
    end

    logic signed [W-1:0] dr [D];
    logic signed [W-1:0] di [D];
    logic                dt [D];
    logic                second;
    logic [LOGN-2:0]     tw_idx;
    logic signed [W-1:0]  sum_re, sum_im, dif_re, dif_im;
    logic signed [W+16:0] p_re, p_im;
    logic signed [W-1:0]  push_re, push_im;
    logic                 push_t;

    always_comb begin
      second = cnt[LOGN-1-s];
      tw_idx = (LOGN-1)'((32'(cnt) & (D - 1)) << s);
      sum_re = dr[D-1] + a_re;
      sum_im = di[D-1] + a_im;
      dif_re = dr[D-1] - a_re;
      dif_im = di[D-1] - a_im;
      p_re   = dif_re * TW_RE[tw_idx] - dif_im * TW_IM[tw_idx] + (1 <<< (Q - 1));
      p_im   = dif_re * TW_IM[tw_idx] + dif_im * TW_RE[tw_idx] + (1 <<< (Q - 1));
      if (second) begin
        o_re    = sum_re;
        o_im    = sum_im;
        o_t     = dt[D-1];
        push_re = W'(p_re >>> Q);
        push_im = W'(p_im >>> Q);
        push_t  = dt[D-1];
      end else begin
        o_re    = dr[D-1];
        o_im    = di[D-1];
        o_t     = dt[D-1];
        push_re = a_re;
        push_im = a_im;
        push_t  = a_t;
      end
    end

    // Delay line as a shift register; entry D-1 is the oldest.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < D; i++) dt[i] <= 1'b0;
      end else if (adv) begin
        dt[0] <= push_t;
        for (int i = 1; i < D; i++) dt[i] <= dt[i-1];
      end
    end
    always_ff @(posedge clk) begin
      if (adv) begin
        dr[0] <= push_re;
        di[0] <= push_im;
        for (int i = 1; i < D; i++) begin
          dr[i] <= dr[i-1];
          di[i] <= di[i-1];
        end
      end
    end
  end

  assign out_valid = adv && g_stage[LOGN-1].o_t;
  assign out_re    = g_stage[LOGN-1].o_re;
  assign out_im    = g_stage[LOGN-1].o_im;
  assign out_idx   = out_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      bubble    <= 1'b0;
      in_flight <= '0;
      out_cnt   <= '0;
    end else begin
      if (adv) cnt <= cnt + 1'b1;
      if (out_valid) out_cnt <= out_cnt + 1'b1;
      in_flight <= in_flight + (LOGN+1)'(adv && x0_t) - (LOGN+1)'(out_valid);
      if (!bubble && flush && !in_valid && in_flight != '0 && cnt == '0 && out_ready)
        bubble <= 1'b1;
      else if (bubble && adv && cnt == LOGN'(N - 1))
        bubble <= 1'b0;
    end
  end

  // A bubble block starts on a block boundary, so real blocks stay whole.
  a_bubble_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                     $rose(bubble) |-> cnt == '0);
endmodule
