// find_peak: finds the correlation peak of one averaged 1D POC function and
// turns it into a correspondence.
//
// The N real samples r(n) arrive from ifft1d in its bit-reversed output
// order (slot m holds n = bitrev(m)); they are stored by n while the
// running maximum is tracked (first maximum wins on a tie). The peak index
// is read as a signed shift n_s in [-N/2, N/2). With the match descriptor
// taken from the channel fed by clip_image (centre gc of the g window, and
// whether this is the final sub-pixel pass):
//   * pixel passes:   q_l = gc - n_s (Eq. 3, gc = 2 q_{l+1}), sent on the
//                     feedback channel back to clip_image;
//   * final pass:     q = gc - (n_s + d) (Eq. 4), sent on the result stream,
//                     with d the vertex of the parabola through r(n_s-1),
//                     r(n_s), r(n_s+1):  d = (r+ - r-) / (2 (2 r0 - r- - r+)).
// A peak at n_s means g is f moved by -n_s, hence the minus signs.
// The parabola vertex is this design's choice of fitting function; |d| <=
// 1/2 always, and it is computed to FRAC_W bits by a restoring divider that
// produces one quotient bit per clock.
// Timing: N clocks to take the samples, 2 clocks to fit, FRAC_W clocks to
// divide (final pass only), 1 clock to hand the result over.
module find_peak
  import poc_pkg::*;
#(
  parameter int N = 32,
  parameter int W = 28
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_re,
  input  logic [$clog2(N)-1:0] in_idx,
  input  logic                desc_valid,
  output logic                desc_ready,
  input  match_desc_t         desc,
  output logic                fb_valid,
  input  logic                fb_ready,
  output coord_t              fb_q,
  output logic                res_valid,
  input  logic                res_ready,
  output subpix_t             res_q
);
  localparam int LOGN = $clog2(N);
  localparam int DW   = W + 3;

  typedef enum logic [2:0] {S_COLLECT, S_DESC, S_FIT, S_DIV, S_OUT} state_e;
  state_e state;

  logic signed [W-1:0] r [N];
  logic [LOGN-1:0]     cnt, n_in, peak_n;
  logic signed [W-1:0] peak_v;
  match_desc_t         d_q;
  logic [DW-1:0]       rem, den;
  logic [FRAC_W-1:0]   quo;
  logic                neg;          // sign of d
  logic [$clog2(FRAC_W+1)-1:0] bitc;

  function automatic logic [LOGN-1:0] rev(logic [LOGN-1:0] v);
    for (int i = 0; i < LOGN; i++) rev[i] = v[LOGN-1-i];
  endfunction

  assign n_in = rev(in_idx);
  assign in_ready   = (state == S_COLLECT);
  assign desc_ready = (state == S_DESC);

  // Neighbours of the peak (circular) and the fit terms.
  logic signed [W-1:0]  rm, r0, rp;
  logic signed [DW-1:0] num_s, den_s;
  always_comb begin
    rm    = r[peak_n - 1'b1];
    r0    = r[peak_n];
    rp    = r[peak_n + 1'b1];
    num_s = DW'(rp) - DW'(rm);
    den_s = (DW'(r0) <<< 2) - (DW'(rm) <<< 1) - (DW'(rp) <<< 1);
  end

  // Integer shift and results.
  coord_t  ns, q_int;
  subpix_t dfrac;
  always_comb begin
    ns    = coord_t'(peak_n) - ((peak_n >= LOGN'(N/2)) ? coord_t'(N) : coord_t'(0));
    q_int = d_q.gc - ns;
    dfrac = neg ? -subpix_t'(quo) : subpix_t'(quo);
  end
  assign fb_q      = q_int;
  assign res_q     = (subpix_t'(q_int) <<< FRAC_W) - dfrac;
  assign fb_valid  = (state == S_OUT) && !d_q.final_;
  assign res_valid = (state == S_OUT) &&  d_q.final_;

  always_ff @(posedge clk) begin
    if (in_valid && state == S_COLLECT) r[n_in] <= in_re;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_COLLECT;
      cnt    <= '0;
      peak_n <= '0;
      peak_v <= '0;
      d_q    <= '0;
      rem    <= '0;
      den    <= '0;
      quo    <= '0;
      neg    <= 1'b0;
      bitc   <= '0;
    end else begin
      unique case (state)
        S_COLLECT: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == '0 || in_re > peak_v) begin
            peak_v <= in_re;
            peak_n <= n_in;
          end
          if (cnt == LOGN'(N - 1)) state <= S_DESC;
        end
        S_DESC: if (desc_valid) begin
          d_q   <= desc;
          state <= desc.final_ ? S_FIT : S_OUT;
          quo   <= '0;
          neg   <= 1'b0;
        end
        S_FIT: begin
          neg   <= num_s[DW-1];
          rem   <= num_s[DW-1] ? DW'(-num_s) : DW'(num_s);
          den   <= den_s;
          quo   <= '0;
          bitc  <= '0;
          state <= (den_s == '0) ? S_OUT : S_DIV;
        end
        S_DIV: begin
          // One restoring-division step: rem*2 against den.
          if ((rem << 1) >= den) begin
            rem <= (rem << 1) - den;
            quo <= {quo[FRAC_W-2:0], 1'b1};
          end else begin
            rem <= rem << 1;
            quo <= {quo[FRAC_W-2:0], 1'b0};
          end
          bitc <= bitc + 1'b1;
          if (bitc == ($clog2(FRAC_W+1))'(FRAC_W - 1)) state <= S_OUT;
        end
        S_OUT: if ((fb_valid && fb_ready) || (res_valid && res_ready)) begin
          state <= S_COLLECT;
          cnt   <= '0;
        end
        default: state <= S_COLLECT;
      endcase
    end
  end
endmodule
