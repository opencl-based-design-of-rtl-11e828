// fft1d: N-point radix-2 decimation-in-frequency FFT, computed in place.
// The top uses it as the ifft1d kernel (INVERSE = 1, conjugate twiddles, no
// 1/N scaling, which does not move the correlation peak), which runs once
// per match and need not stream; the forward line transforms use the
// streaming fft1d_sdf. INVERSE = 0 gives the forward kernel e^{-j2pi kn/N}.
//
// Operation, one transform at a time:
//   LOAD    N complex samples are accepted in natural order (in_valid/in_ready).
//   COMPUTE log2(N) stages of N/2 butterflies, one butterfly per clock:
//           a' = a + b,  b' = (a - b) * W^(pos * 2^stage).
//   UNLOAD  N results leave in memory order (out_valid/out_ready). Memory
//           slot m holds frequency bitrev(m): the output is bit-reversed,
//           and out_idx gives the slot number m.
// Latency: N + (N/2)log2(N) + N clocks per transform without stalls
// (144 clocks for N = 32).
// Arithmetic: W-bit signed two's complement, no scaling between stages; the
// caller chooses W to hold log2(N) bits of growth. Twiddles are Q1.14 from
// a constant table computed at elaboration; products are rounded.
module fft1d
  import poc_pkg::*;
#(
  parameter int N       = 32,
  parameter int W       = 24,
  parameter bit INVERSE = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [W-1:0]  out_re,
  output logic signed [W-1:0]  out_im,
  output logic [$clog2(N)-1:0] out_idx
);
  localparam int LOGN = $clog2(N);

  typedef enum logic [1:0] {S_LOAD, S_COMPUTE, S_UNLOAD} state_e;
  state_e state;

  logic signed [W-1:0] xr [N];
  logic signed [W-1:0] xi [N];

  logic [LOGN-1:0]   cnt;      // load / unload slot, butterfly number
  logic [$clog2(LOGN+1)-1:0] stage;

  // Twiddle table, W_N^k = cos(2 pi k/N) -/+ j sin(2 pi k/N), k < N/2.
  typedef logic signed [15:0] tw_tab_t [N/2];
  function automatic tw_tab_t gen_cos();
    for (int k = 0; k < N/2; k++) gen_cos[k] = tw_cos(k, N);
  endfunction
  function automatic tw_tab_t gen_sin();
    for (int k = 0; k < N/2; k++) gen_sin[k] = INVERSE ? tw_sin(k, N) : -tw_sin(k, N);
  endfunction
  localparam tw_tab_t TW_RE = gen_cos();
  localparam tw_tab_t TW_IM = gen_sin();

  // Butterfly addressing for butterfly cnt of stage `stage`.
  logic [LOGN-1:0] span, pos, grp, a_idx, b_idx;
  logic [LOGN-2:0] tw_idx;
  always_comb begin
    span   = LOGN'(N >> (stage + 1));
    pos    = cnt & (span - 1'b1);
    grp    = LOGN'((cnt - pos) << 1);        // group * 2 * span
    a_idx  = grp + pos;
    b_idx  = a_idx + span;
    tw_idx = (LOGN-1)'(pos << stage);
  end

  logic signed [W-1:0]  sum_re, sum_im, dif_re, dif_im;
  logic signed [W+16:0] p_re, p_im;
  always_comb begin
    sum_re = xr[a_idx] + xr[b_idx];
    sum_im = xi[a_idx] + xi[b_idx];
    dif_re = xr[a_idx] - xr[b_idx];
    dif_im = xi[a_idx] - xi[b_idx];
    p_re = dif_re * TW_RE[tw_idx] - dif_im * TW_IM[tw_idx] + (1 <<< (Q - 1));
    p_im = dif_re * TW_IM[tw_idx] + dif_im * TW_RE[tw_idx] + (1 <<< (Q - 1));
  end

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_UNLOAD);
  assign out_re    = xr[cnt];
  assign out_im    = xi[cnt];
  assign out_idx   = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      stage <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) begin
            state <= S_COMPUTE;
            stage <= '0;
          end
        end
        S_COMPUTE: begin
          if (cnt == LOGN'(N/2 - 1)) begin
            cnt <= '0;
            if (stage == ($clog2(LOGN+1))'(LOGN - 1)) state <= S_UNLOAD;
            else stage <= stage + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_UNLOAD: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      xr[cnt] <= in_re;
      xi[cnt] <= in_im;
    end else if (state == S_COMPUTE) begin
      xr[a_idx] <= sum_re;
      xi[a_idx] <= sum_im;
      xr[b_idx] <= W'(p_re >>> Q);
      xi[b_idx] <= W'(p_im >>> Q);
    end
  end
endmodule
