// eval_cps: evaluates the normalised cross-power spectrum
//   R(k) = F(k) conj(G(k)) / |F(k) conj(G(k))| = e^{j(theta_F(k) - theta_G(k))}
// of each of the L line pairs of a search window, applies the spectral
// weighting H(k), and sums the L weighted spectra. Because the inverse DFT
// is linear, summing R over the lines is the same as averaging the L 1D POC
// functions, which is how the line averaging is realised here.
//
// How: two CORDIC vectoring pipelines take theta_F and theta_G; their
// difference addresses a cos/sin table (pre-computed constants replace the
// division and square root of the normalisation). The unit vector is
// multiplied by H(k) and added into an N-entry accumulator.
// H(k) = 0.5 + 0.5 cos(2 pi k / N), a raised-cosine low-pass (this design's
// choice of weighting function).
//
// Interface: F and G arrive as two valid/ready streams in the fft1d output
// order (slot m holds frequency bitrev(m)); a pair is consumed when both are
// valid. After L*N pairs the pipeline drains and the N sums leave on the
// out stream (slot order, out_idx = m), Q1.14 units, signed OUT_W bits.
// Timing: one pair per clock while accumulating; drain of CORDIC latency
// + 3 clocks; N clocks to unload; no input is taken while unloading.
module eval_cps
  import poc_pkg::*;
#(
  parameter int N     = 32,
  parameter int L     = 15,
  parameter int IN_W  = 24,
  parameter int OUT_W = 20
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    f_valid,
  output logic                    f_ready,
  input  logic signed [IN_W-1:0]  f_re,
  input  logic signed [IN_W-1:0]  f_im,
  input  logic [$clog2(N)-1:0]    f_idx,
  input  logic                    g_valid,
  output logic                    g_ready,
  input  logic signed [IN_W-1:0]  g_re,
  input  logic signed [IN_W-1:0]  g_im,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im,
  output logic [$clog2(N)-1:0]    out_idx
);
  localparam int LOGN   = $clog2(N);
  localparam int STAGES = 16;
  localparam int LAT    = STAGES + 1;       // CORDIC latency
  localparam int TABN   = 1 << TAB_W;

  // Constant tables.
  typedef logic signed [15:0] q14_tab_t [TABN];
  typedef logic signed [15:0] w_tab_t   [N];
  function automatic q14_tab_t gen_cos();
    for (int i = 0; i < TABN; i++) gen_cos[i] = tw_cos(i, TABN);
  endfunction
  function automatic q14_tab_t gen_sin();
    for (int i = 0; i < TABN; i++) gen_sin[i] = tw_sin(i, TABN);
  endfunction
  // Weight by slot: slot m holds frequency k = bitrev(m), taken as signed.
  function automatic w_tab_t gen_weight();
    for (int m = 0; m < N; m++) begin
      int k = int'(bitrev(m, LOGN));
      if (k >= N/2) k -= N;
      gen_weight[m] = weight_q14(k, N);
    end
  endfunction
  localparam q14_tab_t COS_T = gen_cos();
  localparam q14_tab_t SIN_T = gen_sin();
  localparam w_tab_t   H_T   = gen_weight();

  typedef enum logic [1:0] {S_ACC, S_DRAIN, S_OUT} state_e;
  state_e state;

  logic [LOGN-1:0]        in_cnt;
  logic [$clog2(L)-1:0]   line;
  logic [$clog2(LAT+4)-1:0] drain;
  logic take;

  assign take    = (state == S_ACC) && f_valid && g_valid;
  assign f_ready = take;
  assign g_ready = take;

  // Side information travelling with the CORDIC pipeline.
  logic [LOGN-1:0] slot_d  [LAT];
  logic            first_d [LAT];
  always_ff @(posedge clk) begin
    slot_d[0]  <= f_idx;
    first_d[0] <= (line == '0);
    for (int i = 1; i < LAT; i++) begin
      slot_d[i]  <= slot_d[i-1];
      first_d[i] <= first_d[i-1];
    end
  end

  logic              vf, vg;
  logic [ANG_W-1:0]  ang_f, ang_g;
  cordic_vec #(.W(IN_W), .STAGES(STAGES)) u_cordic_f (
    .clk, .rst_n, .in_valid(take), .in_x(f_re), .in_y(f_im),
    .out_valid(vf), .out_ang(ang_f));
  cordic_vec #(.W(IN_W), .STAGES(STAGES)) u_cordic_g (
    .clk, .rst_n, .in_valid(take), .in_x(g_re), .in_y(g_im),
    .out_valid(vg), .out_ang(ang_g));

  // Stage A: phase difference -> table lookup (rounded to the nearest entry).
  logic [ANG_W-1:0]  dang;
  logic [TAB_W-1:0]  tab_idx;
  always_comb begin
    dang    = ang_f - ang_g + ANG_W'(1 << (ANG_W - TAB_W - 1));
    tab_idx = dang[ANG_W-1 -: TAB_W];
  end

  logic                    a_v, a_first;
  logic [LOGN-1:0]         a_slot;
  logic signed [15:0]      a_c, a_s, a_h;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_v <= 1'b0;
    else        a_v <= vf & vg;
  end
  always_ff @(posedge clk) begin
    a_c     <= COS_T[tab_idx];
    a_s     <= SIN_T[tab_idx];
    a_h     <= H_T[slot_d[LAT-1]];
    a_slot  <= slot_d[LAT-1];
    a_first <= first_d[LAT-1];
  end

  // Stage B: weighting and accumulation.
  logic signed [31:0] wr, wi;
  logic signed [OUT_W-1:0] acc_re [N];
  logic signed [OUT_W-1:0] acc_im [N];
  always_comb begin
    wr = (32'(a_c) * 32'(a_h) + 32'sd8192) >>> Q;
    wi = (32'(a_s) * 32'(a_h) + 32'sd8192) >>> Q;
  end
  always_ff @(posedge clk) begin
    if (a_v) begin
      acc_re[a_slot] <= (a_first ? '0 : acc_re[a_slot]) + OUT_W'(wr);
      acc_im[a_slot] <= (a_first ? '0 : acc_im[a_slot]) + OUT_W'(wi);
    end
  end

  logic [LOGN-1:0] out_cnt;
  assign out_valid = (state == S_OUT);
  assign out_re    = acc_re[out_cnt];
  assign out_im    = acc_im[out_cnt];
  assign out_idx   = out_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_ACC;
      in_cnt  <= '0;
      line    <= '0;
      drain   <= '0;
      out_cnt <= '0;
    end else begin
      unique case (state)
        S_ACC: if (take) begin
          in_cnt <= in_cnt + 1'b1;
          if (in_cnt == LOGN'(N - 1)) begin
            if (line == ($clog2(L))'(L - 1)) begin
              line  <= '0;
              state <= S_DRAIN;
              drain <= '0;
            end else begin
              line <= line + 1'b1;
            end
          end
        end
        S_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == ($clog2(LAT+4))'(LAT + 2)) state <= S_OUT;
        end
        S_OUT: if (out_ready) begin
          out_cnt <= out_cnt + 1'b1;
          if (out_cnt == LOGN'(N - 1)) state <= S_ACC;
        end
        default: state <= S_ACC;
      endcase
    end
  end

  // The accumulator must hold L full-scale contributions.
  initial assert (L * (1 << Q) < (1 << (OUT_W - 1)))
    else $error("eval_cps: OUT_W too small for L");
endmodule
