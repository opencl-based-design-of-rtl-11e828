// poc_top: FPGA accelerator for stereo correspondence matching by 1D
// phase-only correlation (POC), organised as a chain of kernels joined by
// FIFO channels.
//
//   host -> image memories I, J (layer 0) and point memory
//   make_high_layer x2 : layers 1..NLAYERS-1 of both pyramids
//   clip_image -> fft1d_sdf (f) \
//              -> fft1d_sdf (g) -> eval_cps -> reorder -> ifft1d -> find_peak
//   clip_image -> descriptor channel --------------------------> find_peak
//   find_peak  -> feedback channel (q_l of every point) -> clip_image
//   find_peak  -> result stream (sub-pixel q of every point, in order)
//
// Operation: while idle the host writes layer 0 of the reference image I
// and input image J (img_we, img_addr = y*W0 + x) and the reference points
// (pt_we, pt_addr, pt_data). A start pulse with n_points builds the coarser
// layers (make_high_layer, both images together, one layer after the
// other), then runs the matching: NLAYERS pixel-accuracy passes from the
// coarsest layer down, and one sub-pixel pass on layer 0. The horizontal
// coordinate of each point's correspondence leaves on res_q (signed,
// FRAC_W fractional bits) with valid/ready, in point order; the row is that
// of the reference point. done pulses once all n_points results have been
// taken; busy is high from start to done.
//
// The kernel split and the channels follow the described structure; the
// on-chip image memories (in place of board DRAM), the FFT structures and
// all widths and handshakes are this design's choices. The forward FFTs take
// one sample per clock and eval_cps sums one line per N clocks before it
// emits the N-point result, so a match of L lines takes about (L+1)N + 20
// clocks.
module poc_top
  import poc_pkg::*;
#(
  parameter int W0      = 1280,
  parameter int H0      = 960,
  parameter int N       = 32,
  parameter int L       = 15,
  parameter int NLAYERS = 4,
  parameter int NPTS    = 10000,
  localparam int DEPTH  = layer_base(NLAYERS, W0, H0),
  localparam int AW     = $clog2(DEPTH),
  localparam int AW0    = $clog2(W0 * H0),
  localparam int PW     = $clog2(NPTS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host loading
  input  logic                      img_we,
  input  logic [AW0-1:0]            img_addr,
  input  logic [PIX_W-1:0]          img_i,
  input  logic [PIX_W-1:0]          img_j,
  input  logic                      pt_we,
  input  logic [PW-1:0]             pt_addr,
  input  point_t                    pt_data,
  // control
  input  logic                      start,
  input  logic [$clog2(NPTS+1)-1:0] n_points,
  output logic                      busy,
  output logic                      done,
  // results
  output logic                      res_valid,
  input  logic                      res_ready,
  output subpix_t                   res_q
);
  localparam int LOGN  = $clog2(N);
  localparam int FW    = PIX_W + 9 + LOGN + 2;  // forward FFT width
  localparam int CW    = 16 + $clog2(L) + 1;    // averaged spectrum width
  localparam int IW    = CW + LOGN + 1;         // inverse FFT width

  // ---------------------------------------------------------------- control
  typedef enum logic [1:0] {T_IDLE, T_PYR, T_MATCH} top_state_e;
  top_state_e tstate;
  logic [$clog2(NLAYERS)-1:0]   layer;
  logic                         pyr_start, mhl_busy_i, mhl_busy_j;
  logic                         mhl_done_i, mhl_done_j, pyr_started;
  logic                         clip_start, clip_busy;
  logic [$clog2(NPTS+1)-1:0]    n_q, n_out;

  assign busy = (tstate != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate      <= T_IDLE;
      layer       <= '0;
      pyr_start   <= 1'b0;
      pyr_started <= 1'b0;
      clip_start  <= 1'b0;
      n_q         <= '0;
      n_out       <= '0;
      done        <= 1'b0;
    end else begin
      pyr_start  <= 1'b0;
      clip_start <= 1'b0;
      done       <= 1'b0;
      unique case (tstate)
        T_IDLE: if (start && n_points != '0) begin
          n_q         <= n_points;
          n_out       <= '0;
          layer       <= ($clog2(NLAYERS))'(1);
          pyr_start   <= 1'b1;
          pyr_started <= 1'b0;
          tstate      <= T_PYR;
        end
        T_PYR: begin
          if (!pyr_started) pyr_started <= 1'b1;
          else if (mhl_done_i) begin
            pyr_started <= 1'b0;
            if (layer == ($clog2(NLAYERS))'(NLAYERS - 1)) begin
              clip_start <= 1'b1;
              tstate     <= T_MATCH;
            end else begin
              layer     <= layer + 1'b1;
              pyr_start <= 1'b1;
            end
          end
        end
        T_MATCH: begin
          if (res_valid && res_ready) begin
            n_out <= n_out + 1'b1;
            if (n_out + 1'b1 == n_q) begin
              done   <= 1'b1;
              tstate <= T_IDLE;
            end
          end
        end
        default: tstate <= T_IDLE;
      endcase
    end
  end

  // --------------------------------------------------------------- memories
  logic          mi_we, mj_we;
  logic [AW-1:0] mi_waddr, mj_waddr, mi_raddr, mj_raddr;
  logic [PIX_W-1:0] mi_wdata, mj_wdata, mi_rdata, mj_rdata;
  logic          hi_we, hj_we;
  logic [AW-1:0] hi_waddr, hj_waddr, hi_raddr, hj_raddr, ci_raddr, cj_raddr;
  logic [PIX_W-1:0] hi_wdata, hj_wdata;

  always_comb begin
    if (tstate == T_IDLE) begin
      mi_we = img_we;  mi_waddr = AW'(img_addr); mi_wdata = img_i;
      mj_we = img_we;  mj_waddr = AW'(img_addr); mj_wdata = img_j;
    end else begin
      mi_we = hi_we;   mi_waddr = hi_waddr;      mi_wdata = hi_wdata;
      mj_we = hj_we;   mj_waddr = hj_waddr;      mj_wdata = hj_wdata;
    end
    mi_raddr = (tstate == T_PYR) ? hi_raddr : ci_raddr;
    mj_raddr = (tstate == T_PYR) ? hj_raddr : cj_raddr;
  end

  image_mem #(.W(PIX_W), .DEPTH(DEPTH)) u_mem_i (
    .clk, .we(mi_we), .waddr(mi_waddr), .wdata(mi_wdata),
    .raddr(mi_raddr), .rdata(mi_rdata));
  image_mem #(.W(PIX_W), .DEPTH(DEPTH)) u_mem_j (
    .clk, .we(mj_we), .waddr(mj_waddr), .wdata(mj_wdata),
    .raddr(mj_raddr), .rdata(mj_rdata));

  logic [PW-1:0] pt_raddr;
  point_t        pt_rdata;
  image_mem #(.W($bits(point_t)), .DEPTH(NPTS)) u_mem_pt (
    .clk, .we(pt_we && tstate == T_IDLE), .waddr(pt_addr), .wdata(pt_data),
    .raddr(pt_raddr), .rdata(pt_rdata));

  // ---------------------------------------------------------- make_high_layer
  make_high_layer #(.W0(W0), .H0(H0), .NLAYERS(NLAYERS), .DEPTH(DEPTH)) u_mhl_i (
    .clk, .rst_n, .start(pyr_start), .layer, .busy(mhl_busy_i), .done(mhl_done_i),
    .raddr(hi_raddr), .rdata(mi_rdata), .we(hi_we), .waddr(hi_waddr), .wdata(hi_wdata));
  make_high_layer #(.W0(W0), .H0(H0), .NLAYERS(NLAYERS), .DEPTH(DEPTH)) u_mhl_j (
    .clk, .rst_n, .start(pyr_start), .layer, .busy(mhl_busy_j), .done(mhl_done_j),
    .raddr(hj_raddr), .rdata(mj_rdata), .we(hj_we), .waddr(hj_waddr), .wdata(hj_wdata));

  // Both pyramids are built in lock-step.
  a_pyr_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                                   mhl_busy_i == mhl_busy_j && mhl_done_i == mhl_done_j);

  // -------------------------------------------------------------- clip_image
  logic fb_valid, fb_ready, fbc_valid, fbc_ready;
  coord_t fb_q, fbc_q;
  logic desc_valid, desc_ready, descc_valid, descc_ready;
  match_desc_t desc, descc;
  logic f_push, g_push, f_afull, g_afull, f_in_ready, g_in_ready, clip_starved;
  logic signed [FW-1:0] f_data, g_data;

  clip_image #(.N(N), .L(L), .NLAYERS(NLAYERS), .W0(W0), .H0(H0), .NPTS(NPTS),
               .OUT_W(FW), .DEPTH(DEPTH)) u_clip (
    .clk, .rst_n, .start(clip_start), .n_points(n_q), .busy(clip_busy),
    .pt_raddr, .pt_rdata,
    .fb_valid(fbc_valid), .fb_ready(fbc_ready), .fb_q(fbc_q),
    .desc_valid, .desc_ready, .desc,
    .i_raddr(ci_raddr), .i_rdata(mi_rdata), .j_raddr(cj_raddr), .j_rdata(mj_rdata),
    .f_afull, .g_afull, .f_valid(f_push), .f_data, .g_valid(g_push), .g_data,
    .starved(clip_starved));

  // ----------------------------------------------------------------- fft1d
  logic f_q_valid, f_q_ready, g_q_valid, g_q_ready;
  logic signed [FW-1:0] f_q, g_q;

  channel_fifo #(.W(FW), .DEPTH(4)) u_ch_f (
    .clk, .rst_n, .in_valid(f_push), .in_ready(f_in_ready), .in_data(f_data),
    .out_valid(f_q_valid), .out_ready(f_q_ready), .out_data(f_q),
    .almost_full(f_afull), .count());
  channel_fifo #(.W(FW), .DEPTH(4)) u_ch_g (
    .clk, .rst_n, .in_valid(g_push), .in_ready(g_in_ready), .in_data(g_data),
    .out_valid(g_q_valid), .out_ready(g_q_ready), .out_data(g_q),
    .almost_full(g_afull), .count());

  a_no_drop: assert property (@(posedge clk) disable iff (!rst_n)
                              (f_push |-> f_in_ready) and (g_push |-> g_in_ready));

  logic F_valid, F_ready, G_valid, G_ready;
  logic signed [FW-1:0] F_re, F_im, G_re, G_im;
  logic [LOGN-1:0] F_idx, G_idx;

  // Streaming FFTs, one window line per N clocks. The last line of a
  // burst is pushed out when clip_image has nothing more to send for now.
  fft1d_sdf #(.N(N), .W(FW)) u_fft_f (
    .clk, .rst_n, .in_valid(f_q_valid), .in_ready(f_q_ready), .in_re(f_q), .in_im('0),
    .flush(clip_starved),
    .out_valid(F_valid), .out_ready(F_ready), .out_re(F_re), .out_im(F_im), .out_idx(F_idx));
  fft1d_sdf #(.N(N), .W(FW)) u_fft_g (
    .clk, .rst_n, .in_valid(g_q_valid), .in_ready(g_q_ready), .in_re(g_q), .in_im('0),
    .flush(clip_starved),
    .out_valid(G_valid), .out_ready(G_ready), .out_re(G_re), .out_im(G_im), .out_idx(G_idx));

  // ---------------------------------------------------------------- eval_cps
  localparam int SW = 2 * FW + LOGN;
  logic Fc_valid, Fc_ready, Gc_valid, Gc_ready;
  logic [SW-1:0] Fc, Gc;
  channel_fifo #(.W(SW), .DEPTH(4)) u_ch_F (
    .clk, .rst_n, .in_valid(F_valid), .in_ready(F_ready), .in_data({F_re, F_im, F_idx}),
    .out_valid(Fc_valid), .out_ready(Fc_ready), .out_data(Fc), .almost_full(), .count());
  channel_fifo #(.W(SW), .DEPTH(4)) u_ch_G (
    .clk, .rst_n, .in_valid(G_valid), .in_ready(G_ready), .in_data({G_re, G_im, G_idx}),
    .out_valid(Gc_valid), .out_ready(Gc_ready), .out_data(Gc), .almost_full(), .count());

  logic R_valid, R_ready;
  logic signed [CW-1:0] R_re, R_im;
  logic [LOGN-1:0] R_idx;
  eval_cps #(.N(N), .L(L), .IN_W(FW), .OUT_W(CW)) u_cps (
    .clk, .rst_n,
    .f_valid(Fc_valid), .f_ready(Fc_ready),
    .f_re(Fc[SW-1 -: FW]), .f_im(Fc[LOGN +: FW]), .f_idx(Fc[LOGN-1:0]),
    .g_valid(Gc_valid), .g_ready(Gc_ready),
    .g_re(Gc[SW-1 -: FW]), .g_im(Gc[LOGN +: FW]),
    .out_valid(R_valid), .out_ready(R_ready), .out_re(R_re), .out_im(R_im), .out_idx(R_idx));

  // ----------------------------------------------------------------- reorder
  localparam int RW = 2 * CW + LOGN;
  logic Rc_valid, Rc_ready;
  logic [RW-1:0] Rc;
  channel_fifo #(.W(RW), .DEPTH(4)) u_ch_R (
    .clk, .rst_n, .in_valid(R_valid), .in_ready(R_ready), .in_data({R_re, R_im, R_idx}),
    .out_valid(Rc_valid), .out_ready(Rc_ready), .out_data(Rc), .almost_full(), .count());

  logic O_valid, O_ready;
  logic signed [CW-1:0] O_re, O_im;
  reorder #(.N(N), .W(CW)) u_reorder (
    .clk, .rst_n, .in_valid(Rc_valid), .in_ready(Rc_ready),
    .in_re(Rc[RW-1 -: CW]), .in_im(Rc[LOGN +: CW]), .in_idx(Rc[LOGN-1:0]),
    .out_valid(O_valid), .out_ready(O_ready), .out_re(O_re), .out_im(O_im));

  // ------------------------------------------------------------------ ifft1d
  logic Oc_valid, Oc_ready;
  logic [2*CW-1:0] Oc;
  channel_fifo #(.W(2 * CW), .DEPTH(4)) u_ch_O (
    .clk, .rst_n, .in_valid(O_valid), .in_ready(O_ready), .in_data({O_re, O_im}),
    .out_valid(Oc_valid), .out_ready(Oc_ready), .out_data(Oc), .almost_full(), .count());

  logic P_valid, P_ready;
  logic signed [IW-1:0] P_re, P_im;
  logic [LOGN-1:0] P_idx;
  fft1d #(.N(N), .W(IW), .INVERSE(1'b1)) u_ifft (
    .clk, .rst_n, .in_valid(Oc_valid), .in_ready(Oc_ready),
    .in_re(IW'($signed(Oc[2*CW-1 -: CW]))), .in_im(IW'($signed(Oc[CW-1:0]))),
    .out_valid(P_valid), .out_ready(P_ready), .out_re(P_re), .out_im(P_im), .out_idx(P_idx));

  // --------------------------------------------------------------- find_peak
  logic Pc_valid, Pc_ready;
  logic [IW+LOGN-1:0] Pc;
  channel_fifo #(.W(IW + LOGN), .DEPTH(4)) u_ch_P (
    .clk, .rst_n, .in_valid(P_valid), .in_ready(P_ready), .in_data({P_re, P_idx}),
    .out_valid(Pc_valid), .out_ready(Pc_ready), .out_data(Pc), .almost_full(), .count());

  channel_fifo #(.W($bits(match_desc_t)), .DEPTH(4)) u_ch_desc (
    .clk, .rst_n, .in_valid(desc_valid), .in_ready(desc_ready), .in_data(desc),
    .out_valid(descc_valid), .out_ready(descc_ready), .out_data(descc),
    .almost_full(), .count());

  logic pk_res_valid, pk_res_ready;
  subpix_t pk_res_q;
  find_peak #(.N(N), .W(IW)) u_peak (
    .clk, .rst_n, .in_valid(Pc_valid), .in_ready(Pc_ready),
    .in_re(Pc[IW+LOGN-1 -: IW]), .in_idx(Pc[LOGN-1:0]),
    .desc_valid(descc_valid), .desc_ready(descc_ready), .desc(descc),
    .fb_valid, .fb_ready, .fb_q,
    .res_valid(pk_res_valid), .res_ready(pk_res_ready), .res_q(pk_res_q));

  // Feedback channel: holds the q_l of every point of one pass.
  channel_fifo #(.W(COORD_W), .DEPTH(NPTS)) u_ch_fb (
    .clk, .rst_n, .in_valid(fb_valid), .in_ready(fb_ready), .in_data(fb_q),
    .out_valid(fbc_valid), .out_ready(fbc_ready), .out_data(fbc_q),
    .almost_full(), .count());

  // Result channel.
  channel_fifo #(.W($bits(subpix_t)), .DEPTH(4)) u_ch_res (
    .clk, .rst_n, .in_valid(pk_res_valid), .in_ready(pk_res_ready), .in_data(pk_res_q),
    .out_valid(res_valid), .out_ready(res_ready), .out_data(res_q),
    .almost_full(), .count());

  logic unused;
  assign unused = ^{mhl_busy_i, mhl_busy_j, clip_busy, P_im, G_idx};
endmodule
