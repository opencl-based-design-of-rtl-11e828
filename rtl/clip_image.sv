// clip_image: drives the coarse-to-fine correspondence search and clips the
// search windows out of the two image pyramids.
//
// Passes: for layers l = NLAYERS-1 down to 0 (pixel accuracy), then once
// more on layer 0 (sub-pixel accuracy). In every pass each of the n_points
// reference points p0 (from the point memory) is taken in order:
//   p_l = floor(p0 / 2^l)                                   (Eq. 2)
//   q_{l+1} = p_{NLAYERS} in the first pass (coarsest guess), otherwise
//             the result of the previous pass, popped from the feedback
//             channel that find_peak fills;
//   g centre gc = 2 q_{l+1}, or q_0 itself in the sub-pixel pass.
// A descriptor {gc, final} goes to find_peak; then L lines of N pixels are
// read, f around p_l from the reference image I and g around (gc, p_l.y)
// from the input image J (rows p_l.y-(L-1)/2 .. +(L-1)/2, columns
// centre-N/2 .. centre+N/2-1), each multiplied by the Hann window w(c).
// The search is horizontal only (rectified pair): q keeps the row of p.
// Coordinates outside the layer are clamped to its border.
//
// Interface: start (with n_points) begins; busy falls when the last window
// has been issued. Point and image memories have one clock of read
// latency. f_valid/g_valid push one windowed sample each into the FFT
// channels; a read is issued only while neither channel is almost full.
// Timing: one pixel pair per clock when not stalled; 3 clocks per point
// for fetch, feedback and descriptor.
module clip_image
  import poc_pkg::*;
#(
  parameter int N       = 32,
  parameter int L       = 15,
  parameter int NLAYERS = 4,
  parameter int W0      = 1280,
  parameter int H0      = 960,
  parameter int NPTS    = 10000,
  parameter int OUT_W   = 24,
  parameter int DEPTH   = layer_base(NLAYERS, W0, H0)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [$clog2(NPTS+1)-1:0] n_points,
  output logic                      busy,
  // reference-point memory
  output logic [$clog2(NPTS)-1:0]   pt_raddr,
  input  point_t                    pt_rdata,
  // feedback channel from find_peak
  input  logic                      fb_valid,
  output logic                      fb_ready,
  input  coord_t                    fb_q,
  // descriptor channel to find_peak
  output logic                      desc_valid,
  input  logic                      desc_ready,
  output match_desc_t               desc,
  // image memories
  output logic [$clog2(DEPTH)-1:0]  i_raddr,
  input  logic [PIX_W-1:0]          i_rdata,
  output logic [$clog2(DEPTH)-1:0]  j_raddr,
  input  logic [PIX_W-1:0]          j_rdata,
  // windowed samples to the fft1d channels
  input  logic                      f_afull,
  input  logic                      g_afull,
  output logic                      f_valid,
  output logic signed [OUT_W-1:0]   f_data,
  output logic                      g_valid,
  output logic signed [OUT_W-1:0]   g_data,
  // No samples will follow soon (idle, or waiting for feedback), so the
  // FFT kernels can push out the line they hold.
  output logic                      starved
);
  localparam int AW   = $clog2(DEPTH);
  localparam int PW   = $clog2(NPTS);
  localparam int HALF = (L - 1) / 2;

  typedef logic [AW-1:0] base_tab_t [NLAYERS];
  typedef logic [8:0]    win_tab_t  [N];
  function automatic base_tab_t gen_base();
    for (int l = 0; l < NLAYERS; l++) gen_base[l] = AW'(layer_base(l, W0, H0));
  endfunction
  function automatic win_tab_t gen_win();
    for (int c = 0; c < N; c++) gen_win[c] = hann_q8(c, N);
  endfunction
  localparam base_tab_t BASE = gen_base();
  localparam win_tab_t  WIN  = gen_win();

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_GUESS, S_DESC, S_CLIP} state_e;
  state_e state;

  logic [PW-1:0]                  idx;
  logic [$clog2(NLAYERS+1)-1:0]   pass;
  logic [$clog2(NLAYERS)-1:0]     layer;
  logic                           final_pass;
  coord_t                         plx, ply, gc, wl, hl;
  logic [$clog2(L)-1:0]           row;
  logic [$clog2(N)-1:0]           col;

  assign final_pass = (pass == ($clog2(NLAYERS+1))'(NLAYERS));
  assign layer      = final_pass ? '0
                    : ($clog2(NLAYERS))'(NLAYERS - 1 - int'(pass));
  assign pt_raddr   = idx;
  assign busy       = (state != S_IDLE);

  // Coarsest guess q_{NLAYERS} = p_{NLAYERS}.
  coord_t q_next;
  assign q_next   = (pass == '0) ? (pt_rdata.x >>> NLAYERS) : fb_q;
  assign fb_ready = (state == S_GUESS) && (pass != '0);
  assign starved  = (state == S_IDLE) || (fb_ready && !fb_valid);

  assign desc_valid  = (state == S_DESC);
  assign desc.gc     = gc;
  assign desc.final_ = final_pass;

  // Clamped window coordinates and addresses.
  function automatic coord_t clamp(coord_t v, coord_t hi);
    if (v < 0)   return '0;
    if (v >= hi) return hi - 1'b1;
    return v;
  endfunction

  coord_t yy, xf, xg;
  logic   issue;
  always_comb begin
    yy = clamp(ply - coord_t'(HALF) + coord_t'(row), hl);
    xf = clamp(plx - coord_t'(N/2) + coord_t'(col), wl);
    xg = clamp(gc  - coord_t'(N/2) + coord_t'(col), wl);
    i_raddr = BASE[layer] + AW'(32'(yy) * 32'(wl) + 32'(xf));
    j_raddr = BASE[layer] + AW'(32'(yy) * 32'(wl) + 32'(xg));
  end
  assign issue = (state == S_CLIP) && !f_afull && !g_afull;

  logic last_col, last_row;
  assign last_col = (col == ($clog2(N))'(N - 1));
  assign last_row = (row == ($clog2(L))'(L - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      pass  <= '0;
      plx   <= '0;
      ply   <= '0;
      gc    <= '0;
      wl    <= '0;
      hl    <= '0;
      row   <= '0;
      col   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start && n_points != '0) begin
          idx   <= '0;
          pass  <= '0;
          state <= S_FETCH;
        end
        S_FETCH: state <= S_GUESS;      // point memory read in flight
        S_GUESS: if (pass == '0 || fb_valid) begin
          plx   <= pt_rdata.x >>> layer;
          ply   <= pt_rdata.y >>> layer;
          wl    <= coord_t'(W0 >> layer);
          hl    <= coord_t'(H0 >> layer);
          gc    <= final_pass ? q_next : (q_next <<< 1);
          state <= S_DESC;
        end
        S_DESC: if (desc_ready) begin
          row   <= '0;
          col   <= '0;
          state <= S_CLIP;
        end
        S_CLIP: if (issue) begin
          col <= col + 1'b1;
          if (last_col) begin
            col <= '0;
            row <= row + 1'b1;
            if (last_row) begin
              if (32'(idx) == 32'(n_points) - 1) begin
                idx <= '0;
                if (final_pass) state <= S_IDLE;
                else begin
                  pass  <= pass + 1'b1;
                  state <= S_FETCH;
                end
              end else begin
                idx   <= idx + 1'b1;
                state <= S_FETCH;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Image data returns one clock after the read; apply the window.
  logic         v_d;
  logic [8:0]   w_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d <= 1'b0;
      w_d <= '0;
    end else begin
      v_d <= issue;
      w_d <= WIN[col];
    end
  end
  assign f_valid = v_d;
  assign g_valid = v_d;
  assign f_data  = OUT_W'(32'(i_rdata) * 32'(w_d));
  assign g_data  = OUT_W'(32'(j_rdata) * 32'(w_d));
endmodule
