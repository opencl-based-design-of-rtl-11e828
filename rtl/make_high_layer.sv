// make_high_layer: builds pyramid layer l of one image from layer l-1,
//   I_l(n1, n2) = 1/4 sum_{i1,i2 in {0,1}} I_{l-1}(2 n1 + i1, 2 n2 + i2),
// reading and writing the image memory that holds all layers back to back
// (layer j is (W0>>j) x (H0>>j) pixels, row-major, at layer_base(j)).
//
// How: for every output pixel, in raster order, four reads are issued on
// consecutive clocks (top-left, top-right, bottom-left, bottom-right); the
// read data, one clock later, is summed, and the sum divided by four
// (truncated) is written with the fourth sample. Reads are issued
// back-to-back, so one output pixel is produced every 4 clocks.
// Interface: pulse start with layer (1..NLAYERS-1); busy stays high until
// the last write; done pulses for one clock after it. The memory read port
// has one clock of latency.
module make_high_layer
  import poc_pkg::*;
#(
  parameter int W0      = 1280,
  parameter int H0      = 960,
  parameter int NLAYERS = 4,
  parameter int DEPTH   = layer_base(NLAYERS, W0, H0)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [$clog2(NLAYERS)-1:0] layer,
  output logic                     busy,
  output logic                     done,
  output logic [$clog2(DEPTH)-1:0] raddr,
  input  logic [PIX_W-1:0]         rdata,
  output logic                     we,
  output logic [$clog2(DEPTH)-1:0] waddr,
  output logic [PIX_W-1:0]         wdata
);
  localparam int AW = $clog2(DEPTH);

  typedef logic [AW-1:0] base_tab_t [NLAYERS];
  function automatic base_tab_t gen_base();
    for (int l = 0; l < NLAYERS; l++) gen_base[l] = AW'(layer_base(l, W0, H0));
  endfunction
  localparam base_tab_t BASE = gen_base();

  logic [AW-1:0]   src_base, dst_base, dst_addr;
  logic [15:0]     sw, dw, dh;          // source width, destination size
  logic [15:0]     x, y;
  logic [1:0]      ph;
  logic            issuing;
  logic            v_d, last_d;
  logic [1:0]      ph_d;
  logic [AW-1:0]   dst_d;
  logic [PIX_W+1:0] acc;

  // Address of sample ph of output pixel (x, y).
  logic [AW-1:0] src_addr;
  always_comb begin
    src_addr = src_base + AW'((2 * 32'(y) + 32'(ph[1])) * 32'(sw))
                        + AW'(2 * 32'(x) + 32'(ph[0]));
    dst_addr = dst_base + AW'(32'(y) * 32'(dw) + 32'(x));
  end
  assign raddr = src_addr;

  logic last_issue;
  assign last_issue = issuing && ph == 2'd3 && x == dw - 1'b1 && y == dh - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing  <= 1'b0;
      busy     <= 1'b0;
      done     <= 1'b0;
      x        <= '0;
      y        <= '0;
      ph       <= '0;
      src_base <= '0;
      dst_base <= '0;
      sw       <= '0;
      dw       <= '0;
      dh       <= '0;
      v_d      <= 1'b0;
      last_d   <= 1'b0;
      ph_d     <= '0;
      dst_d    <= '0;
      acc      <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        issuing  <= 1'b1;
        x        <= '0;
        y        <= '0;
        ph       <= '0;
        src_base <= BASE[layer - 1'b1];
        dst_base <= BASE[layer];
        sw       <= 16'(W0 >> (layer - 1'b1));
        dw       <= 16'(W0 >> layer);
        dh       <= 16'(H0 >> layer);
      end else if (issuing) begin
        ph <= ph + 1'b1;
        if (ph == 2'd3) begin
          if (x == dw - 1'b1) begin
            x <= '0;
            y <= y + 1'b1;
          end else begin
            x <= x + 1'b1;
          end
        end
        if (last_issue) issuing <= 1'b0;
      end
      // Read data returns one clock after the address.
      v_d    <= issuing;
      ph_d   <= ph;
      dst_d  <= dst_addr;
      last_d <= last_issue;
      if (v_d) acc <= (ph_d == 2'd0) ? (PIX_W+2)'(rdata) : acc + (PIX_W+2)'(rdata);
      if (v_d && last_d) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  logic [PIX_W+1:0] sum4;
  assign sum4  = acc + (PIX_W+2)'(rdata);
  assign we    = v_d && ph_d == 2'd3;
  assign waddr = dst_d;
  assign wdata = sum4[PIX_W+1:2];
endmodule
