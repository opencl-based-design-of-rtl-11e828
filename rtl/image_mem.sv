// image_mem: simple dual-port memory (one write port, one read port) used as
// the on-chip store of an image pyramid and of the reference-point list.
// The read is synchronous: rdata shows mem[raddr] one clock after raddr is
// presented. A read and a write to the same address in one cycle return the
// old word. No reset: the contents are whatever was written.
// In the original system the images live in the board's DDR3 global memory;
// here the pyramid is kept in on-chip block RAM (this design's choice).
module image_mem #(
  parameter int W     = 8,
  parameter int DEPTH = 1632000   // 1280x960 layers 0..3
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
