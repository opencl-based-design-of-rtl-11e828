// channel_fifo: a synchronous FIFO implementing one channel between two
// kernels. Channels carry the intermediate data of the pipeline from kernel
// to kernel without going through global memory, and also synchronise the
// kernels: a producer stalls while the channel is full, a consumer while it
// is empty.
//
// Interface: valid/ready on both sides. A word moves in on a cycle with
// in_valid && in_ready and out on a cycle with out_valid && out_ready.
// in_ready is !full; out_valid is !empty; out_data shows the head word
// (first-word fall-through). almost_full rises when one slot or less is
// left, for producers with a one-cycle read latency that must stop issuing
// a cycle early. DEPTH is any value >= 2; it need not be a power of two.
// Reset empties the FIFO. The storage is an array without reset.
module channel_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic         almost_full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic          push, pop;

  assign in_ready    = (count != ($clog2(DEPTH+1))'(DEPTH));
  assign out_valid   = (count != '0);
  assign push        = in_valid && in_ready;
  assign pop         = out_valid && out_ready;
  assign out_data    = mem[rd_ptr];
  assign almost_full = (count >= ($clog2(DEPTH+1))'(DEPTH - 1));

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= incr(wr_ptr);
      if (pop)  rd_ptr <= incr(rd_ptr);
      if (push && !pop)      count <= count + 1'b1;
      else if (pop && !push) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // Occupancy never exceeds the depth: a full channel refuses writes.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  32'(count) <= DEPTH);
endmodule
