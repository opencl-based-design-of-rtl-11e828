// reorder: puts the averaged cross-power spectrum, which leaves eval_cps in
// the bit-reversed order of the forward FFT, back into natural frequency
// order for the following ifft1d.
// Slot m of the input (in_idx) is written to buffer entry bitrev(m); when
// all N have arrived the buffer is read out in order 0..N-1.
// Interface: valid/ready in and out; one buffer, so a block is fully
// written before it is read (N clocks in, N clocks out).
module reorder
  import poc_pkg::*;
#(
  parameter int N = 32,
  parameter int W = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  input  logic [$clog2(N)-1:0] in_idx,
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  localparam int LOGN = $clog2(N);

  logic signed [W-1:0] br [N];
  logic signed [W-1:0] bi [N];
  logic [LOGN-1:0]     cnt;
  logic                unloading;

  function automatic logic [LOGN-1:0] rev(logic [LOGN-1:0] v);
    for (int i = 0; i < LOGN; i++) rev[i] = v[LOGN-1-i];
  endfunction

  assign in_ready  = !unloading;
  assign out_valid = unloading;
  assign out_re    = br[cnt];
  assign out_im    = bi[cnt];

  always_ff @(posedge clk) begin
    if (in_valid && !unloading) begin
      br[rev(in_idx)] <= in_re;
      bi[rev(in_idx)] <= in_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      unloading <= 1'b0;
    end else if (!unloading) begin
      if (in_valid) begin
        cnt <= cnt + 1'b1;
        if (cnt == LOGN'(N - 1)) unloading <= 1'b1;
      end
    end else if (out_ready) begin
      cnt <= cnt + 1'b1;
      if (cnt == LOGN'(N - 1)) unloading <= 1'b0;
    end
  end
endmodule
