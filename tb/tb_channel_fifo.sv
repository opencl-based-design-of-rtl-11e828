// tb_channel_fifo: random pushes and pops on a 5-deep channel (not a power
// of two) against a queue model: data order, in_ready/out_valid against
// the model occupancy, count and almost_full.
module tb_channel_fifo;
  localparam int W = 16, DEPTH = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0, almost_full;
  logic [W-1:0] in_data = '0, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  channel_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #(10 * 50_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] q [$];
  int n_full = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      // Bias towards filling in the first half, draining in the second.
      in_valid  = ($urandom_range(0, 9) < ((c < 1500) ? 7 : 3));
      in_data   = W'($urandom);
      out_ready = ($urandom_range(0, 9) < ((c < 1500) ? 3 : 7));
      #1;
      checks++;
      if (in_ready != (q.size() < DEPTH) || out_valid != (q.size() > 0) ||
          int'(count) != q.size() || almost_full != (q.size() >= DEPTH - 1) ||
          (out_valid && out_data != q[0])) begin
        failures++;
        $display("cycle %0d: state mismatch (size %0d, count %0d)", c, q.size(), count);
      end
      if (q.size() == DEPTH) n_full++;
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && q.size() < DEPTH + ((out_valid && out_ready) ? 1 : 0) && in_ready)
        q.push_back(in_data);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
