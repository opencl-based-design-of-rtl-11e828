// tb_reorder: sends blocks of N random values tagged with slot m and checks
// that output position n carries the value of slot bitrev(n), with random
// gaps on the input and random back-pressure on the output.
module tb_reorder;
  import poc_pkg::*;
  localparam int N = 32, W = 20, LOGN = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0, out_re, out_im;
  logic [LOGN-1:0] in_idx = 0;

  reorder #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #(10 * 50_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int vr [N], vi [N];
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int blk = 0; blk < 4; blk++) begin
      for (int m = 0; m < N; m++) begin
        vr[m] = $urandom_range(0, 1000000) - 500000;
        vi[m] = $urandom_range(0, 1000000) - 500000;
        @(negedge clk);
        in_valid = 0;
        while ($urandom_range(0, 2) == 0) @(negedge clk);
        in_valid = 1; in_re = W'(vr[m]); in_im = W'(vi[m]); in_idx = LOGN'(m);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(posedge clk);
      end
      @(negedge clk);
      in_valid = 0;
      for (int n = 0; n < N; n++) begin
        forever begin
          @(negedge clk);
          out_ready = (blk[0] == 1'b0) || ($urandom_range(0, 1) == 1);
          #1;
          if (out_valid && out_ready) break;
        end
        checks++;
        if (int'(out_re) != vr[bitrev(n, LOGN)] || int'(out_im) != vi[bitrev(n, LOGN)]) begin
          failures++;
          $display("block %0d position %0d: got %0d,%0d", blk, n, out_re, out_im);
        end
        @(posedge clk);
        #1;
        out_ready = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
