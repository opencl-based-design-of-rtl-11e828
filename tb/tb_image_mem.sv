// tb_image_mem: random writes and reads on a small memory against an array
// model, checking the one-clock read latency and old-data on a read of the
// address being written.
module tb_image_mem;
  localparam int W = 8, DEPTH = 100;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0;
  always #5 clk = ~clk;

  logic we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;

  image_mem #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #(10 * 50_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] model [DEPTH];
  initial begin
    logic [W-1:0] expd;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = W'($urandom);
      model[a] = wdata;
    end
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      we    = $urandom_range(0, 1);
      waddr = AW'($urandom_range(0, DEPTH - 1));
      raddr = (c % 5 == 0) ? waddr : AW'($urandom_range(0, DEPTH - 1));
      wdata = W'($urandom);
      expd  = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata != expd) begin
        failures++;
        $display("read %0d: got %0h expected %0h", raddr, rdata, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
