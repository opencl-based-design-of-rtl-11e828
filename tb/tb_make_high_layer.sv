// tb_make_high_layer: a 32x16 random layer 0 is placed in a memory model
// with one clock of read latency; layers 1 and 2 are then built one after
// the other and compared, pixel by pixel, with the truncated 2x2 mean
// computed here. Also checks that each layer takes 4 clocks per output
// pixel plus one clock of read latency and that layer 0 is left
// untouched.
module tb_make_high_layer;
  import poc_pkg::*;
  localparam int W0 = 32, H0 = 16, NL = 3;
  localparam int DEPTH = layer_base(NL, W0, H0);
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done, we;
  logic [$clog2(NL)-1:0] layer = '0;
  logic [AW-1:0] raddr, waddr;
  logic [7:0] rdata = '0, wdata;

  make_high_layer #(.W0(W0), .H0(H0), .NLAYERS(NL), .DEPTH(DEPTH)) dut (.*);

  logic [7:0] mem [DEPTH];
  always @(posedge clk) begin
    rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

  int checks = 0, failures = 0;
  initial begin
    #(10 * 50_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int model [NL][H0][W0];
  initial begin
    int t0, t1, err, npix;
    for (int a = 0; a < DEPTH; a++) mem[a] = 8'hAA;
    for (int y = 0; y < H0; y++)
      for (int x = 0; x < W0; x++) begin
        model[0][y][x] = $urandom_range(0, 255);
        mem[y * W0 + x] = 8'(model[0][y][x]);
      end
    for (int l = 1; l < NL; l++)
      for (int y = 0; y < (H0 >> l); y++)
        for (int x = 0; x < (W0 >> l); x++)
          model[l][y][x] = (model[l-1][2*y][2*x] + model[l-1][2*y][2*x+1] +
                            model[l-1][2*y+1][2*x] + model[l-1][2*y+1][2*x+1]) / 4;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int l = 1; l < NL; l++) begin
      @(negedge clk);
      start = 1; layer = ($clog2(NL))'(l);
      @(posedge clk);
      t0 = $time / 10;
      #1 start = 0;
      @(posedge done);
      t1 = $time / 10;
      npix = (W0 >> l) * (H0 >> l);
      checks++;
      if (t1 - t0 != 4 * npix + 1) begin
        failures++;
        $display("layer %0d took %0d clocks, expected %0d", l, t1 - t0, 4 * npix + 1);
      end
      @(posedge clk);
      err = 0;
      for (int y = 0; y < (H0 >> l); y++)
        for (int x = 0; x < (W0 >> l); x++) begin
          checks++;
          if (int'(mem[layer_base(l, W0, H0) + y * (W0 >> l) + x]) != model[l][y][x]) begin
            failures++;
            if (err++ < 5) $display("layer %0d (%0d,%0d): got %0d expected %0d", l, x, y,
                                    mem[layer_base(l, W0, H0) + y * (W0 >> l) + x], model[l][y][x]);
          end
        end
    end
    err = 0;
    for (int a = 0; a < W0 * H0; a++) if (int'(mem[a]) != model[0][a / W0][a % W0]) err++;
    checks++;
    if (err != 0) begin failures++; $display("layer 0 overwritten"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
