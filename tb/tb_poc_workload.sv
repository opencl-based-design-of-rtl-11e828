// tb_poc_workload: the evaluated workload (10 000 reference points, 32x15
// windows, 4 layers) at the default size, on a 100 x 100 grid over 1280x960
// images. I is random texture; J is I moved right by DISP pixels
// in the upper half and DISP + 1/2 pixel in the lower half. Every result is
// checked against the true correspondence: within 1/4 pixel, or within one
// pixel for points whose 15-line window straddles the disparity step.
// Reports the clock count of the matching phase.
module tb_poc_workload;
  import poc_pkg::*;

  localparam int W0 = 1280, H0 = 960, NPTS = 10000;
  localparam int DISP = 37;
  localparam int NP = 10000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic img_we = 0, pt_we = 0, start = 0, res_ready = 0;
  logic [$clog2(W0*H0)-1:0] img_addr = '0;
  logic [7:0] img_i = '0, img_j = '0;
  logic [$clog2(NPTS)-1:0] pt_addr = '0;
  point_t pt_data = '0;
  logic [$clog2(NPTS+1)-1:0] n_points = '0;
  logic busy, done, res_valid;
  subpix_t res_q;

  poc_top dut (.*);

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    #(64'd10 * 64'd200_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned imgI [][];
  int px [NP], py [NP], qx2 [NP];

  initial begin
    int got, idx, tol, worst;
    longint t_start, t_end;
    byte unsigned pj;
    imgI = new[H0];
    for (int y = 0; y < H0; y++) begin
      imgI[y] = new[W0];
      for (int x = 0; x < W0; x++) imgI[y][x] = 8'($urandom_range(0, 255));
    end
    for (int i = 0; i < NP; i++) begin
      px[i] = 64 + (i % 100) * 11;
      py[i] = 20 + (i / 100) * 9;
      qx2[i] = 2 * (px[i] + DISP) + ((py[i] >= H0 / 2) ? 1 : 0);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int y = 0; y < H0; y++)
      for (int x = 0; x < W0; x++) begin
        if (x < DISP + 1)    pj = 8'($urandom_range(0, 255));
        else if (y < H0 / 2) pj = imgI[y][x-DISP];
        else                 pj = 8'((int'(imgI[y][x-DISP]) + imgI[y][x-DISP-1] + 1) / 2);
        @(negedge clk);
        img_we = 1; img_addr = ($clog2(W0*H0))'(y * W0 + x);
        img_i = imgI[y][x]; img_j = pj;
      end
    for (int i = 0; i < NP; i++) begin
      @(negedge clk);
      img_we = 0;
      pt_we = 1; pt_addr = ($clog2(NPTS))'(i);
      pt_data.x = coord_t'(px[i]); pt_data.y = coord_t'(py[i]);
    end
    @(negedge clk);
    pt_we = 0;
    n_points = ($clog2(NPTS+1))'(NP);
    start = 1;
    @(negedge clk);
    start = 0;
    #1;
    while (int'(dut.tstate) != 2) begin @(negedge clk); #1; end
    t_start = cycles;
    res_ready = 1;
    idx = 0;
    worst = 0;
    while (idx < NP) begin
      @(negedge clk);
      #1;
      if (res_valid) begin
        got = int'(res_q);
        tol = (py[idx] > H0 / 2 - 8 && py[idx] < H0 / 2 + 8) ? 256 : 64;
        checks++;
        if (2 * got - qx2[idx] * 256 > 2 * tol || qx2[idx] * 256 - 2 * got > 2 * tol) begin
          failures++;
          if (failures < 10)
            $display("point %0d (%0d,%0d): q=%0.3f expected %0.1f", idx, px[idx], py[idx],
                     real'(got) / 256.0, qx2[idx] / 2.0);
        end
        if (tol == 64 && (2 * got - qx2[idx] * 256) > worst) worst = 2 * got - qx2[idx] * 256;
        if (tol == 64 && (qx2[idx] * 256 - 2 * got) > worst) worst = qx2[idx] * 256 - 2 * got;
        idx++;
      end
    end
    t_end = cycles;
    $display("matching %0d points: %0d clocks (%0d per point), worst interior error %0.4f px",
             NP, t_end - t_start, (t_end - t_start) / NP, real'(worst) / 512.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
