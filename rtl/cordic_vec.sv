// cordic_vec: pipelined CORDIC in vectoring mode, giving the phase angle of
// a complex number. Used by eval_cps to take the phases theta_F, theta_G of
// the two spectra without any division or square root.
//
// The input vector is first turned into the right half-plane (adding half a
// turn when x < 0), then STAGES micro-rotations drive y to zero while the
// angle accumulator collects +/-atan(2^-i). The angle is an unsigned
// ANG_W-bit fraction of a full turn (0 = +x axis, 2^(ANG_W-2) = +y axis).
// Timing: fully pipelined, one vector per clock, latency STAGES+1 clocks;
// out_valid follows in_valid by that latency. No stall input: the consumer
// must always accept. The magnitude (scaled by the CORDIC gain) is dropped.
module cordic_vec
  import poc_pkg::*;
#(
  parameter int W      = 24,
  parameter int STAGES = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_x,
  input  logic signed [W-1:0] in_y,
  output logic                out_valid,
  output logic [ANG_W-1:0]    out_ang
);
  localparam int XW = W + 2;   // room for sign flip and CORDIC gain

  typedef logic [ANG_W-1:0] ang_tab_t [STAGES];
  function automatic ang_tab_t gen_atan();
    for (int i = 0; i < STAGES; i++) gen_atan[i] = atan_ang(i);
  endfunction
  localparam ang_tab_t ATAN = gen_atan();

  logic signed [XW-1:0] x [STAGES+1];
  logic signed [XW-1:0] y [STAGES+1];
  logic [ANG_W-1:0]     z [STAGES+1];
  logic [STAGES:0]      v;

  // Pre-rotation into the right half-plane.
  always_ff @(posedge clk) begin
    if (in_x < 0) begin
      x[0] <= -XW'(in_x);
      y[0] <= -XW'(in_y);
      z[0] <= ANG_W'(1) << (ANG_W - 1);
    end else begin
      x[0] <= XW'(in_x);
      y[0] <= XW'(in_y);
      z[0] <= '0;
    end
  end

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (y[i] >= 0) begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + ATAN[i];
      end else begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - ATAN[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[STAGES-1:0], in_valid};
  end

  assign out_valid = v[STAGES];
  assign out_ang   = z[STAGES];
endmodule
