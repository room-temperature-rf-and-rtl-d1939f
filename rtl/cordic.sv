// cordic: fully pipelined CORDIC, one input per clock.
//
// VECTORING = 1: arctangent mode.  Drives y to zero and returns the angle of
//   (x_in, y_in) as a phase word (one turn = 2**PHASE_W) plus the magnitude
//   scaled by the CORDIC gain (~1.647).  Inputs with x < 0 are first turned
//   by half a turn so every angle of the plane is covered.
// VECTORING = 0: rotation mode.  Turns (x_in, y_in) counter-clockwise by
//   z_in; the result carries the same ~1.647 gain.  Angles beyond a quarter
//   turn are folded by a half-turn pre-rotation.
//
// The readout chain uses CORDICs to compute the arc angle, to rotate the
// centred arc onto the x axis, and for the arctangent after the flux-ramp
// integration; the iterative shift-add structure is the standard one, the
// pipeline depth (ITERS + 1 clocks from in_valid to out_valid) and the
// TAG side-band that travels with each sample are this design's choices.
module cordic #(
  parameter int  W         = 20,           // internal x/y width (inputs are sign-extended)
  parameter int  IN_W      = 18,
  parameter int  ITERS     = lxm_pkg::CORDIC_ITERS,
  parameter bit  VECTORING = 1'b1,
  parameter int  TAG_W     = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic signed [IN_W-1:0]       x_in,
  input  logic signed [IN_W-1:0]       y_in,
  input  logic [lxm_pkg::PHASE_W-1:0]  z_in,
  input  logic [TAG_W-1:0]             tag_in,
  output logic                         out_valid,
  output logic signed [W-1:0]          x_out,
  output logic signed [W-1:0]          y_out,
  output logic [lxm_pkg::PHASE_W-1:0]  z_out,
  output logic [TAG_W-1:0]             tag_out
);
  import lxm_pkg::*;
  localparam int PW = PHASE_W;

  logic signed [W-1:0]  xs [ITERS+1];
  logic signed [W-1:0]  ys [ITERS+1];
  logic [PW-1:0]        zs [ITERS+1];
  logic [TAG_W-1:0]     ts [ITERS+1];
  logic                 vs [ITERS+1];

  // stage 0: quadrant pre-rotation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs[0] <= 1'b0;
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; ts[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      ts[0] <= tag_in;
      if (VECTORING) begin
        if (x_in < 0) begin
          xs[0] <= -W'(x_in); ys[0] <= -W'(y_in); zs[0] <= PW'(1) << (PW-1);
        end else begin
          xs[0] <= W'(x_in);  ys[0] <= W'(y_in);  zs[0] <= '0;
        end
      end else begin
        // fold |angle| > quarter turn: rotate input by half a turn
        if (z_in[PW-1] ^ z_in[PW-2]) begin
          xs[0] <= -W'(x_in); ys[0] <= -W'(y_in); zs[0] <= z_in - (PW'(1) << (PW-1));
        end else begin
          xs[0] <= W'(x_in);  ys[0] <= W'(y_in);  zs[0] <= z_in;
        end
      end
    end
  end

  for (genvar i = 0; i < ITERS; i++) begin : g_stage
    logic dir;   // 1: rotate counter-clockwise
    assign dir = VECTORING ? ys[i][W-1] : ~zs[i][PW-1];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[i+1] <= 1'b0;
        xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0; ts[i+1] <= '0;
      end else begin
        vs[i+1] <= vs[i];
        ts[i+1] <= ts[i];
        if (dir) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - atan_lut(i);
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + atan_lut(i);
        end
      end
    end
  end

  // z starts at the pre-rotation and collects minus every micro-rotation:
  // in vectoring mode it ends at the input angle, in rotation mode near 0.
  assign out_valid = vs[ITERS];
  assign x_out     = xs[ITERS];
  assign y_out     = ys[ITERS];
  assign z_out     = zs[ITERS];
  assign tag_out   = ts[ITERS];
endmodule
