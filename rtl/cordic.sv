// cordic: pipelined CORDIC that converts between rectangular and polar form.
//
// Each sample carries its own operation:
//   op_vec = 1 (vectoring, rectangular to polar): inputs x, y, z.
//     Outputs x_out = G*sqrt(x^2+y^2), y_out ~ 0, z_out = z + atan2(y, x).
//   op_vec = 0 (rotation, polar to rectangular): inputs x, y, z.
//     Outputs x_out + j*y_out = G*(x + j*y) * exp(j*2*pi*z/2^WIDTH).
// Angles are unsigned WIDTH-bit fractions of a full turn. G is the CORDIC
// gain (about 1.6468) halved by the output scaling, so G = 0.8234; outputs are
// saturated to WIDTH bits. x and y are carried with two guard bits inside.
// A pre-rotation by half a turn brings every input into the half plane where
// the iterations converge, so all four quadrants work.
//
// Timing: one sample per clock, latency STAGES + 1 clocks; valid
// follows the data. rst (synchronous) clears only the valid pipeline.
//
// The 22-bit datapath and 20 stages are the controller's published figures;
// the gain handling, angle format and pre-rotation are this design's choices.
module cordic #(
  parameter int unsigned WIDTH  = 22,
  parameter int unsigned STAGES = 20
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic                    op_vec,
  input  logic signed [WIDTH-1:0] x_in,
  input  logic signed [WIDTH-1:0] y_in,
  input  logic        [WIDTH-1:0] z_in,
  output logic                    out_valid,
  output logic signed [WIDTH-1:0] x_out,
  output logic signed [WIDTH-1:0] y_out,
  output logic        [WIDTH-1:0] z_out
);
  import llrf_pkg::*;

  localparam int unsigned IW = WIDTH + 2;

  logic signed [IW-1:0]    xs [STAGES+1];
  logic signed [IW-1:0]    ys [STAGES+1];
  logic        [WIDTH-1:0] zs [STAGES+1];
  logic                    vs [STAGES+1];
  logic                    ms [STAGES+1];

  // Pre-rotation by half a turn where needed.
  logic signed [IW-1:0] x_ext, y_ext;
  assign x_ext = IW'(x_in);
  assign y_ext = IW'(y_in);

  always_ff @(posedge clk) begin
    vs[0] <= in_valid && !rst;
    ms[0] <= op_vec;
    if (op_vec) begin
      if (x_in < 0) begin
        xs[0] <= -x_ext;
        ys[0] <= -y_ext;
        zs[0] <= z_in + (WIDTH'(1) << (WIDTH - 1));
      end else begin
        xs[0] <= x_ext;
        ys[0] <= y_ext;
        zs[0] <= z_in;
      end
    end else begin
      // angle in second or third quadrant: top two bits differ
      if (z_in[WIDTH-1] ^ z_in[WIDTH-2]) begin
        xs[0] <= -x_ext;
        ys[0] <= -y_ext;
        zs[0] <= z_in + (WIDTH'(1) << (WIDTH - 1));
      end else begin
        xs[0] <= x_ext;
        ys[0] <= y_ext;
        zs[0] <= z_in;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < STAGES; i++) begin
      logic [WIDTH-1:0] a;
      logic             up;  // rotate counter-clockwise
      a = WIDTH'(atan_turns(i, WIDTH));
      if (ms[i]) up = ys[i] < 0;        // vectoring: drive y to zero
      else       up = !zs[i][WIDTH-1];  // rotation: drive z to zero
      vs[i+1] <= vs[i] && !rst;
      ms[i+1] <= ms[i];
      if (up) begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - a;
      end else begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + a;
      end
    end
  end

  // Note: in vectoring mode the angle accumulates the rotations applied, so
  // z_out = z_in - (total rotation) = z_in + atan2(y, x).
  function automatic logic signed [WIDTH-1:0] scale_out(input logic signed [IW-1:0] v);
    logic signed [IW-1:0] h;
    h = v >>> 1;
    return WIDTH'(sat64(64'(h), WIDTH));
  endfunction

  always_comb begin
    out_valid = vs[STAGES];
    x_out     = scale_out(xs[STAGES]);
    y_out     = scale_out(ys[STAGES]);
    z_out     = zs[STAGES];
  end
endmodule
