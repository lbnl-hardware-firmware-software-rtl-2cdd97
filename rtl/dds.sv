// dds: direct digital synthesizer giving the local oscillator (LO) shared by
// the down converters and the up converter.
//
// A phase accumulator advances by step_h + step_l/modulo of 2^32 per clock
// (integer part step_h, fraction kept as a residue counted modulo `modulo`),
// so ratios such as 20 MHz IF / 95 MS/s = 4/19 turn per sample are exact:
// step_h = 904203641, step_l = 5, modulo = 19. The top WIDTH bits of the phase,
// plus phase_offset from the phase-reference loop, are turned into
// lo_cos = G*amp*cos(phase), lo_sin = G*amp*sin(phase) by a rotation-mode
// CORDIC (G = 0.8234).
//
// Timing: one LO sample per clock; LO lags the accumulator by the CORDIC
// latency (STAGES + 1). lo_valid is low while the pipeline fills after rst.
//
// The CORDIC-based DDS and its phase-offset input follow the controller's
// block diagram; the modulo accumulator and the widths are this design's.
module dds #(
  parameter int unsigned WIDTH  = 22,
  parameter int unsigned STAGES = 20,
  parameter int unsigned MOD_W  = 12
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [31:0]             step_h,
  input  logic [MOD_W-1:0]        step_l,
  input  logic [MOD_W-1:0]        modulo,
  input  logic [WIDTH-1:0]        phase_offset,
  input  logic signed [WIDTH-1:0] amp,
  output logic                    lo_valid,
  output logic signed [WIDTH-1:0] lo_cos,
  output logic signed [WIDTH-1:0] lo_sin
);
  logic [31:0]      phase;
  logic [MOD_W-1:0] resid;
  logic [MOD_W:0]   resid_next;
  logic             carry;

  always_comb begin
    resid_next = {1'b0, resid} + {1'b0, step_l};
    carry      = resid_next >= {1'b0, modulo} && modulo != '0;
    if (carry) resid_next = resid_next - {1'b0, modulo};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      resid <= '0;
    end else begin
      phase <= phase + step_h + 32'(carry);
      resid <= MOD_W'(resid_next);
    end
  end

  logic [WIDTH-1:0] unused_z;
  logic signed [WIDTH-1:0] lo_c, lo_s;
  logic lo_v;

  cordic #(.WIDTH(WIDTH), .STAGES(STAGES)) u_cordic (
    .clk, .rst,
    .in_valid (!rst),
    .op_vec   (1'b0),
    .x_in     (amp),
    .y_in     ('0),
    .z_in     (phase[31 -: WIDTH] + phase_offset),
    .out_valid(lo_v),
    .x_out    (lo_c),
    .y_out    (lo_s),
    .z_out    (unused_z)
  );

  assign lo_valid = lo_v;
  assign lo_cos   = lo_c;
  assign lo_sin   = lo_s;
endmodule
