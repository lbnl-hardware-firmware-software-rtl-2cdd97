// duc: digital up converter from baseband drive I/Q to the IF DAC stream, at
// twice the ADC sample rate.
//
// For each clock the block gives two DAC samples:
//   dac     = Re{(i + j*q) * LO}       at the LO's own sample time
//   dac_mid = Re{(i + j*q) * LO * H}   half a sample later
// where LO = lo_cos + j*lo_sin and H = half_cos + j*half_sin = exp(j*s/2) is
// the LO's phase step per ADC sample s, halved (a run-time Q1.17 constant;
// for 20 MHz IF at 95 MS/s, s/2 = 2/19 turn). The baseband drive is held over
// the two halves; only the carrier is produced at the doubled rate. Each
// result is (product sum) >> (LO_W - 1 + SHIFT), saturated to DAC_W bits.
// With the LO shared with the down converters the drive leaves at the IF it
// was measured at.
//
// Timing: one input per clock, two outputs per clock (dac first, then
// dac_mid), three register stages: LO rotation, products, sum and saturation.
//
// The up conversion and the DAC running at twice the ADC rate (190 against
// 95 MS/s) follow the document; the LO rotation for the mid-sample, the DAC
// width and the scaling are this design's choices.
module duc #(
  parameter int unsigned IN_W  = 22,
  parameter int unsigned LO_W  = 22,
  parameter int unsigned DAC_W = 16,
  parameter int unsigned SHIFT = 6,
  parameter int unsigned C_W   = 18
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  i_in,
  input  logic signed [IN_W-1:0]  q_in,
  input  logic signed [LO_W-1:0]  lo_cos,
  input  logic signed [LO_W-1:0]  lo_sin,
  input  logic signed [C_W-1:0]   half_cos,
  input  logic signed [C_W-1:0]   half_sin,
  output logic signed [DAC_W-1:0] dac,
  output logic signed [DAC_W-1:0] dac_mid
);
  import llrf_pkg::*;
  localparam int unsigned MW = IN_W + LO_W;
  localparam int unsigned RW = LO_W + C_W + 1;

  // stage 1: inputs registered, LO rotated by half a sample step
  logic signed [IN_W-1:0] i1, q1;
  logic signed [LO_W-1:0] c1, s1, ch1, sh1;
  logic signed [RW-1:0]   rc, rs;
  assign rc = RW'(lo_cos) * RW'(half_cos) - RW'(lo_sin) * RW'(half_sin);
  assign rs = RW'(lo_cos) * RW'(half_sin) + RW'(lo_sin) * RW'(half_cos);

  // stage 2: products
  logic signed [MW-1:0] pi_r, pq_r, pih_r, pqh_r;
  // stage 3: difference, scaling, saturation
  logic signed [MW:0]   d, dh;
  assign d  = (MW+1)'(pi_r) - (MW+1)'(pq_r);
  assign dh = (MW+1)'(pih_r) - (MW+1)'(pqh_r);

  always_ff @(posedge clk) begin
    if (rst) begin
      {i1, q1, c1, s1, ch1, sh1} <= '0;
      {pi_r, pq_r, pih_r, pqh_r} <= '0;
      dac     <= '0;
      dac_mid <= '0;
    end else begin
      i1  <= i_in;
      q1  <= q_in;
      c1  <= lo_cos;
      s1  <= lo_sin;
      ch1 <= LO_W'(sat64(64'(rc >>> (C_W - 1)), LO_W));
      sh1 <= LO_W'(sat64(64'(rs >>> (C_W - 1)), LO_W));
      pi_r  <= MW'(i1) * MW'(c1);
      pq_r  <= MW'(q1) * MW'(s1);
      pih_r <= MW'(i1) * MW'(ch1);
      pqh_r <= MW'(q1) * MW'(sh1);
      dac     <= DAC_W'(sat64(64'(d >>> (LO_W - 1 + SHIFT)), DAC_W));
      dac_mid <= DAC_W'(sat64(64'(dh >>> (LO_W - 1 + SHIFT)), DAC_W));
    end
  end
endmodule
