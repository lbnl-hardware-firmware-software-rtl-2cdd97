// ddc: near-IQ digital down converter for one ADC channel.
//
// The ADC stream x[n] (IF of 20 MHz sampled at 95 MS/s, so 4/19 turn per
// sample) is multiplied by the LO, I' = x*cos, Q' = -x*sin, and each product
// is summed over the last NAVG samples. With NAVG = 19 a whole number of IF
// cycles fits the window, so the image at twice the IF and the harmonics that
// near-IQ sampling places between the IQ bins cancel. For x = A*cos(wn + t)
// and an LO of amplitude L (full scale 2^(LO_W-1)):
//   i + j*q = NAVG * (A*L/2^LO_W) * exp(j*(t - lo_phase)).
//
// Timing: one input and one output per clock, two register stages
// (product, sum). The sum over a sliding window is kept as a running sum.
//
// Mixing and filtering to I/Q follow the document; the window filter, its
// length and the widths are this design's choices.
module ddc #(
  parameter int unsigned ADC_W = 16,
  parameter int unsigned LO_W  = 22,
  parameter int unsigned OUT_W = 22,
  parameter int unsigned NAVG  = 19
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [ADC_W-1:0] adc,
  input  logic signed [LO_W-1:0]  lo_cos,
  input  logic signed [LO_W-1:0]  lo_sin,
  output logic signed [OUT_W-1:0] i_out,
  output logic signed [OUT_W-1:0] q_out
);
  import llrf_pkg::*;
  localparam int unsigned PW = ADC_W + 1;           // product after scaling
  localparam int unsigned SW = PW + $clog2(NAVG + 1);

  logic signed [PW-1:0] pi_r, pq_r;
  logic signed [PW-1:0] hist_i [NAVG];
  logic signed [PW-1:0] hist_q [NAVG];
  logic signed [SW-1:0] sum_i, sum_q;

  always_ff @(posedge clk) begin
    logic signed [ADC_W+LO_W-1:0] mi, mq;
    mi = (ADC_W+LO_W)'(adc) * (ADC_W+LO_W)'(lo_cos);
    mq = -((ADC_W+LO_W)'(adc) * (ADC_W+LO_W)'(lo_sin));
    if (rst) begin
      pi_r  <= '0;
      pq_r  <= '0;
      sum_i <= '0;
      sum_q <= '0;
      for (int k = 0; k < NAVG; k++) begin
        hist_i[k] <= '0;
        hist_q[k] <= '0;
      end
    end else begin
      pi_r <= PW'(mi >>> (LO_W - 1));
      pq_r <= PW'(mq >>> (LO_W - 1));
      hist_i[0] <= pi_r;
      hist_q[0] <= pq_r;
      for (int k = 1; k < NAVG; k++) begin
        hist_i[k] <= hist_i[k-1];
        hist_q[k] <= hist_q[k-1];
      end
      sum_i <= sum_i + SW'(pi_r) - SW'(hist_i[NAVG-1]);
      sum_q <= sum_q + SW'(pq_r) - SW'(hist_q[NAVG-1]);
    end
  end

  assign i_out = OUT_W'(sat64(64'(sum_i), OUT_W));
  assign q_out = OUT_W'(sat64(64'(sum_q), OUT_W));
endmodule
