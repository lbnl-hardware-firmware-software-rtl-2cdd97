// lp_notch: band-limit and notch filter for the complex drive signal.
//
// Band limit: a one-pole low-pass on I and on Q,
//   l[n] = l[n-1] + ((x[n] - l[n-1]) >>> lp_shift).
// Notch: a one-pole complex resonator driven by the same input,
//   s[n] = (P * s[n-1] + g * x[n]) >>> 17,  P = pr + j*pi, g = gr + j*gi,
// with P = r*exp(j*w0) placing its peak at offset frequency w0 (for example a
// neighbouring passband mode). The output is l[n] - s[n] when notch_en is set,
// so with g = (1 - r) * (low-pass response at w0) the two cancel there.
// Coefficients are Q1.17 numbers set at run time.
//
// Timing: one complex sample per clock, one register stage (the filter state
// is the output).
//
// That drive signals are band-limited and notched follows the document; the
// filter structure and coefficient format are this design's choices.
module lp_notch #(
  parameter int unsigned W   = 22,
  parameter int unsigned C_W = 18
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic signed [W-1:0]   x_i,
  input  logic signed [W-1:0]   x_q,
  input  logic [4:0]            lp_shift,
  input  logic                  notch_en,
  input  logic signed [C_W-1:0] pr,
  input  logic signed [C_W-1:0] pi,
  input  logic signed [C_W-1:0] gr,
  input  logic signed [C_W-1:0] gi,
  output logic signed [W-1:0]   y_i,
  output logic signed [W-1:0]   y_q
);
  import llrf_pkg::*;
  localparam int unsigned SW = W + 4;      // resonator state, headroom
  localparam int unsigned MW = SW + C_W + 2;

  logic signed [W+1:0]  l_i, l_q;
  logic signed [SW-1:0] s_i, s_q;
  logic signed [MW-1:0] n_i, n_q;

  always_comb begin
    n_i = MW'(pr) * MW'(s_i) - MW'(pi) * MW'(s_q) + MW'(gr) * MW'(x_i) - MW'(gi) * MW'(x_q);
    n_q = MW'(pr) * MW'(s_q) + MW'(pi) * MW'(s_i) + MW'(gr) * MW'(x_q) + MW'(gi) * MW'(x_i);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      l_i <= '0; l_q <= '0; s_i <= '0; s_q <= '0;
    end else begin
      l_i <= l_i + ((($bits(l_i))'(x_i) - l_i) >>> lp_shift);
      l_q <= l_q + ((($bits(l_q))'(x_q) - l_q) >>> lp_shift);
      if (notch_en) begin
        s_i <= SW'(sat64(64'(n_i >>> (C_W - 1)), SW));
        s_q <= SW'(sat64(64'(n_q >>> (C_W - 1)), SW));
      end else begin
        s_i <= '0;
        s_q <= '0;
      end
    end
  end

  assign y_i = W'(sat64(64'(l_i) - 64'(s_i), W));
  assign y_q = W'(sat64(64'(l_q) - 64'(s_q), W));
endmodule
