// phase_parabola: chirp source for finding cavity resonances.
//
// After a start pulse the block outputs a constant amplitude and a phase that
// grows as a parabola: each clock the frequency advances by `rate` and the
// phase by the frequency,
//   freq[n+1] = freq[n] + rate,  phase[n+1] = phase[n] + freq[n],
// starting from freq = f_start, phase = 0. Phase and frequency are 32-bit
// fractions of a turn (per sample); theta is the top WIDTH bits of the phase.
// The sweep lasts `length` samples, then `active` drops and amp_out goes to 0.
// These outputs replace the loop's amplitude and phase when the controller is
// in chirp mode, and the rotation CORDIC turns them into a swept-frequency
// drive.
//
// Timing: outputs are registered; the first chirp sample appears the clock
// after start.
//
// The parabolic phase follows the document; the start/length control and the
// widths are this design's choices.
module phase_parabola #(
  parameter int unsigned WIDTH = 22
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic signed [31:0]      f_start,
  input  logic signed [31:0]      rate,
  input  logic [31:0]             length,
  input  logic signed [WIDTH-1:0] amp,
  output logic                    active,
  output logic signed [WIDTH-1:0] amp_out,
  output logic [WIDTH-1:0]        theta
);
  logic [31:0] phase, freq, count;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase  <= '0;
      freq   <= '0;
      count  <= '0;
      active <= 1'b0;
    end else if (start) begin
      phase  <= '0;
      freq   <= f_start;
      count  <= length;
      active <= length != 0;
    end else if (active) begin
      phase  <= phase + freq;
      freq   <= freq + rate;
      count  <= count - 1;
      active <= count != 1;
    end
  end

  assign amp_out = active ? amp : '0;
  assign theta   = phase[31 -: WIDTH];
endmodule
