// freq_counter: measures the offset frequency of one channel of the
// decimated waveform stream.
//
// The selected channel (normally the in-phase part of the cavity signal in
// the controller's baseband frame) rotates at the cavity's offset from the
// LO. The counter counts its upward zero crossings (a negative sample
// followed by a non-negative one) over gate_len samples of that channel, then
// publishes the count and starts again. Offset frequency = count / (gate_len
// * sample period of the channel).
//
// Timing: `update` pulses for one clock when `count` takes a new value.
//
// Only the presence of a frequency counter on the waveform stream comes from
// the document; the zero-crossing method is this design's choice.
module freq_counter #(
  parameter int unsigned W    = 22,
  parameter int unsigned CH_W = 3,
  parameter int unsigned CNT_W = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [CH_W-1:0]      in_chan,
  input  logic signed [W-1:0]  in_data,
  input  logic [CH_W-1:0]      sel_chan,
  input  logic [CNT_W-1:0]     gate_len,
  output logic [CNT_W-1:0]     count,
  output logic                 update
);
  logic             prev_neg;
  logic [CNT_W-1:0] n_left, ncross;
  logic             hit, up;

  assign hit = in_valid && in_chan == sel_chan;
  assign up  = prev_neg && !in_data[W-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      prev_neg <= 1'b0;
      n_left   <= '0;
      ncross    <= '0;
      count    <= '0;
      update   <= 1'b0;
    end else begin
      update <= 1'b0;
      if (hit) begin
        prev_neg <= in_data[W-1];
        if (n_left <= 1) begin
          count  <= ncross + CNT_W'(up);
          update <= n_left == 1;
          ncross  <= '0;
          n_left <= gate_len;
        end else begin
          ncross  <= ncross + CNT_W'(up);
          n_left <= n_left - 1'b1;
        end
      end
    end
  end
endmodule
