// cic_conveyor: multi-channel decimating waveform path ("conveyor belt").
//
// Each of NCH input channels has its own pair of CIC integrators running at
// the full sample rate. Every `dec` clocks the integrator values are copied
// onto a shift register (the belt), which then moves them one per clock into
// a datapath shared by all channels: a two-stage CIC comb, a scaling shift
// (>>> shift, then saturation), and a 7-tap half-band filter
// (-1, 0, 9, 16, 9, 0, -1)/32 that keeps every second result. The comb and
// half-band state of each channel is held in small per-channel memories, so
// only one copy of the arithmetic exists. Channels whose bit in chan_mask is
// set leave on the output stream tagged with their number (out_valid);
// out_any marks every channel's output whatever the mask, for consumers
// inside the controller.
//
// Rates: with decimation `dec`, each selected channel produces one output per
// 2*dec input samples. dec must be at least NCH + 2 so the belt empties
// before it is reloaded. CIC gain is dec^2, removed with `shift`.
// Timing: outputs appear 3 clocks after a channel leaves the belt; all
// channels of one pass leave on consecutive clocks, lowest number first.
// pass_done pulses the clock after the last channel's half-band output.
//
// The per-channel integrators, the shared comb and half-band datapath,
// programmable decimation and channel selection follow the document; the
// CIC order, the half-band taps and the widths are this design's choices.
module cic_conveyor #(
  parameter int unsigned NCH   = 8,
  parameter int unsigned IN_W  = 22,
  parameter int unsigned OUT_W = 22,
  parameter int unsigned DEC_W = 12,
  localparam int unsigned CH_W = $clog2(NCH)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  din [NCH],
  input  logic [DEC_W-1:0]        dec,
  input  logic [5:0]              shift,
  input  logic [NCH-1:0]          chan_mask,
  output logic                    out_valid,
  output logic                    out_any,
  output logic [CH_W-1:0]         out_chan,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    pass_done
);
  import llrf_pkg::*;
  localparam int unsigned ACC_W = IN_W + 2 * DEC_W;
  localparam int unsigned HB_W  = OUT_W + 6;

  // ---- per-channel integrators
  logic signed [ACC_W-1:0] int1 [NCH];
  logic signed [ACC_W-1:0] int2 [NCH];
  logic [DEC_W-1:0]        dcnt;
  logic                    snap;
  assign snap = (dcnt == dec - 1'b1) || (dcnt >= dec);

  always_ff @(posedge clk) begin
    if (rst) begin
      dcnt <= '0;
      for (int c = 0; c < NCH; c++) begin
        int1[c] <= '0;
        int2[c] <= '0;
      end
    end else begin
      dcnt <= snap ? '0 : dcnt + 1'b1;
      for (int c = 0; c < NCH; c++) begin
        int1[c] <= int1[c] + ACC_W'(din[c]);
        int2[c] <= int2[c] + int1[c];
      end
    end
  end

  // ---- the belt
  logic signed [ACC_W-1:0] belt [NCH];
  logic [CH_W:0]           belt_left;   // values still on the belt
  logic [CH_W-1:0]         belt_chan;
  logic                    hb_phase;    // half-band keeps every second pass

  always_ff @(posedge clk) begin
    if (rst) begin
      belt_left <= '0;
      belt_chan <= '0;
      hb_phase  <= 1'b0;
      for (int c = 0; c < NCH; c++) belt[c] <= '0;
    end else if (snap) begin
      for (int c = 0; c < NCH; c++) belt[c] <= int2[c];
      belt_left <= (CH_W+1)'(NCH);
      belt_chan <= '0;
      hb_phase  <= ~hb_phase;
    end else if (belt_left != 0) begin
      for (int c = 0; c < NCH - 1; c++) belt[c] <= belt[c+1];
      belt_left <= belt_left - 1'b1;
      belt_chan <= belt_chan + 1'b1;
    end
  end

  // ---- shared comb (two stages), per-channel delay memories
  logic signed [ACC_W-1:0] cm1 [NCH];
  logic signed [ACC_W-1:0] cm2 [NCH];
  logic signed [ACC_W-1:0] c1, c2;
  logic                    a_valid;
  logic [CH_W-1:0]         a_chan;
  logic signed [ACC_W-1:0] a_data;
  logic                    a_keep;

  assign c1 = belt[0] - cm1[belt_chan];
  assign c2 = c1 - cm2[belt_chan];

  always_ff @(posedge clk) begin
    if (rst) begin
      a_valid <= 1'b0;
      a_chan  <= '0;
      a_data  <= '0;
      a_keep  <= 1'b0;
      for (int c = 0; c < NCH; c++) begin
        cm1[c] <= '0;
        cm2[c] <= '0;
      end
    end else begin
      a_valid <= belt_left != 0 && !snap;
      a_chan  <= belt_chan;
      a_data  <= c2;
      a_keep  <= hb_phase;
      if (belt_left != 0 && !snap) begin
        cm1[belt_chan] <= belt[0];
        cm2[belt_chan] <= c1;
      end
    end
  end

  // ---- scaling and shared half-band, per-channel history
  logic signed [OUT_W-1:0] hist [NCH][6];
  logic signed [OUT_W-1:0] xs;
  logic signed [HB_W-1:0]  hb;
  assign xs = OUT_W'(sat64(64'(a_data >>> shift), OUT_W));
  always_comb begin
    hb = -HB_W'(xs) + 9 * HB_W'(hist[a_chan][1]) + 16 * HB_W'(hist[a_chan][2])
       + 9 * HB_W'(hist[a_chan][3]) - HB_W'(hist[a_chan][5]);
  end

  logic last_out;
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_any   <= 1'b0;
      out_chan  <= '0;
      out_data  <= '0;
      last_out  <= 1'b0;
      pass_done <= 1'b0;
      for (int c = 0; c < NCH; c++)
        for (int k = 0; k < 6; k++) hist[c][k] <= '0;
    end else begin
      out_valid <= a_valid && a_keep && chan_mask[a_chan];
      out_any   <= a_valid && a_keep;
      out_chan  <= a_chan;
      out_data  <= OUT_W'(sat64(64'(hb >>> 5), OUT_W));
      last_out  <= a_valid && a_keep && a_chan == CH_W'(NCH - 1);
      pass_done <= last_out;
      if (a_valid) begin
        hist[a_chan][0] <= xs;
        for (int k = 1; k < 6; k++) hist[a_chan][k] <= hist[a_chan][k-1];
      end
    end
  end
endmodule
