// llrf_pkg: types, constants and helper functions shared by the RF station
// controller blocks.
//
// - CORDIC arctangent table: entry i is round(atan(2^-i) / (2*pi) * 2^32), an
//   angle in units of 1/2^32 of a turn. Blocks with narrower angles shift it.
// - CRC-16 for the ChitChat fiber frame: polynomial x^16+x^12+x^5+1 (0x1021),
//   seed 0xFFFF, 16 data bits per step, most significant bit first. The
//   polynomial and seed are this design's choice; the frame layout is fixed
//   by the ChitChat protocol (see chitchat_tx).
// - The run-time configuration record of the controller (rfs_cfg_t) and the
//   SEL operating-mode controls.
package llrf_pkg;

  localparam int unsigned ATAN_ENTRIES = 24;
  localparam logic [31:0] ATAN_TABLE [ATAN_ENTRIES] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756,
    32'd42667331,  32'd21354465,  32'd10679838,  32'd5340245,
    32'd2670163,   32'd1335087,   32'd667544,    32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861,
    32'd10430,     32'd5215,      32'd2608,      32'd1304,
    32'd652,       32'd326,       32'd163,       32'd81
  };

  // Arctangent of 2^-i as a WIDTH-bit fraction of a turn, rounded.
  function automatic logic [31:0] atan_turns(input int i, input int width);
    logic [32:0] r;
    if (i >= ATAN_ENTRIES) return '0;
    r = {1'b0, ATAN_TABLE[i]} + (33'd1 << (31 - width));
    return 32'(r >> (32 - width));
  endfunction

  // One 16-bit step of the ChitChat CRC.
  function automatic logic [15:0] crc16_word(input logic [15:0] crc, input logic [15:0] data);
    logic [15:0] c;
    c = crc;
    for (int b = 15; b >= 0; b--) begin
      if (c[15] ^ data[b]) c = {c[14:0], 1'b0} ^ 16'h1021;
      else                 c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

  localparam logic [15:0] CRC16_SEED = 16'hFFFF;

  // ChitChat frame constants
  localparam int unsigned CC_WORDS = 11;
  localparam logic [7:0]  CC_COMMA = 8'hBC;  // K28.5, sent with its k-flag set

  // Saturate a wide signed value to OUT bits (helper used by several blocks).
  function automatic logic signed [63:0] sat64(input logic signed [63:0] v, input int out_w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (out_w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (out_w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // Datapath widths used across the controller.
  localparam int unsigned LLRF_W = 22;  // CORDIC / baseband datapath
  localparam int unsigned ADC_W  = 16;
  localparam int unsigned DAC_W  = 16;
  localparam int unsigned COEF_W = 18;

  // Run-time configuration of the RF station controller (one record, as
  // written by the host over its register bus).
  // Waveform conveyor channel map: I/Q of cavity, forward, reverse, drive
  // (after the filters, i.e. what goes to the DAC) and phase reference line.
  localparam int unsigned NCH_WAVE = 10;
  localparam int unsigned WCH_W    = $clog2(NCH_WAVE);
  typedef enum logic [WCH_W-1:0] {
    CH_CAV_I = 4'd0, CH_CAV_Q = 4'd1, CH_FWD_I = 4'd2, CH_FWD_Q = 4'd3,
    CH_REV_I = 4'd4, CH_REV_Q = 4'd5, CH_DRV_I = 4'd6, CH_DRV_Q = 4'd7,
    CH_PRL_I = 4'd8, CH_PRL_Q = 4'd9
  } wave_chan_t;

  typedef struct packed {
    // local oscillator
    logic [31:0]               dds_step_h;
    logic [11:0]               dds_step_l;
    logic [11:0]               dds_modulo;
    logic signed [LLRF_W-1:0]  lo_amp;
    // DAC at twice the ADC rate: LO rotation by half a phase step (Q1.17)
    logic signed [COEF_W-1:0]  dac_half_cos;
    logic signed [COEF_W-1:0]  dac_half_sin;
    // phase reference line lock
    logic                      prl_lock_en;
    logic [4:0]                prl_gain_sh;
    // self-excited loop mode controls and set points
    logic                      amp_loop_en;
    logic                      phase_loop_en;
    logic                      ph_track;
    logic                      chirp_mode;
    logic signed [LLRF_W-1:0]  amp_set;
    logic signed [LLRF_W-1:0]  amp_ol;
    logic [LLRF_W-1:0]         phase_set;
    logic [LLRF_W-1:0]         phase_offset;
    logic signed [COEF_W-1:0]  amp_kp;
    logic signed [COEF_W-1:0]  amp_ki;
    logic signed [COEF_W-1:0]  ph_kp;
    logic signed [COEF_W-1:0]  ph_ki;
    logic [LLRF_W-2:0]         amp_int_lim;
    logic [LLRF_W-2:0]         amp_out_lim;
    logic [LLRF_W-2:0]         ph_int_lim;
    logic [LLRF_W-2:0]         ph_out_lim;
    // chirp
    logic                      chirp_start;   // rising edge starts a sweep
    logic signed [31:0]        chirp_f0;
    logic signed [31:0]        chirp_rate;
    logic [31:0]               chirp_len;
    logic signed [LLRF_W-1:0]  chirp_amp;
    // band-limit and notch
    logic [4:0]                lp_shift;
    logic                      notch_en;
    logic signed [COEF_W-1:0]  notch_pr;
    logic signed [COEF_W-1:0]  notch_pi;
    logic signed [COEF_W-1:0]  notch_gr;
    logic signed [COEF_W-1:0]  notch_gi;
    // waveform conveyor and buffer
    logic [11:0]               cic_dec;
    logic [5:0]                cic_shift;
    logic [NCH_WAVE-1:0]       chan_mask;
    logic                      wave_trig;     // rising edge: software trigger
    logic                      wave_rearm;
    logic [15:0]               post_len;
    // frequency counter
    logic [WCH_W-1:0]          fc_chan;
    logic [15:0]               fc_gate;
    // detune and quench calculation
    logic signed [COEF_W-1:0]  b_re;
    logic signed [COEF_W-1:0]  b_im;
    logic signed [COEF_W-1:0]  u_scale;
    // ChitChat identity fields
    logic [3:0]                cc_cat;
    logic [3:0]                cc_ver;
    logic [2:0]                cc_gw_type;
    logic [2:0]                cc_location;
    logic [31:0]               revision_id;
  } rfs_cfg_t;

  // Header fields of the last good ChitChat frame from the far end.
  typedef struct packed {
    logic [3:0]  protocol_cat;
    logic [3:0]  protocol_ver;
    logic [2:0]  gateware_type;
    logic [2:0]  tx_location;
    logic [31:0] revision_id;
    logic [15:0] frame_count;
    logic [15:0] loopback_frame_count;
  } cc_rx_hdr_t;

endpackage
