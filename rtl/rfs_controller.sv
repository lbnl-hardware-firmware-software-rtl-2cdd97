// rfs_controller: RF station (RFS) controller for one superconducting cavity.
//
// Data path, all at the ADC sample clock `clk` (95 MS/s, IF 20 MHz):
//   * dds: the local oscillator. Its phase is pulled by phase_offset_loop so
//     that the phase reference line (PRL) reads as zero phase.
//   * ddc x4: PRL, cavity, forward and reverse ADC streams to baseband I/Q.
//   * sel: self-excited loop on the cavity I/Q (amplitude/phase controllers,
//     phase offset, chirp source from phase_parabola), producing drive I/Q.
//   * lp_notch: band-limit and notch filters on the drive.
//   * duc: drive back to IF for the DAC, two samples per clock (dac_drive,
//     then dac_drive_mid half a clock later) for a DAC at twice the ADC rate.
//   * cic_conveyor: decimates cavity, forward, reverse, drive and PRL I/Q
//     (ten channels) through a shared comb/half-band path. Its stream feeds the
//     waveform_buffer (circular, with fault capture), the freq_counter and
//     the detune_quench calculator, which runs once per conveyor pass (every
//     2*cic_dec clocks; cic_dec = 532 gives 11.2 us at 95 MS/s).
// Fiber side, on `fiber_clk` (125 MHz word clock): chitchat_tx sends the
// detune (a_im) and status to the resonance controller; chitchat_rx receives
// the far end's frames and reports their fields, CRC faults and loop-back
// latency. cdc_hold carries the detune word between the clocks.
//
// Interface: ADC samples in, DAC sample out, the configuration record `cfg`
// (llrf_pkg::rfs_cfg_t) in, waveform read port and results out, ChitChat
// words in and out with the far end's frame header (cc_rx_header) and a
// strobe when a new detune result reaches the fiber clock domain. cc_tx_k[1]
// is always 0: the only k-character is the comma in the low byte of word 0.
// The register bus, the converters and the fiber transceiver are outside
// this module.
//
// The block arrangement follows the controller's published block diagram;
// the channel map, the ChitChat payload packing and all widths not printed
// there are this design's choices.
module rfs_controller #(
  parameter int unsigned STAGES = 20,
  parameter int unsigned BUF_AW = 11
) (
  input  logic                                clk,
  input  logic                                rst,
  input  llrf_pkg::rfs_cfg_t                  cfg,
  input  logic signed [llrf_pkg::ADC_W-1:0]   adc_prl,
  input  logic signed [llrf_pkg::ADC_W-1:0]   adc_cav,
  input  logic signed [llrf_pkg::ADC_W-1:0]   adc_fwd,
  input  logic signed [llrf_pkg::ADC_W-1:0]   adc_rev,
  input  logic                                interlock_ok,
  input  logic                                fault,
  output logic signed [llrf_pkg::DAC_W-1:0]   dac_drive,
  output logic signed [llrf_pkg::DAC_W-1:0]   dac_drive_mid,
  // status
  output logic signed [llrf_pkg::LLRF_W-1:0]  cav_amp,
  output logic [llrf_pkg::LLRF_W-1:0]         cav_phase,
  output logic signed [llrf_pkg::LLRF_W-1:0]  amp_err,
  output logic signed [llrf_pkg::LLRF_W-1:0]  phase_err,
  output logic [llrf_pkg::LLRF_W-1:0]         prl_phase_offset,
  output logic signed [llrf_pkg::LLRF_W-1:0]  prl_i,
  output logic signed [llrf_pkg::LLRF_W-1:0]  prl_q,
  output logic                                chirp_active,
  output logic [15:0]                         freq_count,
  output logic                                freq_update,
  output logic signed [31:0]                  detune_a_re,
  output logic signed [31:0]                  detune_a_im,
  output logic signed [63:0]                  pdiss,
  output logic                                detune_valid,
  output logic                                detune_done,
  output logic                                detune_busy,
  // waveform buffer read port
  input  logic [BUF_AW-1:0]                   wave_rd_addr,
  output logic [llrf_pkg::LLRF_W+llrf_pkg::WCH_W-1:0] wave_rd_data,
  output logic [BUF_AW-1:0]                   wave_wr_ptr,
  output logic                                wave_frozen,
  // ChitChat fiber link
  input  logic                                fiber_clk,
  input  logic                                fiber_rst,
  output logic [15:0]                         cc_tx_word,
  output logic [1:0]                          cc_tx_k,
  output logic                                cc_tx_frame_start,
  output logic                                cc_detune_update,
  input  logic [15:0]                         cc_rx_word,
  input  logic [1:0]                          cc_rx_k,
  output logic                                cc_rx_valid,
  output logic [31:0]                         cc_rx_data0,
  output logic [31:0]                         cc_rx_data1,
  output logic [15:0]                         cc_crc_faults,
  output logic [15:0]                         cc_loopback_latency,
  output llrf_pkg::cc_rx_hdr_t                cc_rx_header
);
  import llrf_pkg::*;
  localparam int unsigned W = LLRF_W;

  // ---------------- local oscillator and phase reference
  logic                lo_valid;
  logic signed [W-1:0] lo_cos, lo_sin;
  logic [W-1:0]        ph_off;

  dds #(.WIDTH(W), .STAGES(STAGES)) u_dds (
    .clk, .rst, .step_h(cfg.dds_step_h), .step_l(cfg.dds_step_l), .modulo(cfg.dds_modulo),
    .phase_offset(ph_off), .amp(cfg.lo_amp),
    .lo_valid, .lo_cos, .lo_sin
  );

  logic signed [W-1:0] cav_i, cav_q, fwd_i, fwd_q, rev_i, rev_q;
  ddc #(.ADC_W(ADC_W), .LO_W(W), .OUT_W(W)) u_ddc_prl (.clk, .rst, .adc(adc_prl), .lo_cos, .lo_sin, .i_out(prl_i), .q_out(prl_q));
  ddc #(.ADC_W(ADC_W), .LO_W(W), .OUT_W(W)) u_ddc_cav (.clk, .rst, .adc(adc_cav), .lo_cos, .lo_sin, .i_out(cav_i), .q_out(cav_q));
  ddc #(.ADC_W(ADC_W), .LO_W(W), .OUT_W(W)) u_ddc_fwd (.clk, .rst, .adc(adc_fwd), .lo_cos, .lo_sin, .i_out(fwd_i), .q_out(fwd_q));
  ddc #(.ADC_W(ADC_W), .LO_W(W), .OUT_W(W)) u_ddc_rev (.clk, .rst, .adc(adc_rev), .lo_cos, .lo_sin, .i_out(rev_i), .q_out(rev_q));

  phase_offset_loop #(.WIDTH(W)) u_prl_loop (
    .clk, .rst, .enable(cfg.prl_lock_en && lo_valid), .prl_q, .gain_sh(cfg.prl_gain_sh),
    .phase_offset(ph_off)
  );
  assign prl_phase_offset = ph_off;

  // ---------------- chirp source and self-excited loop
  logic chirp_start_d, wave_trig_d;
  always_ff @(posedge clk) begin
    chirp_start_d <= rst ? 1'b0 : cfg.chirp_start;
    wave_trig_d   <= rst ? 1'b0 : cfg.wave_trig;
  end

  logic signed [W-1:0] ch_amp;
  logic [W-1:0]        ch_theta;
  phase_parabola #(.WIDTH(W)) u_chirp (
    .clk, .rst, .start(cfg.chirp_start && !chirp_start_d), .f_start(cfg.chirp_f0),
    .rate(cfg.chirp_rate), .length(cfg.chirp_len), .amp(cfg.chirp_amp),
    .active(chirp_active), .amp_out(ch_amp), .theta(ch_theta)
  );

  logic                drv_valid;
  logic signed [W-1:0] drv_i, drv_q;
  sel #(.W(W), .STAGES(STAGES), .K_W(COEF_W)) u_sel (
    .clk, .rst, .cav_i, .cav_q,
    .amp_loop_en(cfg.amp_loop_en), .phase_loop_en(cfg.phase_loop_en),
    .ph_track(cfg.ph_track), .chirp_mode(cfg.chirp_mode),
    .amp_set(cfg.amp_set), .amp_ol(cfg.amp_ol), .phase_set(cfg.phase_set),
    .phase_offset(cfg.phase_offset),
    .amp_kp(cfg.amp_kp), .amp_ki(cfg.amp_ki), .ph_kp(cfg.ph_kp), .ph_ki(cfg.ph_ki),
    .amp_int_lim(cfg.amp_int_lim), .amp_out_lim(cfg.amp_out_lim),
    .ph_int_lim(cfg.ph_int_lim), .ph_out_lim(cfg.ph_out_lim),
    .chirp_active, .chirp_amp(ch_amp), .chirp_theta(ch_theta),
    .meas_r(cav_amp), .meas_theta(cav_phase),
    .drive_valid(drv_valid), .drive_i(drv_i), .drive_q(drv_q),
    .amp_err, .phase_err
  );

  logic signed [W-1:0] flt_i, flt_q;
  lp_notch #(.W(W), .C_W(COEF_W)) u_filt (
    .clk, .rst, .x_i(drv_valid ? drv_i : '0), .x_q(drv_valid ? drv_q : '0),
    .lp_shift(cfg.lp_shift), .notch_en(cfg.notch_en),
    .pr(cfg.notch_pr), .pi(cfg.notch_pi), .gr(cfg.notch_gr), .gi(cfg.notch_gi),
    .y_i(flt_i), .y_q(flt_q)
  );

  duc #(.IN_W(W), .LO_W(W), .DAC_W(DAC_W), .C_W(COEF_W)) u_duc (
    .clk, .rst, .i_in(flt_i), .q_in(flt_q), .lo_cos, .lo_sin,
    .half_cos(cfg.dac_half_cos), .half_sin(cfg.dac_half_sin),
    .dac(dac_drive), .dac_mid(dac_drive_mid)
  );

  // ---------------- waveform conveyor and its consumers
  localparam int unsigned NCH = NCH_WAVE;
  localparam int unsigned CHW = $clog2(NCH);
  logic signed [W-1:0] wave_in [NCH];
  assign wave_in[CH_CAV_I] = cav_i;
  assign wave_in[CH_CAV_Q] = cav_q;
  assign wave_in[CH_FWD_I] = fwd_i;
  assign wave_in[CH_FWD_Q] = fwd_q;
  assign wave_in[CH_REV_I] = rev_i;
  assign wave_in[CH_REV_Q] = rev_q;
  assign wave_in[CH_DRV_I] = flt_i;
  assign wave_in[CH_DRV_Q] = flt_q;
  assign wave_in[CH_PRL_I] = prl_i;
  assign wave_in[CH_PRL_Q] = prl_q;

  logic                w_valid, w_any, w_pass;
  logic [CHW-1:0]      w_chan;
  logic signed [W-1:0] w_data;
  cic_conveyor #(.NCH(NCH), .IN_W(W), .OUT_W(W), .DEC_W(12)) u_conveyor (
    .clk, .rst, .din(wave_in), .dec(cfg.cic_dec), .shift(cfg.cic_shift),
    .chan_mask(cfg.chan_mask), .out_valid(w_valid), .out_any(w_any),
    .out_chan(w_chan), .out_data(w_data), .pass_done(w_pass)
  );

  waveform_buffer #(.DW(W), .CW(CHW), .AW(BUF_AW)) u_wavebuf (
    .clk, .rst, .in_valid(w_valid), .in_data(w_data), .in_chan(w_chan),
    .trigger(fault || (cfg.wave_trig && !wave_trig_d)), .rearm(cfg.wave_rearm),
    .post_len(BUF_AW'(cfg.post_len)), .frozen(wave_frozen), .wr_ptr(wave_wr_ptr),
    .rd_addr(wave_rd_addr), .rd_data(wave_rd_data)
  );

  freq_counter #(.W(W), .CH_W(CHW), .CNT_W(16)) u_freq (
    .clk, .rst, .in_valid(w_any), .in_chan(w_chan), .in_data(w_data),
    .sel_chan(cfg.fc_chan), .gate_len(cfg.fc_gate), .count(freq_count), .update(freq_update)
  );

  // gather one decimated V, K, R set per conveyor pass
  // (only the first six channels are used; the array spans all channels so
  // that it can be indexed by channel number)
  logic signed [W-1:0] g [NCH];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NCH; k++) g[k] <= '0;
    end else if (w_any && w_chan < CHW'(6)) begin
      g[w_chan] <= w_data;
    end
  end

  logic dq_vzero;
  detune_quench #(.W(W), .C_W(COEF_W)) u_detune (
    .clk, .rst, .start(w_pass),
    .v_i(g[CH_CAV_I]), .v_q(g[CH_CAV_Q]), .k_i(g[CH_FWD_I]), .k_q(g[CH_FWD_Q]),
    .r_i(g[CH_REV_I]), .r_q(g[CH_REV_Q]),
    .b_re(cfg.b_re), .b_im(cfg.b_im), .u_scale(cfg.u_scale),
    .busy(detune_busy), .done(detune_done), .valid(detune_valid), .v_zero(dq_vzero),
    .a_re(detune_a_re), .a_im(detune_a_im), .pdiss
  );

  // ---------------- ChitChat link
  // TX_DATA0 = detune (imaginary part of a); TX_DATA1 = {detune valid,
  // interlock status, 30 bits of saturated Pdiss}.
  logic [63:0] cc_payload, cc_payload_f;
  assign cc_payload = {detune_a_im, detune_valid && !dq_vzero, interlock_ok,
                       30'(sat64(pdiss >>> 17, 30))};

  cdc_hold #(.W(64)) u_cdc (
    .src_clk(clk), .src_rst(rst), .src_load(detune_done), .src_data(cc_payload),
    .dst_clk(fiber_clk), .dst_rst(fiber_rst), .dst_data(cc_payload_f), .dst_update(cc_detune_update)
  );

  logic [15:0] tx_frame_count;

  chitchat_tx u_cc_tx (
    .clk(fiber_clk), .rst(fiber_rst),
    .protocol_cat(cfg.cc_cat), .protocol_ver(cfg.cc_ver), .gateware_type(cfg.cc_gw_type),
    .tx_location(cfg.cc_location), .revision_id(cfg.revision_id),
    .tx_data0(cc_payload_f[63:32]), .tx_data1(cc_payload_f[31:0]),
    .loopback_frame_count(cc_rx_header.frame_count),
    .tx_word(cc_tx_word), .tx_k(cc_tx_k), .frame_start(cc_tx_frame_start), .frame_count(tx_frame_count)
  );

  chitchat_rx u_cc_rx (
    .clk(fiber_clk), .rst(fiber_rst), .rx_word(cc_rx_word), .rx_k(cc_rx_k),
    .local_frame_count(tx_frame_count), .valid(cc_rx_valid),
    .protocol_cat(cc_rx_header.protocol_cat), .protocol_ver(cc_rx_header.protocol_ver),
    .gateware_type(cc_rx_header.gateware_type), .tx_location(cc_rx_header.tx_location),
    .revision_id(cc_rx_header.revision_id), .rx_data0(cc_rx_data0), .rx_data1(cc_rx_data1),
    .rx_frame_count(cc_rx_header.frame_count),
    .rx_loopback_frame_count(cc_rx_header.loopback_frame_count),
    .crc_faults(cc_crc_faults), .loopback_latency(cc_loopback_latency)
  );
endmodule
