// rfs_detune_period_tb: the detune and quench calculation at its published
// update period of 11.2 us (cic_dec = 532, 1064 clocks at 95 MS/s), with the
// controller at its default parameters.
//
// A behavioural cavity with a realistic, slow response (decay 2e-4 and detune
// 1e-4 per sample) is driven open loop at a fixed phase (pulsed mode) until
// it settles. In steady state dV/dt = 0, so the calculator must return
//   a = -(b/V)*K = (-gamma + j*delta) * T,   T = 1064 samples,
// with b = gamma*T. Checks: the spacing of detune results is exactly 1064
// clocks, a matches the model within 3 %, Pdiss is positive (the cavity
// absorbs 0.8 |K|^2 in this model), and the detune word arrives on the
// ChitChat link (looped back to the receiver).
module rfs_detune_period_tb;
  import llrf_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real OMEGA = 2.0 * PI * 4.0 / 19.0;
  localparam real GAMMA = 2.0e-4, DELTA = 1.0e-4;
  localparam int  DEC = 532;
  localparam real T = 2.0 * DEC;

  logic clk = 0, rst = 1, fiber_clk = 0, fiber_rst = 1;
  always #5 clk = ~clk;
  always #4 fiber_clk = ~fiber_clk;

  rfs_cfg_t cfg;
  logic signed [ADC_W-1:0] adc_prl = 0, adc_cav = 0, adc_fwd = 0, adc_rev = 0;
  logic interlock_ok = 1, fault = 0;
  logic signed [DAC_W-1:0] dac_drive, dac_drive_mid;
  logic signed [LLRF_W-1:0] cav_amp, amp_err, phase_err, prl_i, prl_q;
  logic [LLRF_W-1:0] cav_phase, prl_phase_offset;
  logic chirp_active, freq_update, detune_valid, detune_done, detune_busy, wave_frozen;
  logic [15:0] freq_count, cc_crc_faults, cc_loopback_latency;
  logic signed [31:0] detune_a_re, detune_a_im;
  logic signed [63:0] pdiss;
  logic [10:0] wave_rd_addr = 0, wave_wr_ptr;
  logic [LLRF_W+WCH_W-1:0] wave_rd_data;
  logic [15:0] cc_tx_word, cc_rx_word;
  logic [1:0] cc_tx_k, cc_rx_k;
  logic cc_rx_valid, cc_tx_frame_start, cc_detune_update;
  logic [31:0] cc_rx_data0, cc_rx_data1;
  cc_rx_hdr_t cc_rx_header;

  rfs_controller dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic real fabs(input real a); return a < 0 ? -a : a; endfunction
  function automatic logic signed [ADC_W-1:0] to_adc(input real v);
    if (v > 32767.0) return 16'sd32767;
    if (v < -32768.0) return -16'sd32768;
    return ADC_W'($rtoi(v));
  endfunction

  // ---------------- cavity model (LO frame), as in the end-to-end test
  real vr = 0, vi = 0, dr = 0, di = 0;
  real dac_hist [19];
  longint n = 0;
  always @(posedge clk) begin
    real sr, si, cr, ci, ph;
    dac_hist[n % 19] = real'(dac_drive);
    sr = 0; si = 0;
    for (int k = 0; k < 19; k++) begin
      longint m;
      m = n - longint'(k);
      sr += dac_hist[m % 19] * $cos(OMEGA * m);
      si -= dac_hist[m % 19] * $sin(OMEGA * m);
    end
    dr = sr * 2.0 / 19.0; di = si * 2.0 / 19.0;
    begin
      real nvr, nvi;
      nvr = vr + (-GAMMA * vr - DELTA * vi) + GAMMA * dr;
      nvi = vi + (-GAMMA * vi + DELTA * vr) + GAMMA * di;
      vr = nvr; vi = nvi;
    end
    n++;
    ph = OMEGA * n;
    cr = $cos(ph); ci = $sin(ph);
    adc_cav <= to_adc(vr * cr - vi * ci);
    adc_fwd <= to_adc(dr * cr - di * ci);
    adc_rev <= to_adc((vr - dr) * cr - (vi - di) * ci);
    adc_prl <= to_adc(15000.0 * $cos(ph + 2.0 * PI * 0.2));
  end

  // ---------------- fiber loop-back
  logic [17:0] fdelay [30];
  always @(posedge fiber_clk) begin
    for (int k = 29; k > 0; k--) fdelay[k] <= fdelay[k-1];
    fdelay[0] <= {cc_tx_k, cc_tx_word};
  end
  assign {cc_rx_k, cc_rx_word} = fdelay[29];

  // ---------------- detune result spacing and link contents
  longint last_done = -1;
  int n_done = 0, n_gap_ok = 0, n_gap_bad = 0, n_link = 0;
  longint clk_count = 0;
  logic signed [31:0] last_a_im [$];
  always @(posedge clk) begin
    clk_count++;
    if (!rst && detune_done) begin
      if (last_done >= 0) begin
        if (clk_count - last_done == longint'(T)) n_gap_ok++;
        else n_gap_bad++;
      end
      last_done = clk_count;
      n_done++;
      last_a_im.push_back(detune_a_im);
      if (last_a_im.size() > 4) void'(last_a_im.pop_front());
    end
  end
  always @(posedge fiber_clk) if (cc_rx_valid) begin
    foreach (last_a_im[k]) if (last_a_im[k] == cc_rx_data0 && cc_rx_data0 != 0) n_link++;
  end

  initial begin
    for (int k = 0; k < 19; k++) dac_hist[k] = 0;
    for (int k = 0; k < 30; k++) fdelay[k] = '0;
    cfg = '0;
    cfg.dds_step_h = 32'd904203641; cfg.dds_step_l = 12'd5; cfg.dds_modulo = 12'd19;
    cfg.lo_amp = 22'sd2000000;
    cfg.dac_half_cos = 18'sd103434; cfg.dac_half_sin = 18'sd80506;
    cfg.prl_lock_en = 1; cfg.prl_gain_sh = 5'd8;
    // pulsed mode: open-loop amplitude at a fixed angle
    cfg.ph_track = 0; cfg.amp_ol = 22'sd800000; cfg.phase_offset = 22'h040000;
    cfg.amp_out_lim = 21'd1500000; cfg.amp_int_lim = 21'd1500000;
    cfg.lp_shift = 5'd1;
    cfg.cic_dec = 12'(DEC); cfg.cic_shift = 6'd18; cfg.chan_mask = '1;
    cfg.post_len = 16'd100;
    cfg.fc_chan = CH_CAV_I; cfg.fc_gate = 16'd64;
    cfg.b_re = 18'($rtoi(GAMMA * T * 131072.0 + 0.5)); cfg.b_im = 0;
    cfg.u_scale = 18'sd13107;
    cfg.cc_cat = 4'h2; cfg.cc_ver = 4'h1; cfg.cc_gw_type = 3'd1; cfg.cc_location = 3'd3;
    cfg.revision_id = 32'h0BADF00D;
    repeat (30) @(posedge clk);
    @(negedge clk) rst = 0; fiber_rst = 0;

    // let the slow cavity settle (about 12 time constants)
    repeat (60000) @(posedge clk);
    repeat (4) begin
      @(posedge detune_done);
      @(negedge clk);
      begin
        real ar, ai;
        ar = real'(detune_a_re) / 2.0 ** 24;
        ai = real'(detune_a_im) / 2.0 ** 24;
        $display("detune a = %f + j%f (model %f + j%f), Pdiss %0d", ar, ai, -GAMMA * T, DELTA * T, pdiss);
        check(detune_valid, "detune valid");
        check(fabs(ar + GAMMA * T) < 0.03 * GAMMA * T, "Re a = -gamma*T");
        check(fabs(ai - DELTA * T) < 0.03 * DELTA * T, "Im a = delta*T");
        check(pdiss > 0, "Pdiss positive");
      end
    end
    repeat (3000) @(posedge clk);
    $display("results %0d, spacing 1064 clocks: %0d, other spacing: %0d, link matches %0d",
             n_done, n_gap_ok, n_gap_bad, n_link);
    check(n_gap_ok > 50 && n_gap_bad == 0, "one result every 11.2 us (1064 clocks)");
    check(n_link > 0, "detune word carried on the fiber link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
