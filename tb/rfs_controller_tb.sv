// rfs_controller_tb: end-to-end test of the RF station controller at its
// default parameters, closed around a behavioural cavity.
//
// Cavity model (real arithmetic, one step per ADC sample, LO frame):
//   D  = drive recovered from the DAC samples (19-sample IQ demodulation)
//   V += -(gamma - j*delta)*V + gamma*D       (gamma = 0.005, delta = 0.003)
//   K  = D (forward wave), R = V - K (reverse wave)
// and each of V, K, R and a phase reference tone is put back on the 20 MHz IF
// (4/19 turn per sample) as an ADC stream. The ChitChat transmitter is looped
// back to the receiver through a 30-word delay, with one word corrupted.
//
// Sequence and the mechanisms counted (each must happen at least once):
//   PRL lock      the phase offset loop settles (offset stops moving)
//   chirp         a phase-parabola sweep drives the cavity
//   pulsed        fixed-phase drive; used to calibrate the SEL phase offset
//   SEL raw       self-excited oscillation builds up with open-loop amplitude
//   SELA          amplitude loop holds |V| at its set point (within 3 %)
//   SELAP         phase loop also pulls the cavity phase to its set point
//   detune        detune/quench results, a = (-gamma + j*delta)*T within 30 %
//                 (T = 2*cic_dec samples per update)
//   freq counter  zero-crossing count matches the oscillation frequency
//   fault capture a fault freezes the waveform buffer; its contents read back
//                 with channel tags in conveyor order (ten channels, the
//                 locked PRL reading as zero phase)
//   ChitChat      frames received with the detune word; one CRC fault counted;
//                 loop-back latency measured
module rfs_controller_tb;
  import llrf_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real OMEGA = 2.0 * PI * 4.0 / 19.0;
  localparam real GAMMA = 0.005, DELTA = 0.003;
  localparam int  DEC = 96;

  logic clk = 0, rst = 1, fiber_clk = 0, fiber_rst = 1;
  always #5 clk = ~clk;
  always #4 fiber_clk = ~fiber_clk;

  rfs_cfg_t cfg;
  logic signed [ADC_W-1:0] adc_prl = 0, adc_cav = 0, adc_fwd = 0, adc_rev = 0;
  logic interlock_ok = 1, fault = 0;
  logic signed [DAC_W-1:0] dac_drive, dac_drive_mid;
  logic signed [LLRF_W-1:0] cav_amp, amp_err, phase_err;
  logic [LLRF_W-1:0] cav_phase, prl_phase_offset;
  logic chirp_active, freq_update, detune_valid, detune_done, wave_frozen, cc_rx_valid;
  logic [15:0] freq_count, cc_crc_faults, cc_loopback_latency;
  logic signed [31:0] detune_a_re, detune_a_im;
  logic signed [63:0] pdiss;
  logic [10:0] wave_rd_addr = 0, wave_wr_ptr;
  logic [LLRF_W+WCH_W-1:0] wave_rd_data;
  logic [15:0] cc_tx_word, cc_rx_word;
  logic [1:0] cc_tx_k, cc_rx_k;
  logic [31:0] cc_rx_data0, cc_rx_data1;
  logic signed [LLRF_W-1:0] prl_i, prl_q;
  logic detune_busy, cc_tx_frame_start, cc_detune_update;
  cc_rx_hdr_t cc_rx_header;

  rfs_controller dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic real fabs(input real a); return a < 0 ? -a : a; endfunction
  function automatic real wrap(input real a);
    real r = a - $floor(a);
    if (r > 0.5) r -= 1.0;
    return r;
  endfunction
  function automatic logic signed [ADC_W-1:0] to_adc(input real v);
    if (v > 32767.0) return 16'sd32767;
    if (v < -32768.0) return -16'sd32768;
    return ADC_W'($rtoi(v));
  endfunction

  // ---------------- cavity model
  real vr = 0, vi = 0, dr = 0, di = 0;
  real dac_hist [19];
  longint n = 0;
  // second DAC sample of each clock: must continue the same IF tone half a
  // sample later, Re{D * exp(j*OMEGA*(n + 1/2))}
  bit mid_meas = 0;
  real mid_err2 = 0, mid_sig2 = 0;
  always @(posedge clk) begin
    real sr, si, cr, ci, ph;
    dac_hist[n % 19] = real'(dac_drive);
    sr = 0; si = 0;
    for (int k = 0; k < 19; k++) begin
      longint m;
      m = n - k;
      sr += dac_hist[m % 19] * $cos(OMEGA * m);
      si -= dac_hist[m % 19] * $sin(OMEGA * m);
    end
    dr = sr * 2.0 / 19.0; di = si * 2.0 / 19.0;
    if (mid_meas) begin
      real e;
      e = real'(dac_drive_mid) - (dr * $cos(OMEGA * (n + 0.5)) - di * $sin(OMEGA * (n + 0.5)));
      mid_err2 += e * e;
      mid_sig2 += real'(dac_drive) * real'(dac_drive);
    end
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

  // ---------------- fiber loop-back with one corrupted word
  logic [17:0] fdelay [30];
  int fcount = 0;
  bit corrupt_now = 0;
  always @(posedge fiber_clk) begin
    for (int k = 29; k > 0; k--) fdelay[k] <= fdelay[k-1];
    fdelay[0] <= {cc_tx_k, cc_tx_word ^ (corrupt_now && cc_tx_k == 0 ? 16'h0100 : 16'h0)};
    if (corrupt_now && cc_tx_k == 0) corrupt_now = 0;
  end
  assign {cc_rx_k, cc_rx_word} = fdelay[29];

  // ---------------- mechanism counters
  int n_chirp = 0, n_detune = 0, n_freq = 0, n_cc = 0, n_prl = 0, n_sel = 0, n_sela = 0,
      n_selap = 0, n_fault = 0, n_ccfault = 0, n_latency = 0, n_pulsed = 0;
  logic signed [31:0] sent_a_im [$];
  always @(posedge clk) begin
    if (chirp_active && !rst) n_chirp++;
    if (detune_done && detune_valid) begin
      n_detune++;
      sent_a_im.push_back(detune_a_im);
      if (sent_a_im.size() > 8) void'(sent_a_im.pop_front());
    end
  end
  int n_busy = 0, n_fs = 0, n_cdc = 0;
  always @(posedge clk) if (!rst && detune_busy) n_busy++;
  always @(posedge fiber_clk) if (!fiber_rst) begin
    if (cc_tx_frame_start) n_fs++;
    if (cc_detune_update) n_cdc++;
  end
  always @(posedge fiber_clk) if (cc_rx_valid) begin
    bit seen;
    seen = 0;
    n_cc++;
    foreach (sent_a_im[k]) if (sent_a_im[k] == cc_rx_data0) seen = 1;
    if (n_detune > 4 && n_cc % 50 == 0) check(seen || cc_rx_data0 == 0, "ChitChat payload carries the detune word");
  end

  // cavity phase rate (turns per sample), measured from cav_phase
  task automatic phase_rate(input int span, output real rate);
    real p0, acc, prev;
    acc = 0; prev = real'(cav_phase) / 2.0 ** LLRF_W;
    p0 = prev;
    for (int k = 0; k < span; k++) begin
      real p;
      @(posedge clk);
      p = real'(cav_phase) / 2.0 ** LLRF_W;
      acc += wrap(p - prev);
      prev = p;
    end
    rate = acc / span;
  endtask

  initial begin
    real rate, amp, po0, po1;
    int fc_expect, k_hits;
    for (int k = 0; k < 19; k++) dac_hist[k] = 0;
    for (int k = 0; k < 30; k++) fdelay[k] = '0;
    cfg = '0;
    cfg.dds_step_h = 32'd904203641; cfg.dds_step_l = 12'd5; cfg.dds_modulo = 12'd19;
    cfg.lo_amp = 22'sd2000000;
    // half of the 4/19-turn LO step: cos, sin of 2/19 turn in Q1.17
    cfg.dac_half_cos = 18'sd103434; cfg.dac_half_sin = 18'sd80506;
    cfg.prl_lock_en = 1; cfg.prl_gain_sh = 5'd8;
    cfg.ph_track = 1; cfg.amp_ol = 22'sd800000;
    cfg.amp_set = 22'sd50000;
    cfg.amp_kp = 18'sd8192; cfg.amp_ki = 18'sd41;
    cfg.ph_kp = 18'sd1024; cfg.ph_ki = 18'sd2;
    cfg.amp_int_lim = 21'd1500000; cfg.amp_out_lim = 21'd1500000;
    cfg.ph_int_lim = 21'd900000; cfg.ph_out_lim = 21'd1000000;
    cfg.chirp_f0 = -32'sd2000000; cfg.chirp_rate = 32'sd1000; cfg.chirp_len = 32'd4000;
    cfg.chirp_amp = 22'sd800000;
    cfg.lp_shift = 5'd1; cfg.notch_en = 1;
    cfg.notch_pr = 18'sd0; cfg.notch_pi = 18'sd0; cfg.notch_gr = 18'sd0; cfg.notch_gi = 18'sd0;
    cfg.cic_dec = 12'(DEC); cfg.cic_shift = 6'd13; cfg.chan_mask = '1;
    cfg.post_len = 16'd100;
    cfg.fc_chan = CH_CAV_I; cfg.fc_gate = 16'd64;
    cfg.b_re = 18'($rtoi(GAMMA * 2 * DEC * 131072.0)); cfg.b_im = 0;
    cfg.u_scale = 18'sd13107;
    cfg.cc_cat = 4'h2; cfg.cc_ver = 4'h1; cfg.cc_gw_type = 3'd1; cfg.cc_location = 3'd3;
    cfg.revision_id = 32'h0BADF00D;
    repeat (30) @(posedge clk);
    @(negedge clk) rst = 0; fiber_rst = 0;

    // ---- PRL lock and chirp together
    repeat (500) @(posedge clk);
    @(negedge clk) cfg.chirp_mode = 1; cfg.chirp_start = 1;
    repeat (4500) @(posedge clk);
    cfg.chirp_start = 0;
    po0 = real'(prl_phase_offset) / 2.0 ** LLRF_W;
    repeat (2000) @(posedge clk);
    po1 = real'(prl_phase_offset) / 2.0 ** LLRF_W;
    check(fabs(wrap(po1 - po0)) < 0.002 && po1 != 0, "PRL phase offset settled");
    if (fabs(wrap(po1 - po0)) < 0.002 && po1 != 0) n_prl++;
    check(prl_i > 0 && fabs(real'(prl_q)) < 0.01 * real'(prl_i), "PRL reads zero phase after lock");
    check(n_chirp == 4000, "chirp lasted its length");

    // ---- pulsed mode calibrates the SEL phase offset: with a fixed drive
    // phase the cavity reads theta0 = loop phase + atan(delta/gamma)
    @(negedge clk) cfg.chirp_mode = 0; cfg.ph_track = 0;
    repeat (6000) @(posedge clk);
    begin
      real th0, loop_ph;
      th0 = real'(cav_phase) / 2.0 ** LLRF_W;
      loop_ph = th0 - $atan(DELTA / GAMMA) / (2 * PI);
      cfg.phase_offset = LLRF_W'($rtoi(wrap(-loop_ph) * 2.0 ** LLRF_W));
      check(cav_amp > 22'sd5000, "pulsed drive fills the cavity");
      if (cav_amp > 22'sd5000) n_pulsed++;
      $display("pulsed: amp %0d, loop phase %f turn", cav_amp, loop_ph);
    end

    // ---- SEL raw
    @(negedge clk) cfg.ph_track = 1;
    repeat (15000) @(posedge clk);
    check(cav_amp > 22'sd30000, "SEL raw oscillation builds up");
    if (cav_amp > 22'sd30000) n_sel++;
    phase_rate(4000, rate);
    $display("SEL raw: amp %0d, offset frequency %f rad/sample (cavity detune %f)", cav_amp, rate * 2 * PI, DELTA);

    // ---- SELA
    @(negedge clk) cfg.amp_loop_en = 1;
    repeat (20000) @(posedge clk);
    amp = real'(cav_amp);
    check(fabs(amp - 50000.0) < 1500.0, "SELA holds amplitude at set point");
    check(fabs(real'(amp_err)) < 1500.0 && fabs(real'(amp_err) - (50000.0 - amp)) < 500.0, "amplitude error monitor");
    if (fabs(amp - 50000.0) < 1500.0) n_sela++;
    $display("SELA: amp %0d", cav_amp);

    // frequency counter against the measured rotation rate
    phase_rate(2000, rate);
    k_hits = 0;
    repeat (3) begin
      @(posedge freq_update);
      fc_expect = $rtoi(fabs(rate) * 64 * 2 * DEC + 0.5);
      check(int'(freq_count) >= fc_expect - 1 && int'(freq_count) <= fc_expect + 1, "frequency count");
      $display("freq count %0d (expected about %0d)", freq_count, fc_expect);
      n_freq++;
    end

    // detune: a = (-gamma + j*delta) * T
    repeat (3) begin
      @(posedge detune_done);
      @(negedge clk);
      begin
        real ar, ai, t;
        t = 2.0 * DEC;
        ar = real'(detune_a_re) / 2.0 ** 24;
        ai = real'(detune_a_im) / 2.0 ** 24;
        $display("detune a = %f + j%f (model %f + j%f)", ar, ai, -GAMMA * t, DELTA * t);
        check(fabs(ai - DELTA * t) < 0.3 * DELTA * t, "detune imaginary part");
        check(fabs(ar + GAMMA * t) < 0.3 * GAMMA * t, "decay real part");
      end
    end

    // ---- SELAP: phase loop pulls the cavity phase to the set point
    @(negedge clk);
    cfg.phase_set = 22'h0C0000;  // 0.1875 turn
    cfg.phase_loop_en = 1;
    repeat (30000) @(posedge clk);
    begin
      real e;
      e = wrap(real'(cav_phase) / 2.0 ** LLRF_W - 0.1875);
      $display("SELAP: phase error %f turn, amp %0d", e, cav_amp);
      check(fabs(e) < 0.02, "SELAP phase lock");
      check(fabs(real'(phase_err) / 2.0 ** LLRF_W + e) < 0.005, "phase error monitor");
      if (fabs(e) < 0.02) n_selap++;
    end
    phase_rate(3000, rate);
    check(fabs(rate) < 1e-5, "SELAP: cavity locked to LO frequency");
    mid_meas = 1;
    repeat (2000) @(posedge clk);
    mid_meas = 0;
    $display("DAC mid-sample: rms error / rms signal = %f", $sqrt(mid_err2 / mid_sig2));
    check(mid_sig2 > 0 && $sqrt(mid_err2 / mid_sig2) < 0.02, "DAC mid-sample continues the IF tone");

    // ---- ChitChat CRC fault
    corrupt_now = 1;
    repeat (500) @(posedge clk);
    check(cc_crc_faults == 1, "one CRC fault counted");
    if (cc_crc_faults == 1) n_ccfault++;
    check(cc_loopback_latency >= 1 && cc_loopback_latency <= 10, "loop-back latency in range");
    if (cc_loopback_latency >= 1 && cc_loopback_latency <= 10) n_latency++;
    $display("ChitChat: %0d frames, loop-back latency %0d frames", n_cc, cc_loopback_latency);
    // the link is looped back, so the far end's header is our own
    check(cc_rx_header.protocol_cat == cfg.cc_cat && cc_rx_header.protocol_ver == cfg.cc_ver &&
          cc_rx_header.gateware_type == cfg.cc_gw_type && cc_rx_header.tx_location == cfg.cc_location &&
          cc_rx_header.revision_id == cfg.revision_id, "received header fields");
    check(n_fs >= n_cc + n_ccfault && n_fs <= n_cc + n_ccfault + 5, "one frame start per frame");
    check(n_cdc >= n_detune && n_cdc <= n_detune + 2, "every detune result reached the fiber clock");
    check(n_busy >= 150 * n_detune, "detune engine busy for each result");

    // ---- fault capture
    @(negedge clk) fault = 1;
    @(negedge clk) fault = 0;
    repeat (200 * DEC) @(posedge clk);
    check(wave_frozen, "waveform buffer frozen by fault");
    if (wave_frozen) n_fault++;
    begin
      int prev_tag, bad;
      real prl_si, prl_sq;
      bad = 0; prev_tag = -1; prl_si = 0; prl_sq = 0;
      for (int a = 0; a < 2048; a++) begin
        @(negedge clk) wave_rd_addr = wave_wr_ptr + 11'(a);
        @(posedge clk); #1;
        if (prev_tag >= 0 && int'(wave_rd_data[LLRF_W+WCH_W-1:LLRF_W]) != (prev_tag + 1) % NCH_WAVE) bad++;
        prev_tag = int'(wave_rd_data[LLRF_W+WCH_W-1:LLRF_W]);
        if (prev_tag == CH_PRL_I) prl_si += real'($signed(wave_rd_data[LLRF_W-1:0]));
        if (prev_tag == CH_PRL_Q) prl_sq += fabs(real'($signed(wave_rd_data[LLRF_W-1:0])));
      end
      check(bad == 0, "captured waveform channel order");
      // the locked phase reference reads as zero phase in its waveform too
      $display("PRL waveform: sum I %f, sum |Q| %f", prl_si, prl_sq);
      check(prl_si > 20.0 * prl_sq && prl_si > 0, "PRL waveform channels at zero phase");
    end

    // ---- every mechanism must have happened
    check(n_prl > 0, "mechanism: PRL lock");
    check(n_chirp > 0, "mechanism: chirp");
    check(n_pulsed > 0, "mechanism: pulsed");
    check(n_sel > 0, "mechanism: SEL raw");
    check(n_sela > 0, "mechanism: SELA");
    check(n_selap > 0, "mechanism: SELAP");
    check(n_detune > 0, "mechanism: detune/quench updates");
    check(n_freq > 0, "mechanism: frequency counter");
    check(n_fault > 0, "mechanism: fault capture");
    check(n_cc > 0, "mechanism: ChitChat frames");
    check(n_ccfault > 0, "mechanism: ChitChat CRC fault");
    check(n_latency > 0, "mechanism: loop-back latency");
    $display("counts: prl %0d chirp %0d sel %0d sela %0d selap %0d detune %0d freq %0d fault %0d cc %0d ccfault %0d",
             n_prl, n_chirp, n_sel, n_sela, n_selap, n_detune, n_freq, n_fault, n_cc, n_ccfault);
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
