// sel_tb: drives a constant cavity vector and checks the drive in four
// operating modes against expected values worked out from the polar form:
//   SEL raw (amplitude open loop, phase tracking): drive = G*amp_ol at the
//     cavity phase plus phase_offset;
//   pulsed (no tracking): drive angle = phase_offset alone;
//   SELA (amplitude loop on, open plant): the amplitude controller runs to
//     its output limit, so |drive| = G*out_lim;
//   chirp: drive = G*chirp_amp at chirp_theta;
//   drive limit: a chirp or open-loop amplitude above amp_out_lim is
//     clamped to it.
// The amplitude and phase error monitors are checked against the measured
// R and theta. G = 0.82338 is the rotation CORDIC gain. Also checks the cavity-to-drive latency of
// 2*(STAGES+1)+3 clocks by stepping the cavity phase.
module sel_tb;
  localparam int W = 22, S = 20, KW = 18;
  localparam real PI = 3.14159265358979, G = 0.823380;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic signed [W-1:0] cav_i = 0, cav_q = 0;
  logic amp_loop_en = 0, phase_loop_en = 0, ph_track = 1, chirp_mode = 0;
  logic signed [W-1:0] amp_set = 0, amp_ol = W'(1000000);
  logic [W-1:0] phase_set = 0, phase_offset = W'(22'h100000);  // quarter turn
  logic signed [KW-1:0] amp_kp = 0, amp_ki = 18'sd4096, ph_kp = 0, ph_ki = 0;
  logic [W-2:0] amp_int_lim = 21'd1200000, amp_out_lim = 21'd1200000, ph_int_lim = 0, ph_out_lim = 0;
  logic chirp_active = 0;
  logic signed [W-1:0] chirp_amp = W'(700000);
  logic [W-1:0] chirp_theta = W'(22'h2AAAAA);  // 2/3 turn
  logic signed [W-1:0] meas_r, drive_i, drive_q, amp_err, phase_err;
  logic [W-1:0] meas_theta;
  logic drive_valid;
  int checks = 0, failures = 0;
  sel #(.W(W), .STAGES(S), .K_W(KW)) dut (.*);

  function automatic real fabs(input real a); return a < 0 ? -a : a; endfunction

  task automatic check_drive(input real mag, input real turn, input string what);
    real ei, eq;
    ei = mag * $cos(2 * PI * turn);
    eq = mag * $sin(2 * PI * turn);
    checks += 2;
    if (fabs(real'(drive_i) - ei) > 60 || fabs(real'(drive_q) - eq) > 60) begin
      failures++;
      $display("FAIL %s: (%0d,%0d) vs (%f,%f)", what, drive_i, drive_q, ei, eq);
    end
  endtask

  real cph = 0.1;  // cavity phase in turns
  initial begin
    int t0, lat;
    repeat (50) @(posedge clk);
    @(negedge clk) rst = 0;
    cav_i = W'($rtoi(800000 * $cos(2 * PI * cph)));
    cav_q = W'($rtoi(800000 * $sin(2 * PI * cph)));
    repeat (80) @(negedge clk);
    checks++;
    if (!drive_valid) begin failures++; $display("FAIL drive_valid"); end
    check_drive(G * 1000000.0, cph + 0.25, "SEL raw");
    // error monitors: amp_set - R and phase_set - theta (steady input)
    checks += 2;
    if (int'(amp_err) != int'(amp_set) - int'(meas_r)) begin
      failures++; $display("FAIL amp_err %0d", amp_err);
    end
    if (phase_err != W'(phase_set - meas_theta)) begin
      failures++; $display("FAIL phase_err %0d", phase_err);
    end
    // latency: step cavity phase to 0.3 and count clocks until the drive moves
    cph = 0.3;
    cav_i = W'($rtoi(800000 * $cos(2 * PI * cph)));
    cav_q = W'($rtoi(800000 * $sin(2 * PI * cph)));
    t0 = 0;
    lat = -1;
    for (int k = 1; k < 100; k++) begin
      @(posedge clk); #1;
      if (lat < 0 && fabs(real'(drive_q) - G * 1e6 * $sin(2 * PI * 0.55)) < 100) lat = k;
    end
    checks++;
    if (lat != 2 * (S + 1) + 3) begin failures++; $display("FAIL latency %0d", lat); end
    // pulsed: fixed phase
    @(negedge clk) ph_track = 0;
    repeat (60) @(negedge clk);
    check_drive(G * 1000000.0, 0.25, "pulsed");
    // SELA with open plant: the integrator runs to the limit
    ph_track = 1; amp_set = W'(2000000); amp_loop_en = 1;
    repeat (400) @(negedge clk);
    check_drive(G * 1200000.0, cph + 0.25, "SELA at limit");
    // chirp
    chirp_mode = 1; chirp_active = 1;
    repeat (60) @(negedge clk);
    check_drive(G * 700000.0, 2.0 / 3.0, "chirp");
    amp_out_lim = 21'd500000;
    repeat (60) @(negedge clk);
    check_drive(G * 500000.0, 2.0 / 3.0, "chirp at drive limit");
    chirp_active = 0;
    repeat (60) @(negedge clk);
    check_drive(0.0, 0.0, "chirp idle");
    // open-loop amplitude above the limit (pulsed)
    chirp_mode = 0; amp_loop_en = 0; ph_track = 0; amp_out_lim = 21'd600000;
    repeat (60) @(negedge clk);
    check_drive(G * 600000.0, 0.25, "pulsed at drive limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
