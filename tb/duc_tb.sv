// duc_tb: random baseband I/Q, LO values and half-step rotations. Each
// clock's pair of DAC samples must equal, three clocks later,
//   dac     = (i*cos - q*sin) >> (LO_W - 1 + SHIFT), saturated
//   dac_mid = the same with the LO first rotated by (half_cos, half_sin)
// worked out here in 64-bit integers. Includes full-scale values to exercise
// the saturation. A second part drives a real 20 MHz-at-95 MS/s LO and checks
// that dac, dac_mid interleave into one clean IF tone at twice the rate.
module duc_tb;
  localparam int IW = 22, LW = 22, DW = 16, SH = 6, CW = 18;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic signed [IW-1:0] i_in = 0, q_in = 0;
  logic signed [LW-1:0] lo_cos = 0, lo_sin = 0;
  logic signed [CW-1:0] half_cos = 0, half_sin = 0;
  logic signed [DW-1:0] dac, dac_mid;
  int checks = 0, failures = 0, sats = 0;
  duc #(.IN_W(IW), .LO_W(LW), .DAC_W(DW), .SHIFT(SH), .C_W(CW)) dut (.*);

  function automatic longint sat(input longint v, input int w);
    longint hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 1; lo = -(64'sd1 <<< (w - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  longint exp_a [$], exp_b [$];
  initial begin
    real maxerr;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 300; n++) begin
      longint e, eh, ch, sh;
      @(negedge clk);
      i_in   = IW'($urandom); q_in = IW'($urandom);
      lo_cos = LW'($urandom); lo_sin = LW'($urandom);
      half_cos = CW'($urandom); half_sin = CW'($urandom);
      if (n % 3 == 0) begin
        i_in = IW'(2097151); q_in = -IW'(2097151); lo_cos = LW'(2097151); lo_sin = LW'(2097151);
        half_cos = CW'(131071); half_sin = 0;
      end
      ch = sat((longint'(lo_cos) * half_cos - longint'(lo_sin) * half_sin) >>> (CW - 1), LW);
      sh = sat((longint'(lo_cos) * half_sin + longint'(lo_sin) * half_cos) >>> (CW - 1), LW);
      e  = (longint'(i_in) * longint'(lo_cos) - longint'(q_in) * longint'(lo_sin)) >>> (LW - 1 + SH);
      eh = (longint'(i_in) * ch - longint'(q_in) * sh) >>> (LW - 1 + SH);
      if (e != sat(e, DW)) sats++;
      exp_a.push_back(sat(e, DW));
      exp_b.push_back(sat(eh, DW));
      if (exp_a.size() > 3) begin
        longint x, y;
        x = exp_a.pop_front();
        y = exp_b.pop_front();
        checks += 2;
        if (longint'(dac) != x) begin failures++; $display("FAIL dac %0d vs %0d", dac, x); end
        if (longint'(dac_mid) != y) begin failures++; $display("FAIL dac_mid %0d vs %0d", dac_mid, y); end
      end
    end
    checks++;
    if (sats == 0) begin failures++; $display("FAIL no saturation exercised"); end

    // IF tone: LO at 4/19 turn per sample, half step 2/19 turn, drive
    // (i, q) = A*(cos p, sin p). The DAC pair must be A'*cos(w*t + p) at
    // t = n and n + 1/2 (A' = A * 2^21 / 2^27).
    half_cos = CW'($rtoi($floor($cos(2.0 * PI * 2.0 / 19.0) * 131072.0 + 0.5)));
    half_sin = CW'($rtoi($floor($sin(2.0 * PI * 2.0 / 19.0) * 131072.0 + 0.5)));
    i_in = IW'($rtoi(1500000.0 * $cos(0.7))); q_in = IW'($rtoi(1500000.0 * $sin(0.7)));
    maxerr = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      lo_cos = LW'($rtoi(2097151.0 * $cos(2.0 * PI * 4.0 / 19.0 * n)));
      lo_sin = LW'($rtoi(2097151.0 * $sin(2.0 * PI * 4.0 / 19.0 * n)));
      if (n >= 3) begin
        real t, a, ea, eb;
        t = n - 3;
        a = 1500000.0 * 2097151.0 / 2.0 ** 27;
        ea = a * $cos(2.0 * PI * 4.0 / 19.0 * t + 0.7) - real'(dac);
        eb = a * $cos(2.0 * PI * 4.0 / 19.0 * (t + 0.5) + 0.7) - real'(dac_mid);
        if (ea < 0) ea = -ea;
        if (eb < 0) eb = -eb;
        if (ea > maxerr) maxerr = ea;
        if (eb > maxerr) maxerr = eb;
      end
    end
    checks++;
    if (maxerr > 3.0) begin failures++; $display("FAIL IF tone error %f LSB", maxerr); end
    $display("IF tone at 2x rate: max error %f LSB", maxerr);
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
