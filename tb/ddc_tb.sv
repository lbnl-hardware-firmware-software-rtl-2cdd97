// ddc_tb: feeds a 4/19-turn-per-sample IF tone of known amplitude and phase
// (with an added third harmonic, which near-IQ sampling must reject) and an
// ideal LO, and checks that I/Q equal NAVG*A*L/2^LO_W*(cos, sin) of the tone
// phase once the 19-sample window is full. Several phases are tried. A
// second part drives random full-range ADC and LO words and compares both
// outputs every clock with a bit-exact model of the scaled products and the
// 19-sample sliding sum (two clocks of latency).
module ddc_tb;
  localparam int AW = 16, LW = 22, OW = 22, NAVG = 19;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic signed [AW-1:0] adc = 0;
  logic signed [LW-1:0] lo_cos = 0, lo_sin = 0;
  logic signed [OW-1:0] i_out, q_out;
  int checks = 0, failures = 0;
  ddc #(.ADC_W(AW), .LO_W(LW), .OUT_W(OW), .NAVG(NAVG)) dut (.*);
  function automatic real fabs(input real a); return a < 0 ? -a : a; endfunction

  real A = 20000.0, L = 2000000.0, th;
  int n = 0;
  initial begin
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 6; t++) begin
      th = 2 * PI * t / 6.0 + 0.3;
      repeat (60) begin
        @(negedge clk);
        adc    = AW'($rtoi(A * $cos(2 * PI * 4.0 * n / 19.0 + th)
                         + 2000.0 * $cos(3 * (2 * PI * 4.0 * n / 19.0) + 1.0)));
        lo_cos = LW'($rtoi(L * $cos(2 * PI * 4.0 * n / 19.0)));
        lo_sin = LW'($rtoi(L * $sin(2 * PI * 4.0 * n / 19.0)));
        n++;
      end
      @(posedge clk); #1;
      begin
        real k = NAVG * A * L / 2.0 ** LW;
        checks += 2;
        if (fabs(real'(i_out) - k * $cos(th)) > 25) begin failures++; $display("FAIL I %0d vs %f", i_out, k * $cos(th)); end
        if (fabs(real'(q_out) - k * $sin(th)) > 25) begin failures++; $display("FAIL Q %0d vs %f", q_out, k * $sin(th)); end
      end
    end
    // second part: random words against a bit-exact model
    begin
      longint hp_i [$], hp_q [$];
      for (int k = 0; k < 400; k++) begin
        longint ei, eq;
        ei = 0;
        eq = 0;
        @(negedge clk);
        if (hp_i.size() > 2 + NAVG) begin
          void'(hp_i.pop_front());
          void'(hp_q.pop_front());
        end
        if (k > 30) begin
          for (int j = 0; j < NAVG; j++) begin
            ei += hp_i[hp_i.size() - 2 - j];
            eq += hp_q[hp_q.size() - 2 - j];
          end
          checks += 2;
          if (longint'(i_out) != ei) begin failures++; $display("FAIL rand I %0d vs %0d", i_out, ei); end
          if (longint'(q_out) != eq) begin failures++; $display("FAIL rand Q %0d vs %0d", q_out, eq); end
        end
        adc    = AW'($urandom);
        lo_cos = (k % 50 == 7) ? -(LW'(1) <<< (LW - 1)) : LW'($urandom);
        lo_sin = (k % 50 == 9) ? -(LW'(1) <<< (LW - 1)) : LW'($urandom);
        if (k % 50 == 7) adc = -(AW'(1) <<< (AW - 1));
        hp_i.push_back((longint'(adc) * longint'(lo_cos)) >>> (LW - 1));
        hp_q.push_back((-(longint'(adc) * longint'(lo_sin))) >>> (LW - 1));
      end
    end
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
