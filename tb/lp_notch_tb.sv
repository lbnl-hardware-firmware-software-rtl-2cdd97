// lp_notch_tb: (1) with the notch off, a DC step settles to the input value
// through the one-pole low-pass, matching the recurrence sample by sample;
// (2) with the notch tuned to an offset frequency, a complex tone at that
// frequency is attenuated at least 20-fold while a tone at DC passes.
module lp_notch_tb;
  localparam int W = 22, CW = 18;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic signed [W-1:0] x_i = 0, x_q = 0, y_i, y_q;
  logic [4:0] lp_shift = 5'd3;
  logic notch_en = 0;
  logic signed [CW-1:0] pr = 0, pi = 0, gr = 0, gi = 0;
  int checks = 0, failures = 0;
  lp_notch #(.W(W), .C_W(CW)) dut (.*);

  task automatic amp_after(input real w, input int n, output real mx);
    mx = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      x_i = W'($rtoi(500000.0 * $cos(w * k)));
      x_q = W'($rtoi(500000.0 * $sin(w * k)));
      if (k > n - 100) begin
        real m;
        m = $sqrt(real'(y_i) * real'(y_i) + real'(y_q) * real'(y_q));
        if (m > mx) mx = m;
      end
    end
  endtask

  initial begin
    longint l;
    real r, w0, a_dc, a_n;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // (1) low-pass step
    l = 0;
    for (int k = 0; k < 60; k++) begin
      @(negedge clk);
      checks++;
      if (longint'(y_i) != l) begin failures++; $display("FAIL lp k=%0d %0d vs %0d", k, y_i, l); end
      x_i = 100000;
      @(posedge clk);
      l = l + ((100000 - l) >>> 3);
    end
    checks++;
    if (y_i < 99900) begin failures++; $display("FAIL lp final %0d", y_i); end
    // (2) notch: low-pass gain at w0 for shift 3 is k/(1 - (1-k)e^-jw) with k=1/8.
    // Resonator P = r e^{jw0}, g chosen so that its response matches there.
    lp_shift = 3; w0 = 2 * PI / 40.0; r = 0.97;
    pr = CW'($rtoi(r * $cos(w0) * 131072.0));
    pi = CW'($rtoi(r * $sin(w0) * 131072.0));
    begin
      real hr, hi, den_r, den_i, lr, li, k;
      // H_lp(w0) = k e^{jw} / (e^{jw} - (1-k))
      k = 0.125;
      den_r = $cos(w0) - (1 - k); den_i = $sin(w0);
      lr = k * ($cos(w0) * den_r + $sin(w0) * den_i) / (den_r * den_r + den_i * den_i);
      li = k * ($sin(w0) * den_r - $cos(w0) * den_i) / (den_r * den_r + den_i * den_i);
      // H_res(w0) = g / (1 - r) with the pole aligned with w0, so g = (1 - r) H_lp(w0)
      hr = lr * (1 - r);
      hi = li * (1 - r);
      gr = CW'($rtoi(hr * 131072.0));
      gi = CW'($rtoi(hi * 131072.0));
    end
    notch_en = 1;
    amp_after(0.0, 600, a_dc);
    amp_after(w0, 600, a_n);
    checks += 2;
    if (a_dc < 0.8 * 500000.0) begin failures++; $display("FAIL dc through notch %f", a_dc); end
    if (a_n > 0.05 * 500000.0) begin failures++; $display("FAIL notch depth %f", a_n); end
    $display("notch: dc %f  at w0 %f", a_dc, a_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
