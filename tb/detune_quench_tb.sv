// detune_quench_tb: feeds sequences of cavity field V, forward K and reverse
// R vectors and compares each result with the formulas evaluated in real
// arithmetic:
//   a = ((V - V_prev) - b*K) / V,   Pdiss = |K|^2 - |R|^2 - u*(|V|^2 - |V_prev|^2)
// a is checked to 1e-5 (in units of 1, FRAC = 24) and Pdiss to 1 part in 1e6.
// The case V = 0 must raise v_zero. Also checks that `done` comes within the
// stated cycle budget (16 + 2*(QW+1) + 4 clocks) and that `valid` is low for
// the first result after reset.
module detune_quench_tb;
  localparam int W = 22, CW = 18, FRAC = 24, AW = 32;
  localparam int QW = 2 * W + 4 + FRAC;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start = 0;
  logic signed [W-1:0] v_i = 0, v_q = 0, k_i = 0, k_q = 0, r_i = 0, r_q = 0;
  logic signed [CW-1:0] b_re = 18'sd6554, b_im = -18'sd3277, u_scale = 18'sd13107;  // 0.05, -0.025, 0.1
  logic busy, done, valid, v_zero;
  logic signed [AW-1:0] a_re, a_im;
  logic signed [63:0] pdiss;
  int checks = 0, failures = 0;
  detune_quench #(.W(W), .C_W(CW), .FRAC(FRAC), .A_W(AW)) dut (.*);

  function automatic real fabs(input real a); return a < 0 ? -a : a; endfunction

  real vpr = 0, vpi = 0;
  task automatic run(input real vr, input real vi, input real kr, input real ki, input real rr, input real ri, input bit first);
    int t;
    real br, bi, nr, ni, den, ar, ai, pd, u, up, bkr, bki;
    @(negedge clk);
    v_i = W'($rtoi(vr)); v_q = W'($rtoi(vi)); k_i = W'($rtoi(kr)); k_q = W'($rtoi(ki));
    r_i = W'($rtoi(rr)); r_q = W'($rtoi(ri));
    start = 1;
    @(negedge clk) start = 0;
    t = 1;
    while (!done && t < 1000) begin @(negedge clk); t++; end
    checks++;
    if (t > 16 + 2 * (QW + 1) + 4) begin failures++; $display("FAIL took %0d clocks", t); end
    br = real'(b_re) / 131072.0; bi = real'(b_im) / 131072.0;
    // use the integer inputs actually applied
    vr = real'(v_i); vi = real'(v_q); kr = real'(k_i); ki = real'(k_q); rr = real'(r_i); ri = real'(r_q);
    bkr = $floor((real'(b_re) * kr - real'(b_im) * ki) / 131072.0);
    bki = $floor((real'(b_re) * ki + real'(b_im) * kr) / 131072.0);
    nr = (vr - vpr) - bkr; ni = (vi - vpi) - bki;
    den = vr * vr + vi * vi;
    u = den; up = vpr * vpr + vpi * vpi;
    pd = kr * kr + ki * ki - rr * rr - ri * ri - (u - up) * real'(u_scale) / 131072.0;
    checks += 2;
    if (first) begin
      if (valid) begin failures++; $display("FAIL valid on first result"); end
    end else begin
      if (!valid) begin failures++; $display("FAIL not valid"); end
    end
    if (den == 0) begin
      checks++;
      if (!v_zero) begin failures++; $display("FAIL v_zero"); end
    end else begin
      ar = (nr * vr + ni * vi) / den; ai = (ni * vr - nr * vi) / den;
      checks += 3;
      if (fabs(real'(a_re) / 2.0 ** FRAC - ar) > 1e-5) begin failures++; $display("FAIL a_re %f vs %f", real'(a_re) / 2.0 ** FRAC, ar); end
      if (fabs(real'(a_im) / 2.0 ** FRAC - ai) > 1e-5) begin failures++; $display("FAIL a_im %f vs %f", real'(a_im) / 2.0 ** FRAC, ai); end
      if (fabs(real'(pdiss) - pd) > 1e-6 * fabs(pd) + 2) begin failures++; $display("FAIL pdiss %0d vs %f", pdiss, pd); end
    end
    vpr = vr; vpi = vi;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run(1500000, 200000, 900000, -300000, 400000, 100000, 1);
    run(1502000, 203000, 900000, -300000, 380000, 120000, 0);
    run(1499000, 210000, 1200000, 50000, 10000, -5000, 0);
    run(-800000, 1000000, -600000, 700000, 300000, 300000, 0);
    run(-790000, 1010500, -600000, 700000, 320000, 290000, 0);
    for (int k = 0; k < 10; k++)
      run(real'($urandom % 2000000) - 1e6, real'($urandom % 2000000) - 1e6,
          real'($urandom % 2000000) - 1e6, real'($urandom % 2000000) - 1e6,
          real'($urandom % 2000000) - 1e6, real'($urandom % 2000000) - 1e6, 0);
    run(0, 0, 1000, 0, 0, 0, 0);
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
