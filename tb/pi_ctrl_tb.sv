// pi_ctrl_tb: checks the set-point controller against hand-computed values:
// proportional response two clocks after an error step, linear growth of the
// integrator and its clipping at int_lim, clipping of the output at out_lim,
// preload while disabled, and modulo-2^W phase error in the WRAP variant
// (a set point just past the wrap point must give a small positive error),
// and the error monitor output, including its saturation. Ends with 300
// clocks of random inputs compared every clock, for both variants, with a
// cycle-exact model of the error register, gains, clipping and preload.
module pi_ctrl_tb;
  localparam int W = 22, KW = 18, SH = 12;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic enable = 0;
  logic signed [W-1:0] meas = 0, setpoint = 0, preload = 0, out, out_w, err_out, err_w;
  logic signed [KW-1:0] kp = 0, ki = 0;
  logic [W-2:0] int_lim = 21'd100000, out_lim = 21'd200000;
  int checks = 0, failures = 0;

  pi_ctrl #(.W(W), .K_W(KW), .GAIN_SH(SH), .WRAP(1'b0)) dut (.*);
  pi_ctrl #(.W(W), .K_W(KW), .GAIN_SH(SH), .WRAP(1'b1)) dut_w (
    .clk, .rst, .enable, .meas, .setpoint, .kp, .ki, .int_lim, .out_lim, .preload, .out(out_w), .err_out(err_w));

  task automatic expect_eq(input logic signed [W-1:0] got, input int want, input string what);
    checks++;
    if (got != W'(want)) begin failures++; $display("FAIL %s: %0d vs %0d", what, got, want); end
  endtask

  function automatic longint mclip(input longint v, input longint lim);
    return v > lim ? lim : v < -lim ? -lim : v;
  endfunction

  // state of the reference model for one variant
  typedef struct { longint e, i, o; } mstate_t;
  function automatic mstate_t mstep(input mstate_t m, input bit wrap);
    mstate_t n;
    longint pt, it;
    pt = (m.e * longint'(kp)) >>> SH;
    it = (m.e * longint'(ki)) >>> SH;
    n.e = longint'(setpoint) - longint'(meas);
    if (wrap) n.e = longint'(W'(n.e));
    n.i = enable ? mclip(m.i + it, longint'(int_lim)) : longint'(preload);
    n.o = enable ? mclip(pt + m.i, longint'(out_lim)) : longint'(preload);
    return n;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // preload while disabled
    preload = 12345;
    @(negedge clk); @(negedge clk);
    expect_eq(out, 12345, "preload");
    // proportional only: err = 1000, kp = 2*4096 -> 2000 (+ integ 0 after enabling from preload 0)
    preload = 0;
    @(negedge clk);
    enable = 1; kp = 18'sd8192; ki = 0; setpoint = 5000; meas = 4000;
    @(negedge clk); @(negedge clk);
    expect_eq(out, 2000, "proportional");
    expect_eq(err_out, 1000, "error output");
    // integral: ki = 4096 -> +1000 per clock
    kp = 0; ki = 18'sd4096;
    @(negedge clk);  // first clock with ki
    @(negedge clk);
    begin
      int v1, v2;
      v1 = int'(out);
      @(negedge clk);
      v2 = int'(out);
      checks++;
      if (v2 - v1 != 1000) begin failures++; $display("FAIL integrator step %0d", v2 - v1); end
    end
    // integrator clip at int_lim = 100000
    repeat (150) @(negedge clk);
    expect_eq(out, 100000, "int_lim");
    // output clip: kp large pushes beyond out_lim
    kp = 18'sd131071;  // ~32x
    setpoint = 10000; meas = 0;
    @(negedge clk); @(negedge clk);
    expect_eq(out, 200000, "out_lim");
    // negative error clips at -out_lim
    setpoint = -1500000; meas = 1000000; ki = 0;
    repeat (3) @(negedge clk);
    expect_eq(out, -200000, "neg out_lim");
    expect_eq(err_out, -2097152, "error output saturates");
    // phase wrap: setpoint just above -2^21, meas just below +2^21 -> error +10
    enable = 0; preload = 0; @(negedge clk); @(negedge clk);
    enable = 1; kp = 18'sd4096; ki = 0;
    setpoint = -W'(2097150);  // -2^21 + 2
    meas     = W'(2097144);   //  2^21 - 8
    @(negedge clk); @(negedge clk);
    expect_eq(out_w, 10, "wrapped phase error");
    expect_eq(err_w, 10, "wrapped error output");
    // random inputs against the model
    begin
      mstate_t m0, m1;
      @(negedge clk);
      enable = 0; preload = 777; meas = 0; setpoint = 0;
      repeat (2) @(negedge clk);
      m0.e = 0; m0.i = 777; m0.o = 777;
      m1 = m0;
      for (int k = 0; k < 300; k++) begin
        longint emax;
        emax = (longint'(1) <<< (W - 1)) - 1;
        checks += 4;
        if (longint'(out) != m0.o || longint'(out_w) != m1.o) begin
          failures++; $display("FAIL random out %0d/%0d vs %0d/%0d", out, out_w, m0.o, m1.o);
        end
        if (longint'(err_out) != mclip(m0.e, emax) + (m0.e < -emax ? -1 : 0)) begin
          failures++; $display("FAIL random err_out %0d vs %0d", err_out, m0.e);
        end
        if (longint'(err_w) != m1.e) begin failures++; $display("FAIL random wrapped err %0d vs %0d", err_w, m1.e); end
        checks++;
        if (dut.integ != W'(m0.i)) begin failures++; $display("FAIL random integrator %0d vs %0d", dut.integ, m0.i); end
        enable = ($urandom_range(0, 9) != 0);
        kp = KW'($urandom); ki = KW'($urandom);
        int_lim = (W-1)'($urandom); out_lim = (W-1)'($urandom);
        preload = W'($urandom);
        if (k % 2 == 0) begin
          meas = W'($urandom); setpoint = W'($urandom);
        end else begin
          meas = W'($urandom_range(0, 10000)) - W'(5000);
          setpoint = W'($urandom_range(0, 10000)) - W'(5000);
          kp = KW'($urandom_range(0, 8000)); ki = KW'($urandom_range(0, 800));
        end
        m0 = mstep(m0, 1'b0);
        m1 = mstep(m1, 1'b1);
        @(negedge clk);
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
