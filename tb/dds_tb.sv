// dds_tb: programs the 20 MHz / 95 MS/s phase step (4/19 turn per sample,
// as integer step plus modulo fraction) and a phase offset, and compares
// every LO sample with G*amp*cos/sin of the ideal phase. Also checks that the
// LO repeats exactly every 19 samples and that the first valid sample
// arrives STAGES + 1 clocks after reset is released.
module dds_tb;
  localparam int W = 22, S = 20;
  localparam real PI = 3.14159265358979, G = 0.823380;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [31:0] step_h = 32'd904203641;
  logic [11:0] step_l = 12'd5, modulo = 12'd19;
  logic [W-1:0] phase_offset = W'(22'h080000);  // 1/8 turn
  logic signed [W-1:0] amp = W'(1500000);
  logic lo_valid;
  logic signed [W-1:0] lo_cos, lo_sin;
  int checks = 0, failures = 0;
  dds #(.WIDTH(W), .STAGES(S)) dut (.*);

  function automatic real fabs(input real a); return a < 0 ? -a : a; endfunction

  int n = 0, cyc = 0, first = -1;
  logic signed [W-1:0] hist_c [$];
  always @(posedge clk) begin
    if (!rst) cyc <= cyc + 1;
    if (!rst && lo_valid) begin
      real ph, ec, es;
      if (first < 0) first = cyc;
      ph = 2 * PI * (4.0 * n / 19.0 + 0.125);
      ec = G * 1500000.0 * $cos(ph);
      es = G * 1500000.0 * $sin(ph);
      checks += 2;
      if (fabs(real'(lo_cos) - ec) > 30) begin failures++; $display("FAIL cos n=%0d %0d vs %f", n, lo_cos, ec); end
      if (fabs(real'(lo_sin) - es) > 30) begin failures++; $display("FAIL sin n=%0d %0d vs %f", n, lo_sin, es); end
      hist_c.push_back(lo_cos);
      if (hist_c.size() > 19) begin
        checks++;
        if (hist_c[0] != lo_cos) begin failures++; $display("FAIL period 19"); end
        void'(hist_c.pop_front());
      end
      n++;
    end
  end

  initial begin
    repeat (30) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (500) @(posedge clk);
    checks++;
    if (first != S + 1) begin failures++; $display("FAIL latency %0d", first); end
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
