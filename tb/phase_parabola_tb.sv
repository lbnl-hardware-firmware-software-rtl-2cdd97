// phase_parabola_tb: starts a chirp and checks every sample's phase against
// the closed form phase[n] = n*f0 + rate*n*(n-1)/2 (mod 2^32), the amplitude
// output while active, and that the sweep lasts exactly `length` samples.
module phase_parabola_tb;
  localparam int W = 22;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start = 0;
  logic signed [31:0] f_start = 32'sd12000000, rate = -32'sd35000;
  logic [31:0] length = 32'd700;
  logic signed [W-1:0] amp = W'(900000), amp_out;
  logic active;
  logic [W-1:0] theta;
  int checks = 0, failures = 0;
  phase_parabola #(.WIDTH(W)) dut (.*);

  initial begin
    int n, act;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    n = 0; act = 0;
    while (active) begin
      longint ph;
      ph = (longint'(n) * longint'(f_start) + longint'(rate) * longint'(n) * longint'(n - 1) / 2);
      checks += 2;
      if (theta != W'(ph >>> (32 - W))) begin failures++; $display("FAIL theta n=%0d", n); end
      if (amp_out != amp) begin failures++; $display("FAIL amp"); end
      n++; act++;
      @(negedge clk);
    end
    checks += 2;
    if (act != 700) begin failures++; $display("FAIL length %0d", act); end
    if (amp_out != 0) begin failures++; $display("FAIL amp after"); end
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
