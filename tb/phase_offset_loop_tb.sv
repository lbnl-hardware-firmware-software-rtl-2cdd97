// phase_offset_loop_tb: closes the loop through a model of the PRL down
// converter, q = A*sin(prl_phase - phase_offset), for several reference
// phases (including ones beyond +-90 degrees), and checks that the offset
// settles within 1e-3 turn of the reference phase, then does the same for
// sixteen random reference phases at two loop gains. Also checks that the
// offset holds while enable is low.
module phase_offset_loop_tb;
  localparam int W = 22;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic enable = 0;
  logic signed [W-1:0] prl_q = 0;
  logic [4:0] gain_sh = 5'd6;
  logic [W-1:0] phase_offset;
  int checks = 0, failures = 0;
  phase_offset_loop #(.WIDTH(W)) dut (.*);

  real target;
  function automatic real wrap(input real a);
    real r = a - $floor(a);
    if (r > 0.5) r -= 1.0;
    return r;
  endfunction
  always @(negedge clk)
    prl_q = W'($rtoi(200000.0 * $sin(2 * PI * (target - real'(phase_offset) / 2.0 ** W))));

  initial begin
    real err;
    logic [W-1:0] held;
    target = 0.0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    enable = 1;
    foreach (target_list[k]) begin
      target = target_list[k];
      repeat (3000) @(posedge clk);
      err = wrap(target - real'(phase_offset) / 2.0 ** W);
      checks++;
      if (err > 1e-3 || err < -1e-3) begin failures++; $display("FAIL lock to %f err %f", target, err); end
    end
    // random reference phases, with a slower and a faster loop gain
    for (int k = 0; k < 16; k++) begin
      gain_sh = (k % 2) ? 5'd5 : 5'd7;
      target = real'($urandom % 10000) / 10000.0 - 0.5;
      repeat (4000) @(posedge clk);
      err = wrap(target - real'(phase_offset) / 2.0 ** W);
      checks++;
      if (err > 1e-3 || err < -1e-3) begin failures++; $display("FAIL lock to %f err %f (gain_sh %0d)", target, err, gain_sh); end
    end
    gain_sh = 5'd6;
    enable = 0;
    held = phase_offset;
    target = 0.3;
    repeat (100) @(posedge clk);
    checks++;
    if (phase_offset != held) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  real target_list [4] = '{0.1, -0.3, 0.45, 0.02};
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
