// cordic_tb: drives random vectors through the CORDIC in both directions,
// interleaving the two operations sample by sample, and compares against
// real-number arithmetic (magnitude times the gain, atan2, rotation).
// Also checks the pipeline latency of STAGES + 1 clocks.
module cordic_tb;
  localparam int W = 22, S = 20, N = 400;
  localparam real PI = 3.14159265358979;
  localparam real G  = 0.823380;  // CORDIC gain 1.6468 halved
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, op_vec = 0, out_valid;
  logic signed [W-1:0] x_in = 0, y_in = 0, x_out, y_out;
  logic [W-1:0] z_in = 0, z_out;
  int checks = 0, failures = 0;

  cordic #(.WIDTH(W), .STAGES(S)) dut (.*);

  real ex_x[$], ex_y[$], ex_z[$];
  int  ex_op[$];
  int  sent_cycle[$];
  int  cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real fabs(input real a); return a < 0 ? -a : a; endfunction

  function automatic real wrap(input real a); // into (-0.5, 0.5] turn
    real r = a - $floor(a);
    if (r > 0.5) r -= 1.0;
    return r;
  endfunction

  initial begin
    repeat (S + 3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < N; n++) begin
      real r, ph, xr, yr, zr;
      r  = (0.05 + 0.75 * ($urandom % 1000) / 1000.0) * 2.0 ** (W - 1);
      ph = ($urandom % 100000) / 100000.0;
      zr = ($urandom % 100000) / 100000.0;
      @(negedge clk);
      in_valid = 1;
      op_vec   = n[0];
      if (op_vec) begin
        xr = r * $cos(2 * PI * ph); yr = r * $sin(2 * PI * ph);
        x_in = W'($rtoi(xr)); y_in = W'($rtoi(yr)); z_in = W'($rtoi(zr * 2.0 ** W));
        ex_x.push_back(G * $sqrt(xr * xr + yr * yr)); ex_y.push_back(0.0);
        ex_z.push_back(zr + ph);
      end else begin
        real a;
        a = r * 0.7;
        xr = a; yr = a * 0.3;
        x_in = W'($rtoi(xr)); y_in = W'($rtoi(yr)); z_in = W'($rtoi(ph * 2.0 ** W));
        ex_x.push_back(G * (xr * $cos(2 * PI * ph) - yr * $sin(2 * PI * ph)));
        ex_y.push_back(G * (xr * $sin(2 * PI * ph) + yr * $cos(2 * PI * ph)));
        ex_z.push_back(0.0);
      end
      ex_op.push_back(int'(op_vec));
      sent_cycle.push_back(cycle);
    end
    @(negedge clk) in_valid = 0;
    repeat (S + 10) @(posedge clk);
    checks++;
    if (ex_x.size() != 0) begin
      failures++; $display("FAIL: %0d outputs missing", ex_x.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid && !rst) begin
    real ax, ay, dz, tol;
    int  op, lat;
    tol = 40.0;  // LSB; 20-stage residual plus truncation
    ax = ex_x.pop_front(); ay = ex_y.pop_front();
    op = ex_op.pop_front();
    lat = cycle - sent_cycle.pop_front();
    checks++;
    if (lat != S + 1) begin failures++; $display("FAIL latency %0d", lat); end
    if (op == 1) begin
      dz = wrap(real'(z_out) / 2.0 ** W - ex_z.pop_front());
      checks += 2;
      if (fabs(real'(x_out) - ax) > tol) begin failures++; $display("FAIL vec mag %0d vs %f", x_out, ax); end
      if (fabs(dz) > 4e-5) begin failures++; $display("FAIL vec angle err %f turn", dz); end
    end else begin
      void'(ex_z.pop_front());
      checks += 2;
      if (fabs(real'(x_out) - ax) > tol) begin failures++; $display("FAIL rot x %0d vs %f", x_out, ax); end
      if (fabs(real'(y_out) - ay) > tol) begin failures++; $display("FAIL rot y %0d vs %f", y_out, ay); end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
