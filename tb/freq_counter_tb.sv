// freq_counter_tb: a stream interleaving eight channels, where the selected
// channel carries a sampled sine of known frequency (k cycles per gate) and
// the other channels carry noise. Each published count must equal k.
// Several frequencies are tried, including zero (a constant). A second part
// moves the counter to another channel with a shorter gate, inserts idle
// (invalid) cycles into the stream, and tries random frequencies.
module freq_counter_tb;
  localparam int W = 22, CHW = 3, CNTW = 16;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [CHW-1:0] in_chan = 0, sel_chan = 3'd2;
  logic signed [W-1:0] in_data = 0;
  logic [CNTW-1:0] gate_len = 16'd200, count;
  logic update;
  int checks = 0, failures = 0, updates = 0;
  freq_counter #(.W(W), .CH_W(CHW), .CNT_W(CNTW)) dut (.*);

  int expect_k = -1;
  always @(posedge clk) if (update) begin
    updates++;
    if (expect_k >= 0) begin
      checks++;
      if (count != CNTW'(expect_k)) begin failures++; $display("FAIL count %0d vs %0d", count, expect_k); end
    end
  end

  initial begin
    int ks [4] = '{7, 0, 23, 1};
    int n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    foreach (ks[j]) begin
      expect_k = -1;  // first gate after a change mixes frequencies
      for (int g = 0; g < 3; g++) begin
        if (g == 1) expect_k = ks[j];
        for (int s = 0; s < 200; s++) begin
          for (int c = 0; c < 8; c++) begin
            @(negedge clk);
            in_valid = 1;
            in_chan = CHW'(c);
            if (c == 2) in_data = W'($rtoi(100000 * $sin(2 * PI * ks[j] * (n + 0.5) / 200.0 - 0.01)) + (ks[j] == 0 ? 5 : 0));
            else        in_data = W'($urandom);
          end
          n++;
        end
      end
    end
    // second part: channel 5, 97-sample gate, idle gaps, random k
    @(negedge clk) in_valid = 0;
    expect_k = -1;
    sel_chan = 3'd5;
    gate_len = 16'd97;
    n = 0;
    for (int j = 0; j < 8; j++) begin
      int k;
      k = (j == 0) ? 48 : $urandom_range(2, 45);
      expect_k = -1;
      for (int g = 0; g < 3; g++) begin
        if (g == 1) expect_k = k;
        for (int s = 0; s < 97; s++) begin
          for (int c = 0; c < 8; c++) begin
            @(negedge clk);
            in_valid = ($urandom_range(0, 3) != 0);
            if (!in_valid) begin
              in_data = W'($urandom);
              @(negedge clk);
              in_valid = 1;
            end
            in_chan = CHW'(c);
            if (c == 5) in_data = W'($rtoi(90000 * $sin(2 * PI * k * (n + 0.5) / 97.0 + 0.37)));
            else        in_data = W'($urandom);
          end
          n++;
        end
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (updates < 30) begin failures++; $display("FAIL only %0d updates", updates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
