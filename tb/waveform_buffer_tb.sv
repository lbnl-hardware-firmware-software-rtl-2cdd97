// waveform_buffer_tb: writes a numbered sample stream (with gaps in
// in_valid), triggers a fault capture with post_len = 20, and checks that the
// buffer freezes after exactly 20 more samples, that writing stops, and that
// reading back from the oldest sample (wr_ptr) returns the last 2^AW samples
// of the stream in order, with their channel tags. Then rearms and checks
// that writing resumes.
module waveform_buffer_tb;
  localparam int DW = 22, CW = 3, AW = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, trigger = 0, rearm = 0, frozen;
  logic [DW-1:0] in_data = 0;
  logic [CW-1:0] in_chan = 0;
  logic [AW-1:0] post_len = 20, wr_ptr, rd_addr = 0;
  logic [DW+CW-1:0] rd_data;
  int checks = 0, failures = 0;
  waveform_buffer #(.DW(DW), .CW(CW), .AW(AW)) dut (.*);

  int sent = 0, trig_at = 0;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      trigger = 0;
      in_valid = ($urandom % 4) != 0;
      in_data = DW'(1000 + sent);
      in_chan = CW'(sent % 8);
      if (in_valid) sent++;
      if (k == 150) begin trigger = 1; trig_at = sent - (in_valid ? 1 : 0); end
    end
    @(negedge clk) in_valid = 0; trigger = 0;
    checks++;
    if (!frozen) begin failures++; $display("FAIL not frozen"); end
    // The trigger arrived while sample trig_at was on the input; 20 samples after it are kept.
    // The last written sample number is trig_at + 20 (the triggering clock's sample counts before).
    for (int a = 0; a < 2 ** AW; a++) begin
      int want;
      @(negedge clk) rd_addr = AW'(wr_ptr + AW'(a));
      @(posedge clk); #1;
      want = trig_at + 20 - (2 ** AW - 1) + a;
      checks++;
      if (rd_data != {CW'(want % 8), DW'(1000 + want)}) begin
        failures++; $display("FAIL read %0d: %0d vs %0d", a, rd_data[DW-1:0], 1000 + want);
      end
    end
    // rearm: writing resumes
    @(negedge clk) rearm = 1;
    @(negedge clk) rearm = 0; in_valid = 1; in_data = 5;
    @(negedge clk) in_valid = 0;
    checks++;
    if (frozen) begin failures++; $display("FAIL still frozen"); end
    @(negedge clk) rd_addr = wr_ptr - 1'b1;
    @(posedge clk); #1;
    checks++;
    if (rd_data[DW-1:0] != 5) begin failures++; $display("FAIL write after rearm"); end
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
