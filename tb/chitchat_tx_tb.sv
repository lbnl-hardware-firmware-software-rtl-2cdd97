// chitchat_tx_tb: captures transmitted frames and checks every word of the
// 11-word layout against the field inputs, the k-flag on the comma, the frame
// counter, that fields changed mid-frame only appear in the next frame, and
// the CRC, recomputed here bit-serially over the 160 bits of words 0..9
// (x^16+x^12+x^5+1, seed 0xFFFF, MSB first). Checks the 11-clock frame period.
module chitchat_tx_tb;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  logic [3:0]  protocol_cat = 4'h3, protocol_ver = 4'h1;
  logic [2:0]  gateware_type = 3'd5, tx_location = 3'd2;
  logic [31:0] revision_id = 32'hDEADBEEF, tx_data0 = 32'h12345678, tx_data1 = 32'h9ABCDEF0;
  logic [15:0] loopback_frame_count = 16'h0042;
  logic [15:0] tx_word, frame_count;
  logic [1:0]  tx_k;
  logic        frame_start;
  int checks = 0, failures = 0;
  chitchat_tx dut (.*);

  function automatic logic [15:0] crc_bits(input logic [159:0] bits);
    logic [15:0] c = 16'hFFFF;
    for (int b = 159; b >= 0; b--) begin
      logic fb;
      fb = c[15] ^ bits[b];
      c = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  logic [15:0] w [11];
  initial begin
    int last_start, expect_fc;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // wait for a frame start
    while (!frame_start) @(negedge clk);
    last_start = 0;
    expect_fc = -1;
    for (int f = 0; f < 6; f++) begin
      logic [31:0] d0;
      d0 = tx_data0;
      for (int k = 0; k < 11; k++) begin
        checks++;
        if (frame_start != (k == 0)) begin failures++; $display("FAIL frame_start at word %0d", k); end
        w[k] = tx_word;
        checks++;
        if (tx_k != (k == 0 ? 2'b01 : 2'b00)) begin failures++; $display("FAIL k flag word %0d", k); end
        if (k == 3) tx_data0 = tx_data0 + 32'h01010101;  // change mid-frame
        @(negedge clk);
      end
      checks += 11;
      if (w[0] != {protocol_cat, protocol_ver, 8'hBC}) begin failures++; $display("FAIL w0 %h", w[0]); end
      if (w[1] != {gateware_type, tx_location, 10'b0}) begin failures++; $display("FAIL w1"); end
      if ({w[2], w[3]} != revision_id) begin failures++; $display("FAIL rev"); end
      if ({w[4], w[5]} != d0) begin failures++; $display("FAIL data0 %h%h vs %h", w[4], w[5], d0); end
      if ({w[6], w[7]} != tx_data1) begin failures++; $display("FAIL data1"); end
      if (expect_fc >= 0 && w[8] != 16'(expect_fc)) begin failures++; $display("FAIL frame count"); end
      expect_fc = int'(w[8]) + 1;
      if (w[9] != loopback_frame_count) begin failures++; $display("FAIL loopback"); end
      if (w[10] != crc_bits({w[0], w[1], w[2], w[3], w[4], w[5], w[6], w[7], w[8], w[9]})) begin
        failures++; $display("FAIL crc %h", w[10]);
      end
      checks++;
      if (!frame_start) begin failures++; $display("FAIL frame period"); end
      if (frame_count != 16'(expect_fc)) begin failures++; $display("FAIL frame_count output"); end
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
