// chitchat_rx_tb: builds ChitChat frames here (fields, comma with k-flag,
// bit-serial CRC) and sends them to the receiver with idle words and a
// misaligned start. Good frames must update all fields and pulse `valid`;
// a frame with one corrupted payload word, and one cut short by a new comma,
// must each increment crc_faults and leave the fields unchanged. Checks the
// loop-back latency output (local count minus echoed count). Ends with 40
// random frames, about a quarter with one corrupted word, each checked.
module chitchat_rx_tb;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  logic [15:0] rx_word = 0, local_frame_count = 0;
  logic [1:0]  rx_k = 0;
  logic valid;
  logic [3:0] protocol_cat, protocol_ver;
  logic [2:0] gateware_type, tx_location;
  logic [31:0] revision_id, rx_data0, rx_data1;
  logic [15:0] rx_frame_count, rx_loopback_frame_count, crc_faults, loopback_latency;
  int checks = 0, failures = 0, valids = 0;
  chitchat_rx dut (.*);

  always @(posedge clk) if (valid) valids++;

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

  task automatic send(input logic [31:0] d0, input logic [31:0] d1, input logic [15:0] fc,
                      input logic [15:0] lb, input int corrupt, input int cut);
    logic [15:0] w [11];
    w[0] = {4'h3, 4'h1, 8'hBC};
    w[1] = {3'd6, 3'd1, 10'b0};
    w[2] = 16'hCAFE; w[3] = 16'hF00D;
    w[4] = d0[31:16]; w[5] = d0[15:0]; w[6] = d1[31:16]; w[7] = d1[15:0];
    w[8] = fc; w[9] = lb;
    w[10] = crc_bits({w[0], w[1], w[2], w[3], w[4], w[5], w[6], w[7], w[8], w[9]});
    if (corrupt >= 0) w[corrupt] = w[corrupt] ^ 16'h0010;
    for (int k = 0; k < 11; k++) begin
      if (cut > 0 && k == cut) break;
      @(negedge clk);
      rx_word = w[k];
      rx_k = (k == 0) ? 2'b01 : 2'b00;
    end
  endtask

  initial begin
    int v0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // idle garbage, then a partial tail of a frame (no comma)
    repeat (7) begin @(negedge clk); rx_word = 16'($urandom); rx_k = 0; end
    send(32'h11112222, 32'h33334444, 16'd100, 16'd90, -1, 0);
    @(negedge clk) rx_k = 0; rx_word = 0;
    @(negedge clk);
    checks += 8;
    if (valids != 1) begin failures++; $display("FAIL valid count %0d", valids); end
    if (rx_data0 != 32'h11112222 || rx_data1 != 32'h33334444) begin failures++; $display("FAIL data"); end
    if (rx_frame_count != 100 || rx_loopback_frame_count != 90) begin failures++; $display("FAIL counts"); end
    if (protocol_cat != 4'h3 || protocol_ver != 4'h1) begin failures++; $display("FAIL protocol"); end
    if (gateware_type != 3'd6 || tx_location != 3'd1) begin failures++; $display("FAIL gw/loc"); end
    if (revision_id != 32'hCAFEF00D) begin failures++; $display("FAIL rev"); end
    if (crc_faults != 0) begin failures++; $display("FAIL crc_faults %0d", crc_faults); end
    local_frame_count = 16'd97;
    @(negedge clk);
    if (loopback_latency != 16'd7) begin failures++; $display("FAIL latency %0d", loopback_latency); end
    // corrupted frame
    v0 = valids;
    send(32'hAAAAAAAA, 32'hBBBBBBBB, 16'd101, 16'd91, 5, 0);
    @(negedge clk) rx_k = 0;
    @(negedge clk);
    checks += 3;
    if (crc_faults != 1) begin failures++; $display("FAIL crc fault not counted"); end
    if (valids != v0) begin failures++; $display("FAIL valid on bad frame"); end
    if (rx_data0 != 32'h11112222) begin failures++; $display("FAIL data changed by bad frame"); end
    // frame cut short, immediately followed by a good one
    send(32'h55555555, 32'h66666666, 16'd102, 16'd92, -1, 6);
    send(32'h77777777, 32'h88888888, 16'd103, 16'd93, -1, 0);
    @(negedge clk) rx_k = 0;
    @(negedge clk);
    checks += 2;
    if (crc_faults != 2) begin failures++; $display("FAIL cut frame not counted (%0d)", crc_faults); end
    if (rx_data0 != 32'h77777777 || rx_frame_count != 103) begin failures++; $display("FAIL frame after cut"); end
    // back-to-back good frames
    for (int f = 0; f < 5; f++) send(32'(f), 32'(f * 3), 16'(200 + f), 16'(150 + f), -1, 0);
    @(negedge clk) rx_k = 0;
    @(negedge clk);
    checks += 2;
    if (rx_data0 != 32'd4 || rx_frame_count != 16'd204) begin failures++; $display("FAIL back-to-back"); end
    if (valids != v0 + 6) begin failures++; $display("FAIL valid count %0d", valids - v0); end
    // random frames, some corrupted
    for (int f = 0; f < 40; f++) begin
      logic [31:0] d0, d1, p0;
      logic [15:0] fc, lb, nf;
      int bad, vv;
      d0 = $urandom; d1 = $urandom; fc = 16'($urandom); lb = 16'($urandom);
      bad = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 10) : -1;
      p0 = rx_data0; nf = crc_faults; vv = valids;
      send(d0, d1, fc, lb, bad, 0);
      @(negedge clk) rx_k = 0; rx_word = 16'($urandom);
      @(negedge clk);
      checks += 2;
      if (bad < 0) begin
        if (rx_data0 != d0 || rx_data1 != d1 || rx_frame_count != fc || rx_loopback_frame_count != lb || valids != vv + 1) begin
          failures++; $display("FAIL random frame %0d", f);
        end
        if (crc_faults != nf) begin failures++; $display("FAIL random frame %0d flagged", f); end
      end else begin
        if (rx_data0 != p0 || valids != vv) begin failures++; $display("FAIL corrupted frame %0d accepted", f); end
        if (crc_faults != nf + 1) begin failures++; $display("FAIL corrupted frame %0d not counted", f); end
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
