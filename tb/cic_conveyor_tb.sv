// cic_conveyor_tb: eight channels with different constant inputs, decimation
// 16 and shift 8 (CIC gain 16^2 = 2^8, half-band DC gain 1), so once the
// filters settle every output must equal its channel's input exactly. Checks
// that only channels set in chan_mask appear on out_valid, that out_any covers
// all channels, that they leave in channel order, and that each selected
// channel produces one output per 2*dec clocks. Then a ramp input on one
// channel checks the decimated slope (2*dec*step per output).
module cic_conveyor_tb;
  localparam int NCH = 8, IW = 22, OW = 22, DW = 12, DEC = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic signed [IW-1:0] din [NCH];
  logic [DW-1:0] dec = DW'(DEC);
  logic [5:0] shift = 6'd8;
  logic [NCH-1:0] chan_mask = 8'b1010_0111;
  logic out_valid, out_any, pass_done;
  logic [2:0] out_chan;
  logic signed [OW-1:0] out_data;
  int checks = 0, failures = 0;
  cic_conveyor #(.NCH(NCH), .IN_W(IW), .OUT_W(OW), .DEC_W(DW)) dut (.*);

  int vals [NCH] = '{1000, -2000, 30000, -400000, 5, 0, 777777, -1};
  int n_out [NCH];
  int last_t [NCH];
  int cyc = 0, passes = 0, settle = 0, ramp_mode = 0;
  int prev_ch = -1;
  longint prev_ramp = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst) begin
    if (pass_done) passes++;
    if (out_valid) begin
      checks++;
      if (!chan_mask[out_chan]) begin failures++; $display("FAIL masked channel %0d", out_chan); end
      if (!ramp_mode && passes > 3) begin
        checks++;
        if (out_data != OW'(vals[out_chan])) begin failures++; $display("FAIL ch %0d: %0d vs %0d", out_chan, out_data, vals[out_chan]); end
        if (last_t[out_chan] > 0) begin
          checks++;
          if (cyc - last_t[out_chan] != 2 * DEC) begin failures++; $display("FAIL rate ch %0d: %0d", out_chan, cyc - last_t[out_chan]); end
        end
        n_out[out_chan]++;
      end
      if (ramp_mode && out_chan == 0 && passes > 14) begin
        if (prev_ramp != 0) begin
          checks++;
          if (longint'(out_data) - prev_ramp != 2 * DEC * 3) begin failures++; $display("FAIL ramp slope %0d", longint'(out_data) - prev_ramp); end
        end
        prev_ramp = longint'(out_data);
      end
      last_t[out_chan] = cyc;
    end
    if (out_any) begin
      if (prev_ch >= 0 && int'(out_chan) != prev_ch + 1 && out_chan != 0) begin
        checks++; failures++; $display("FAIL order");
      end
      prev_ch = int'(out_chan);
    end
  end

  initial begin
    foreach (din[c]) din[c] = IW'(vals[c]);
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (40 * 2 * DEC) @(posedge clk);
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (chan_mask[c] && n_out[c] < 30) begin failures++; $display("FAIL ch %0d produced %0d", c, n_out[c]); end
      if (!chan_mask[c] && n_out[c] != 0) begin failures++; end
    end
    // ramp on channel 0: x[n] = 3n, slope per output 3*2*DEC
    @(negedge clk);
    ramp_mode = 1; passes = 0; chan_mask = 8'h01; shift = 6'd8;
    for (int k = 0; k < 25 * 2 * DEC; k++) begin
      @(negedge clk);
      din[0] = IW'(3 * k - 150000);
    end
    checks++;
    if (prev_ramp == 0) begin failures++; $display("FAIL no ramp outputs"); end
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
