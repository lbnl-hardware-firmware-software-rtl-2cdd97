// chitchat_tx: transmitter of the ChitChat fiber frame that carries real-time
// data (for example cavity detune and its valid flag) between chassis.
//
// A frame is 11 sixteen-bit words sent on consecutive clocks:
//   0  {PROTOCOL_CAT[3:0], PROTOCOL_VER[3:0], COMMA[7:0]}  (comma k-flagged)
//   1  {GATEWARE_TYPE[2:0], TX_LOCATION[2:0], 10'b0 reserved}
//   2  REVISION_ID[31:16]      3  REVISION_ID[15:0]
//   4  TX_DATA0[31:16]         5  TX_DATA0[15:0]
//   6  TX_DATA1[31:16]         7  TX_DATA1[15:0]
//   8  TX_FRAME_COUNT          9  TX_LOOPBACK_FRAME_COUNT
//   10 CRC over words 0..9
// All fields are sampled together when word 0 goes out, so a frame is always
// self-consistent. TX_FRAME_COUNT counts frames; TX_LOOPBACK_FRAME_COUNT
// echoes the frame count last received from the far end, which lets that end
// measure the loop-back latency. With a 125 MHz word clock a frame repeats at
// 125/11 = 11.36 MHz.
//
// Timing: tx_word/tx_k are registered; frame_start is high with word 0.
//
// The frame layout, the word count, the comma and the use of a CRC follow
// the protocol description; the CRC polynomial (CRC-16-CCITT, seed 0xFFFF)
// and the K28.5 comma value are this design's choices.
module chitchat_tx (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  protocol_cat,
  input  logic [3:0]  protocol_ver,
  input  logic [2:0]  gateware_type,
  input  logic [2:0]  tx_location,
  input  logic [31:0] revision_id,
  input  logic [31:0] tx_data0,
  input  logic [31:0] tx_data1,
  input  logic [15:0] loopback_frame_count,
  output logic [15:0] tx_word,
  output logic [1:0]  tx_k,
  output logic        frame_start,
  output logic [15:0] frame_count
);
  import llrf_pkg::*;

  logic [3:0]  idx;
  logic [15:0] crc;
  logic [15:0] fw [CC_WORDS - 1];   // words 0..9 of the frame being sent
  logic [15:0] w_now;

  // word 0 comes straight from the inputs; later words from the snapshot
  always_comb begin
    if (idx == 0)                 w_now = {protocol_cat, protocol_ver, CC_COMMA};
    else if (idx < 4'(CC_WORDS - 1))  w_now = fw[idx];
    else                          w_now = crc;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx         <= '0;
      crc         <= CRC16_SEED;
      tx_word     <= '0;
      tx_k        <= '0;
      frame_start <= 1'b0;
      frame_count <= '0;
      for (int k = 0; k < CC_WORDS - 1; k++) fw[k] <= '0;
    end else begin
      tx_word     <= w_now;
      tx_k        <= (idx == 0) ? 2'b01 : 2'b00;
      frame_start <= idx == 0;
      if (idx == 0) begin
        fw[1] <= {gateware_type, tx_location, 10'b0};
        fw[2] <= revision_id[31:16];
        fw[3] <= revision_id[15:0];
        fw[4] <= tx_data0[31:16];
        fw[5] <= tx_data0[15:0];
        fw[6] <= tx_data1[31:16];
        fw[7] <= tx_data1[15:0];
        fw[8] <= frame_count;
        fw[9] <= loopback_frame_count;
        crc   <= crc16_word(CRC16_SEED, w_now);
      end else if (idx < 4'(CC_WORDS - 1)) begin
        crc <= crc16_word(crc, w_now);
      end
      if (idx == 4'(CC_WORDS - 1)) begin
        idx         <= '0;
        frame_count <= frame_count + 1'b1;
      end else begin
        idx <= idx + 1'b1;
      end
    end
  end
endmodule
