// chitchat_rx: receiver of the ChitChat fiber frame (layout in chitchat_tx).
//
// The receiver aligns on the k-flagged comma in the low byte of word 0,
// collects the next ten words, runs the same CRC over words 0..9 and compares
// it with word 10. A frame whose CRC matches updates every output field and
// pulses `valid`; a frame whose CRC does not match, or that is cut short by a
// new comma, increments crc_faults and leaves the fields as they were.
// loopback_latency is local_frame_count minus the TX_LOOPBACK_FRAME_COUNT of
// the last good frame, i.e. the round trip in frames.
//
// Timing: `valid` pulses the clock after word 10 arrives.
// rx_k[1] (k-flag of the high byte) is not used: the frame has no k-character
// there.
//
// CRC checking, fault counting and loop-back latency follow the protocol
// description; the alignment method and the fault counter width are this
// design's choices.
module chitchat_rx (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] rx_word,
  input  logic [1:0]  rx_k,
  input  logic [15:0] local_frame_count,
  output logic        valid,
  output logic [3:0]  protocol_cat,
  output logic [3:0]  protocol_ver,
  output logic [2:0]  gateware_type,
  output logic [2:0]  tx_location,
  output logic [31:0] revision_id,
  output logic [31:0] rx_data0,
  output logic [31:0] rx_data1,
  output logic [15:0] rx_frame_count,
  output logic [15:0] rx_loopback_frame_count,
  output logic [15:0] crc_faults,
  output logic [15:0] loopback_latency
);
  import llrf_pkg::*;

  logic        in_frame;
  logic [3:0]  idx;
  logic [15:0] crc;
  logic [15:0] w [CC_WORDS - 1];
  logic        comma;

  assign comma = rx_k[0] && rx_word[7:0] == CC_COMMA;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_frame <= 1'b0;
      idx <= '0;
      crc <= CRC16_SEED;
      valid <= 1'b0;
      crc_faults <= '0;
      protocol_cat <= '0; protocol_ver <= '0; gateware_type <= '0; tx_location <= '0;
      revision_id <= '0; rx_data0 <= '0; rx_data1 <= '0;
      rx_frame_count <= '0; rx_loopback_frame_count <= '0;
      for (int k = 0; k < CC_WORDS - 1; k++) w[k] <= '0;
    end else begin
      valid <= 1'b0;
      if (comma) begin
        if (in_frame) crc_faults <= crc_faults + 1'b1;  // frame cut short
        in_frame <= 1'b1;
        w[0] <= rx_word;
        crc  <= crc16_word(CRC16_SEED, rx_word);
        idx  <= 4'd1;
      end else if (in_frame) begin
        if (idx < 4'(CC_WORDS - 1)) begin
          w[idx] <= rx_word;
          crc    <= crc16_word(crc, rx_word);
          idx    <= idx + 1'b1;
        end else begin
          in_frame <= 1'b0;
          if (rx_word == crc) begin
            valid <= 1'b1;
            protocol_cat  <= w[0][15:12];
            protocol_ver  <= w[0][11:8];
            gateware_type <= w[1][15:13];
            tx_location   <= w[1][12:10];
            revision_id   <= {w[2], w[3]};
            rx_data0      <= {w[4], w[5]};
            rx_data1      <= {w[6], w[7]};
            rx_frame_count          <= w[8];
            rx_loopback_frame_count <= w[9];
          end else begin
            crc_faults <= crc_faults + 1'b1;
          end
        end
      end
    end
  end

  assign loopback_latency = local_frame_count - rx_loopback_frame_count;
endmodule
