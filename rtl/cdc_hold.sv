// cdc_hold: moves a slowly changing word from one clock domain to another.
//
// A load in the source domain stores the word and flips a toggle. The toggle
// crosses through two flip-flops; when the destination sees it change, the
// stored word (stable for several destination clocks by then) is copied.
// Loads must be spaced by more than about four clocks of the slower domain;
// the detune results it carries change once per ~1000 clocks.
module cdc_hold #(
  parameter int unsigned W = 64
) (
  input  logic         src_clk,
  input  logic         src_rst,
  input  logic         src_load,
  input  logic [W-1:0] src_data,
  input  logic         dst_clk,
  input  logic         dst_rst,
  output logic [W-1:0] dst_data,
  output logic         dst_update
);
  logic [W-1:0] hold;
  logic         tgl_src;
  logic [2:0]   tgl_dst;

  always_ff @(posedge src_clk) begin
    if (src_rst) begin
      hold    <= '0;
      tgl_src <= 1'b0;
    end else if (src_load) begin
      hold    <= src_data;
      tgl_src <= ~tgl_src;
    end
  end

  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      tgl_dst    <= '0;
      dst_data   <= '0;
      dst_update <= 1'b0;
    end else begin
      tgl_dst    <= {tgl_dst[1:0], tgl_src};
      dst_update <= tgl_dst[2] ^ tgl_dst[1];
      if (tgl_dst[2] ^ tgl_dst[1]) dst_data <= hold;
    end
  end
endmodule
