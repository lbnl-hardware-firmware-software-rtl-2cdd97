// waveform_buffer: fixed-size circular buffer for waveform capture with fault
// capture.
//
// Samples (data plus channel tag) from the decimating conveyor are written to
// consecutive addresses, wrapping at 2^AW, while the buffer is RUNNING. A
// fault (or software) trigger moves it to POST: it keeps writing post_len more
// samples, then FROZEN: writing stops, so the buffer holds the history before
// the fault and post_len samples after it. wr_ptr then points at the oldest
// sample. rearm returns to RUNNING. Reading is allowed at any time through a
// synchronous read port (data one clock after rd_addr).
//
// The circular buffer, its fixed size and the fault capture follow the
// document; the depth, the post-trigger count and the state names are this
// design's choices.
module waveform_buffer #(
  parameter int unsigned DW = 22,
  parameter int unsigned CW = 3,
  parameter int unsigned AW = 11
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic [DW-1:0]      in_data,
  input  logic [CW-1:0]      in_chan,
  input  logic               trigger,
  input  logic               rearm,
  input  logic [AW-1:0]      post_len,
  output logic               frozen,
  output logic [AW-1:0]      wr_ptr,
  input  logic [AW-1:0]      rd_addr,
  output logic [DW+CW-1:0]   rd_data
);
  typedef enum logic [1:0] {RUNNING, POST, FROZEN} state_t;
  state_t state;
  logic [AW-1:0] post_left;
  logic [DW+CW-1:0] mem [2**AW];
  logic we;

  assign we = in_valid && state != FROZEN;

  always_ff @(posedge clk) begin
    if (we) mem[wr_ptr] <= {in_chan, in_data};
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= RUNNING;
      wr_ptr    <= '0;
      post_left <= '0;
    end else begin
      if (we) wr_ptr <= wr_ptr + 1'b1;
      unique case (state)
        RUNNING: if (trigger) begin
          post_left <= post_len;
          state     <= (post_len == 0) ? FROZEN : POST;
        end
        POST: if (in_valid) begin
          post_left <= post_left - 1'b1;
          if (post_left == 1) state <= FROZEN;
        end
        FROZEN: if (rearm) state <= RUNNING;
        default: state <= RUNNING;
      endcase
    end
  end

  assign frozen = state == FROZEN;
endmodule
