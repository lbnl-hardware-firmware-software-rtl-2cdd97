// phase_offset_loop: locks the DDS phase to the phase reference line (PRL).
//
// The PRL is down-converted with the shared LO; its quadrature component q is
// proportional to sin(prl_phase - lo_phase). An integrator
//   acc <= acc + (q <<< 10) >>> gain_sh      (32-bit fraction of a turn)
// moves the LO phase until q is zero, so that a cavity signal in phase with
// the reference reads as zero phase. phase_offset is the top WIDTH bits of
// acc and feeds the DDS. While enable is low the offset holds its value.
//
// Timing: one update per clock with a registered output; the loop settles in
// a number of clocks set by gain_sh and the PRL amplitude.
//
// The function (PRL DDC, phase offset loop, DDS) follows the document; the
// first-order integrator and its scaling are this design's choices.
module phase_offset_loop #(
  parameter int unsigned WIDTH = 22
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    enable,
  input  logic signed [WIDTH-1:0] prl_q,
  input  logic [4:0]              gain_sh,
  output logic [WIDTH-1:0]        phase_offset
);
  logic [31:0] acc;
  logic signed [31:0] step;
  assign step = (32'(prl_q) <<< 10) >>> gain_sh;

  always_ff @(posedge clk) begin
    if (rst)         acc <= '0;
    else if (enable) acc <= acc + step;
  end

  assign phase_offset = acc[31 -: WIDTH];
endmodule
