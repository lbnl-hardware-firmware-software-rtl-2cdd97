// pi_ctrl: set-point proportional-integral controller (the "amp set" and
// "phase set" boxes of the self-excited loop).
//
// err = setpoint - meas is registered (SPR stage), then
//   integ <= clip(integ + (ki*err >>> GAIN_SH), +-int_lim)
//   out   <= clip((kp*err >>> GAIN_SH) + integ, +-out_lim)
// Both clip levels are run-time settings (the configurable saturation).
// With WRAP = 1 the error is taken modulo 2^W, as needed for phases given as
// fractions of a turn; otherwise it keeps one extra bit and is then clipped.
// While enable is low the integrator is loaded with `preload`, so switching
// the loop on starts from the current open-loop drive.
//
// err_out is the registered error (saturated to W bits), the amplitude or
// phase error reported for monitoring.
//
// Timing: one sample per clock, latency 2 (error register, output register);
// err_out lags the inputs by 1.
//
// The structure (difference with set point, register, Kp and Ki paths,
// integrator, sum, configurable saturation) follows the document; the widths,
// gain scaling and the preload are this design's choices.
module pi_ctrl #(
  parameter int unsigned W       = 22,
  parameter int unsigned K_W     = 18,
  parameter int unsigned GAIN_SH = 12,
  parameter bit          WRAP    = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  enable,
  input  logic signed [W-1:0]   meas,
  input  logic signed [W-1:0]   setpoint,
  input  logic signed [K_W-1:0] kp,
  input  logic signed [K_W-1:0] ki,
  input  logic        [W-2:0]   int_lim,
  input  logic        [W-2:0]   out_lim,
  input  logic signed [W-1:0]   preload,
  output logic signed [W-1:0]   out,
  output logic signed [W-1:0]   err_out
);
  localparam int unsigned EW = W + 1;
  localparam int unsigned PW = EW + K_W;

  logic signed [EW-1:0] err, err_r;
  logic signed [W-1:0]  integ;

  always_comb begin
    err = EW'(setpoint) - EW'(meas);
    if (WRAP) err = EW'(signed'(err[W-1:0]));
  end

  function automatic logic signed [W-1:0] clip(input logic signed [PW:0] v, input logic [W-2:0] lim);
    logic signed [PW:0] l;
    l = (PW+1)'(lim);
    if (v > l)  return W'(l);
    if (v < -l) return W'(-l);
    return W'(v);
  endfunction

  // registered error for monitoring, saturated to W bits (exact with WRAP)
  localparam logic signed [EW-1:0] EMAX = EW'((1 << (W - 1)) - 1);
  localparam logic signed [EW-1:0] EMIN = EW'(-(1 << (W - 1)));
  assign err_out = (err_r > EMAX) ? W'(EMAX) : (err_r < EMIN) ? W'(EMIN) : W'(err_r);

  logic signed [PW:0] p_term, i_term, i_next, o_next;
  always_comb begin
    p_term = (PW+1)'((PW'(err_r) * PW'(kp)) >>> GAIN_SH);
    i_term = (PW+1)'((PW'(err_r) * PW'(ki)) >>> GAIN_SH);
    i_next = (PW+1)'(integ) + i_term;
    o_next = p_term + (PW+1)'(integ);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      err_r <= '0;
      integ <= '0;
      out   <= '0;
    end else begin
      err_r <= err;
      if (!enable) begin
        integ <= preload;
        out   <= preload;
      end else begin
        integ <= clip(i_next, int_lim);
        out   <= clip(o_next, out_lim);
      end
    end
  end
endmodule
