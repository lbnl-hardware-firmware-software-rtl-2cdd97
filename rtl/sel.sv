// sel: digital self-excited loop (SEL), the core of the RF station controller.
//
// The cavity I/Q from the down converter is turned into amplitude R and phase
// theta by a vectoring CORDIC. The drive is then built in polar form and
// turned back into I/Q by a rotation CORDIC:
//   X     = amplitude PI controller on R against amp_set (or the open-loop
//           amplitude amp_ol while the amplitude loop is off)
//   Y     = phase PI controller on theta against phase_set (0 while the
//           phase loop is off): a quadrature term that pulls the phase
//   angle = theta + phase_offset while ph_track is set (self-excited: the
//           drive follows the cavity's own phase, so the loop oscillates at
//           the cavity frequency), otherwise phase_offset alone
// In chirp mode X and the angle come from the phase parabola generator and
// Y is 0. Drive limits: in every mode X is clamped to +-amp_out_lim and Y
// to +-ph_out_lim before the rotation CORDIC, so an open-loop or chirp
// amplitude can never exceed the limit set for the amplitude loop. Together these controls give the operating modes run by software:
// chirp; pulsed (fixed amplitude and phase); SEL raw / SEL (tracking phase,
// open-loop amplitude); SELA (amplitude loop closed); SELAP (both loops).
//
// Timing: one complex sample per clock. Drive latency from cavity I/Q to
// drive I/Q is 2*(STAGES+1) + 3 clocks: vectoring CORDIC, PI controllers (2),
// mode select register (1), rotation CORDIC. meas_r/meas_theta are the
// vectoring CORDIC outputs (amplitude scaled by the CORDIC gain 0.8234).
// amp_err/phase_err are the controllers' errors (set point - measurement,
// phase as a fraction of a turn), one clock after meas_r/meas_theta.
//
// The arrangement (two CORDICs, amplitude and phase set-point controllers,
// phase offset adder, chirp source switched onto the rotation CORDIC inputs)
// follows the controller's block diagram; the widths, the mode controls and
// the open-loop values are this design's choices.
module sel #(
  parameter int unsigned W      = 22,
  parameter int unsigned STAGES = 20,
  parameter int unsigned K_W    = 18
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic signed [W-1:0]   cav_i,
  input  logic signed [W-1:0]   cav_q,
  // controls
  input  logic                  amp_loop_en,
  input  logic                  phase_loop_en,
  input  logic                  ph_track,
  input  logic                  chirp_mode,
  input  logic signed [W-1:0]   amp_set,
  input  logic signed [W-1:0]   amp_ol,
  input  logic [W-1:0]          phase_set,
  input  logic [W-1:0]          phase_offset,
  input  logic signed [K_W-1:0] amp_kp,
  input  logic signed [K_W-1:0] amp_ki,
  input  logic signed [K_W-1:0] ph_kp,
  input  logic signed [K_W-1:0] ph_ki,
  input  logic [W-2:0]          amp_int_lim,
  input  logic [W-2:0]          amp_out_lim,
  input  logic [W-2:0]          ph_int_lim,
  input  logic [W-2:0]          ph_out_lim,
  // chirp source
  input  logic                  chirp_active,
  input  logic signed [W-1:0]   chirp_amp,
  input  logic [W-1:0]          chirp_theta,
  // results
  output logic signed [W-1:0]   meas_r,
  output logic [W-1:0]          meas_theta,
  output logic                  drive_valid,
  output logic signed [W-1:0]   drive_i,
  output logic signed [W-1:0]   drive_q,
  output logic signed [W-1:0]   amp_err,
  output logic signed [W-1:0]   phase_err
);
  logic v1, v2;
  logic signed [W-1:0] r1, unused_y1;
  logic [W-1:0] th1;

  cordic #(.WIDTH(W), .STAGES(STAGES)) u_polar (
    .clk, .rst, .in_valid(1'b1), .op_vec(1'b1),
    .x_in(cav_i), .y_in(cav_q), .z_in('0),
    .out_valid(v1), .x_out(r1), .y_out(unused_y1), .z_out(th1)
  );

  logic signed [W-1:0] amp_pi, ph_pi;

  pi_ctrl #(.W(W), .K_W(K_W), .WRAP(1'b0)) u_amp_set (
    .clk, .rst, .enable(amp_loop_en), .meas(r1), .setpoint(amp_set),
    .kp(amp_kp), .ki(amp_ki), .int_lim(amp_int_lim), .out_lim(amp_out_lim),
    .preload(amp_ol), .out(amp_pi), .err_out(amp_err)
  );

  pi_ctrl #(.W(W), .K_W(K_W), .WRAP(1'b1)) u_phase_set (
    .clk, .rst, .enable(phase_loop_en), .meas(signed'(th1)), .setpoint(signed'(phase_set)),
    .kp(ph_kp), .ki(ph_ki), .int_lim(ph_int_lim), .out_lim(ph_out_lim),
    .preload('0), .out(ph_pi), .err_out(phase_err)
  );

  // theta delayed to line up with the controller outputs
  logic [W-1:0] th_d1, th_d2;
  always_ff @(posedge clk) begin
    th_d1 <= th1;
    th_d2 <= th_d1;
  end

  // drive limit: X and Y are held within the controllers' output limits in
  // every mode, so open-loop and chirp amplitudes are bounded too
  function automatic logic signed [W-1:0] lim(input logic signed [W-1:0] v, input logic [W-2:0] l);
    logic signed [W-1:0] ls;
    ls = W'(l);
    if (v > ls)  return ls;
    if (v < -ls) return -ls;
    return v;
  endfunction

  logic signed [W-1:0] x_sel, y_sel;
  logic [W-1:0]        z_sel;
  always_ff @(posedge clk) begin
    if (rst) begin
      x_sel <= '0;
      y_sel <= '0;
      z_sel <= '0;
    end else if (chirp_mode) begin
      x_sel <= chirp_active ? lim(chirp_amp, amp_out_lim) : '0;
      y_sel <= '0;
      z_sel <= chirp_theta;
    end else begin
      x_sel <= lim(amp_pi, amp_out_lim);
      y_sel <= lim(ph_pi, ph_out_lim);
      z_sel <= ph_track ? th_d2 + phase_offset : phase_offset;
    end
  end

  logic [W-1:0] unused_z2;
  cordic #(.WIDTH(W), .STAGES(STAGES)) u_rect (
    .clk, .rst, .in_valid(v1), .op_vec(1'b0),
    .x_in(x_sel), .y_in(y_sel), .z_in(z_sel),
    .out_valid(v2), .x_out(drive_i), .y_out(drive_q), .z_out(unused_z2)
  );

  assign drive_valid = v2;
  assign meas_r     = r1;
  assign meas_theta = th1;
endmodule
