// detune_quench: detune and quench calculator.
//
// On each `start` (once per update period, e.g. every 11.2 us) the block
// takes the complex cavity field V, forward wave K and reverse wave R and
// computes
//   a     = (1/V) * [ (V - V_prev) - b*K ]
//   Pdiss = |K|^2 - |R|^2 - u_scale * (|V|^2 - |V_prev|^2)
// where b is a complex coupling coefficient (Q1.17) and u_scale (Q6.17) turns
// the change of stored energy per update into the units of |K|^2. The real
// part of a is the cavity's decay per update and its imaginary part the
// detune phase advance per update; a is given with FRAC fractional bits.
// A rising Pdiss indicates a quench.
//
// How it works: the arithmetic is a short fixed program run by a sequencer
// around one shared multiply-accumulate unit (16 steps), followed by two
// divisions by |V|^2 done one quotient bit per clock. This sits between a
// fixed DSP pipeline and a general-purpose soft core: small and slow, which
// suits a result needed only every ~1000 clocks.
//
// Timing: `done` pulses about 16 + 2*(QW+1) clocks after start; results hold
// until the next done. `valid` is low for the first result after reset (no
// V_prev yet) and `v_zero` is set when |V|^2 = 0 (a saturates).
//
// Only the low W+3 bits of the b*K register enter the numerator (b is at
// most one in magnitude, so b*K fits), and the divider's partial remainder
// keeps one spare top bit.
//
// The two formulas, the update period and the idea of a small sequenced
// engine follow the document; the number formats, the step program and the
// divider are this design's choices.
module detune_quench #(
  parameter int unsigned W    = 22,
  parameter int unsigned C_W  = 18,
  parameter int unsigned FRAC = 24,
  parameter int unsigned A_W  = 32
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic signed [W-1:0]   v_i, v_q,
  input  logic signed [W-1:0]   k_i, k_q,
  input  logic signed [W-1:0]   r_i, r_q,
  input  logic signed [C_W-1:0] b_re, b_im,
  input  logic signed [C_W-1:0] u_scale,
  output logic                  busy,
  output logic                  done,
  output logic                  valid,
  output logic                  v_zero,
  output logic signed [A_W-1:0] a_re,
  output logic signed [A_W-1:0] a_im,
  output logic signed [63:0]    pdiss
);
  import llrf_pkg::*;
  localparam int unsigned MA = 48;          // multiplier operand A
  localparam int unsigned MB = 24;          // multiplier operand B
  localparam int unsigned AC = 80;          // accumulator
  localparam int unsigned QW = 2 * W + 4 + FRAC;  // dividend / quotient width

  typedef enum logic [1:0] {IDLE, MAC, DIV, FIN} phase_t;
  phase_t ph;
  logic [4:0] pc;

  // latched inputs and saved state
  logic signed [W-1:0]  vi, vq, ki, kq, ri, rq, vpi, vpq;
  logic signed [W:0]    dvi, dvq;
  logic signed [W+2:0]  num_i, num_q;
  logic signed [AC-1:0] acc, bk_re, p_re, p_im, u, u_prev;
  logic                 primed;

  // ---- the shared multiply-accumulate: operand selection per step
  logic signed [MA-1:0] opa;
  logic signed [MB-1:0] opb;
  logic                 sub, load;
  always_comb begin
    opa = '0; opb = '0; sub = 1'b0; load = 1'b0;
    unique case (pc)
      5'd0:  begin opa = MA'(b_re);  opb = MB'(ki);    load = 1'b1; end
      5'd1:  begin opa = MA'(b_im);  opb = MB'(kq);    sub  = 1'b1; end
      5'd2:  begin opa = MA'(b_re);  opb = MB'(kq);    load = 1'b1; end
      5'd3:  begin opa = MA'(b_im);  opb = MB'(ki);    end
      5'd4:  begin opa = MA'(num_i); opb = MB'(vi);    load = 1'b1; end
      5'd5:  begin opa = MA'(num_q); opb = MB'(vq);    end
      5'd6:  begin opa = MA'(num_q); opb = MB'(vi);    load = 1'b1; end
      5'd7:  begin opa = MA'(num_i); opb = MB'(vq);    sub  = 1'b1; end
      5'd8:  begin opa = MA'(vi);    opb = MB'(vi);    load = 1'b1; end
      5'd9:  begin opa = MA'(vq);    opb = MB'(vq);    end
      5'd10: begin opa = MA'(ki) <<< 17; opb = MB'(ki); load = 1'b1; end
      5'd11: begin opa = MA'(kq) <<< 17; opb = MB'(kq); end
      5'd12: begin opa = MA'(ri) <<< 17; opb = MB'(ri); sub = 1'b1; end
      5'd13: begin opa = MA'(rq) <<< 17; opb = MB'(rq); sub = 1'b1; end
      5'd14: begin opa = MA'(u - u_prev); opb = MB'(u_scale); sub = 1'b1; end
      default: ;
    endcase
  end

  logic signed [AC-1:0] prod, acc_next;
  assign prod     = AC'(opa) * AC'(opb);
  assign acc_next = (load ? '0 : acc) + (sub ? -prod : prod);

  // ---- divider state: |dividend| / u, one bit per clock
  logic [QW-1:0] dvd, quo;
  logic [QW:0]   rem;
  logic [7:0]    dcount;
  logic          div_im, neg;

  function automatic logic signed [A_W-1:0] sat_a(input logic [QW-1:0] q, input logic n);
    if (q > QW'({1'b0, {(A_W-1){1'b1}}}))
      return n ? signed'({1'b1, {(A_W-1){1'b0}}}) : signed'({1'b0, {(A_W-1){1'b1}}});
    return n ? -signed'(A_W'(q)) : signed'(A_W'(q));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      ph <= IDLE; pc <= '0; acc <= '0; done <= 1'b0; valid <= 1'b0; v_zero <= 1'b0;
      vpi <= '0; vpq <= '0; u_prev <= '0; u <= '0; primed <= 1'b0;
      a_re <= '0; a_im <= '0; pdiss <= '0;
      vi <= '0; vq <= '0; ki <= '0; kq <= '0; ri <= '0; rq <= '0;
      dvi <= '0; dvq <= '0; num_i <= '0; num_q <= '0; bk_re <= '0; p_re <= '0; p_im <= '0;
      dvd <= '0; quo <= '0; rem <= '0; dcount <= '0; div_im <= 1'b0; neg <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (ph)
        IDLE: if (start) begin
          vi <= v_i; vq <= v_q; ki <= k_i; kq <= k_q; ri <= r_i; rq <= r_q;
          dvi <= (W+1)'(v_i) - (W+1)'(vpi);
          dvq <= (W+1)'(v_q) - (W+1)'(vpq);
          pc <= '0;
          ph <= MAC;
        end
        MAC: begin
          acc <= acc_next;
          pc  <= pc + 1'b1;
          unique case (pc)
            5'd1: bk_re <= acc_next >>> 17;
            5'd3: begin
              num_i <= (W+3)'(dvi) - (W+3)'(bk_re);
              num_q <= (W+3)'(dvq) - (W+3)'(acc_next >>> 17);
            end
            5'd5: p_re <= acc_next;
            5'd7: p_im <= acc_next;
            5'd9: u    <= acc_next;
            5'd14: begin
              pdiss <= 64'(acc_next >>> 17);
              // start the first division: p_re / u
              neg    <= p_re < 0;
              dvd    <= QW'(p_re < 0 ? -p_re : p_re) << FRAC;
              rem    <= '0;
              quo    <= '0;
              dcount <= 8'(QW);
              div_im <= 1'b0;
              ph     <= DIV;
            end
            default: ;
          endcase
        end
        DIV: begin
          if (dcount != 0) begin
            logic [QW:0] r2;
            r2 = {rem[QW-1:0], dvd[QW-1]};
            dvd <= dvd << 1;
            if (r2 >= (QW+1)'(u)) begin
              rem <= r2 - (QW+1)'(u);
              quo <= {quo[QW-2:0], 1'b1};
            end else begin
              rem <= r2;
              quo <= {quo[QW-2:0], 1'b0};
            end
            dcount <= dcount - 1'b1;
          end else if (!div_im) begin
            a_re   <= (u == 0) ? (neg ? signed'({1'b1, {(A_W-1){1'b0}}}) : signed'({1'b0, {(A_W-1){1'b1}}}))
                               : sat_a(quo, neg);
            neg    <= p_im < 0;
            dvd    <= QW'(p_im < 0 ? -p_im : p_im) << FRAC;
            rem    <= '0;
            quo    <= '0;
            dcount <= 8'(QW);
            div_im <= 1'b1;
          end else begin
            a_im <= (u == 0) ? (neg ? signed'({1'b1, {(A_W-1){1'b0}}}) : signed'({1'b0, {(A_W-1){1'b1}}}))
                             : sat_a(quo, neg);
            ph <= FIN;
          end
        end
        FIN: begin
          v_zero <= u == 0;
          valid  <= primed;
          primed <= 1'b1;
          vpi    <= vi;
          vpq    <= vq;
          u_prev <= u;
          done   <= 1'b1;
          ph     <= IDLE;
        end
        default: ph <= IDLE;
      endcase
    end
  end

  assign busy = ph != IDLE;
endmodule
