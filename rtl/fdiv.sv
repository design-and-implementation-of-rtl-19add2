// fdiv: floating point divider, one of the three modules that can be loaded
// into the reconfigurable region.
//
// Steps: divide the significands, subtract the exponents and add back one
// bias, normalize, and round to FRAC_W fraction bits by truncation. The
// significand division is this design's own choice of the simplest circuit
// that does it: a restoring divider that produces one quotient bit per
// clock. With M = FRAC_W+1 significand bits it computes
// Q = floor(ma * 2^(M+1) / mb), M+2 bits; because ma/mb lies in (1/2, 2),
// Q's top bit tells whether the quotient must be shifted left by one (and
// the exponent decremented) to normalize.
//
// Result conventions match the multiplier: an exponent outside the normal
// range sets `ov` and returns an all-ones exponent with the sign and the
// truncated fraction; a zero dividend gives a signed zero; a zero divisor
// or an all-ones exponent operand sets `ov` and returns an all-ones exponent
// with a zero fraction. Subnormal operands are flushed to zero.
//
// Interface: `start` samples `a` (dividend) and `b` (divisor) while the
// unit is idle (`busy` low; a `start` while busy is ignored). `busy` rises on
// the next edge; after M+2 iteration cycles and one normalize cycle,
// `result`, `ov` and a one-cycle `done` pulse appear FRAC_W+5 clock edges
// after `start` (28 for single precision). Synchronous active-high reset.
module fdiv #(
  parameter int unsigned EXP_W  = 8,
  parameter int unsigned FRAC_W = 23
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic [EXP_W+FRAC_W:0] a,
  input  logic [EXP_W+FRAC_W:0] b,
  output logic [EXP_W+FRAC_W:0] result,
  output logic                  ov,
  output logic                  busy,
  output logic                  done
);

  localparam int unsigned M  = FRAC_W + 1;
  localparam int unsigned QW = M + 2;
  localparam int unsigned CW = $clog2(QW);
  localparam logic [EXP_W-1:0] EMAX = '1;
  localparam int BIAS = (1 << (EXP_W - 1)) - 1;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIN} state_e;

  state_e                  state_q;
  logic                    sr_q, za_q, zb_q, special_q;
  logic signed [EXP_W+1:0] e_q;
  logic [M:0]              rem_q;
  logic [M-1:0]            div_q;
  logic [QW-1:0]           quo_q;
  logic [CW-1:0]           cnt_q;

  logic [EXP_W-1:0]        ea, eb;
  logic [M-1:0]            rem_sub;
  logic                    q_bit;
  logic [FRAC_W-1:0]       frac_r;
  logic signed [EXP_W+1:0] e_res;
  logic [EXP_W+FRAC_W:0]   res_c;
  logic                    ov_c;

  assign ea   = a[EXP_W+FRAC_W-1:FRAC_W];
  assign eb   = b[EXP_W+FRAC_W-1:FRAC_W];
  assign busy = (state_q != S_IDLE);

  // One restoring step: subtract the divisor if it fits.
  always_comb begin
    q_bit   = (rem_q >= {1'b0, div_q});
    rem_sub = q_bit ? M'(rem_q - {1'b0, div_q}) : rem_q[M-1:0];  // < divisor
  end

  // Normalize, range-check and pack the finished quotient.
  always_comb begin
    if (quo_q[QW-1]) begin
      frac_r = quo_q[QW-2 -: FRAC_W];
      e_res  = e_q;
    end else begin
      frac_r = quo_q[QW-3 -: FRAC_W];
      e_res  = e_q - 1;
    end
    ov_c = 1'b0;
    if (special_q || zb_q) begin
      ov_c  = 1'b1;
      res_c = {sr_q, EMAX, {FRAC_W{1'b0}}};
    end else if (za_q) begin
      res_c = {sr_q, {EXP_W{1'b0}}, {FRAC_W{1'b0}}};
    end else if (e_res >= $signed({2'b00, EMAX}) || e_res <= 0) begin
      ov_c  = 1'b1;
      res_c = {sr_q, EMAX, frac_r};
    end else begin
      res_c = {sr_q, e_res[EXP_W-1:0], frac_r};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q   <= S_IDLE;
      sr_q      <= 1'b0;
      za_q      <= 1'b0;
      zb_q      <= 1'b0;
      special_q <= 1'b0;
      e_q       <= '0;
      rem_q     <= '0;
      div_q     <= '0;
      quo_q     <= '0;
      cnt_q     <= '0;
      result    <= '0;
      ov        <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state_q)
        S_IDLE: begin
          if (start) begin
            sr_q      <= a[EXP_W+FRAC_W] ^ b[EXP_W+FRAC_W];
            za_q      <= (ea == '0);
            zb_q      <= (eb == '0);
            special_q <= (ea == EMAX) || (eb == EMAX);
            e_q       <= $signed({2'b00, ea}) - $signed({2'b00, eb}) + (EXP_W+2)'(BIAS);
            rem_q     <= {1'b0, 1'b1, a[FRAC_W-1:0]};
            div_q     <= {1'b1, b[FRAC_W-1:0]};
            quo_q     <= '0;
            cnt_q     <= CW'(QW - 1);
            state_q   <= S_RUN;
          end
        end
        S_RUN: begin
          quo_q <= {quo_q[QW-2:0], q_bit};
          rem_q <= {rem_sub, 1'b0};
          if (cnt_q == '0) state_q <= S_FIN;
          else             cnt_q   <= cnt_q - 1'b1;
        end
        S_FIN: begin
          result  <= res_c;
          ov      <= ov_c;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
