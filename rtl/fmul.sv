// fmul: floating point multiplier, one of the three modules that can be
// loaded into the reconfigurable region.
//
// Steps: multiply the two significands (hidden ones included) into a
// double-width product, add the exponents and remove one bias, normalize
// (a product in [2,4) is shifted right by one and the exponent incremented),
// and round the significand to FRAC_W fraction bits by truncation. The sign
// is the XOR of the operand signs.
//
// The truncating rounding and the out-of-range behaviour reproduce the
// worked multiplication examples given for this unit: a result exponent
// that leaves the normal range, upward or downward, sets `ov` and the
// exponent field is returned all ones, with the sign and truncated fraction
// still computed. Zero-exponent operands count as zero (result is a signed
// zero); an all-ones exponent operand sets `ov` and returns an all-ones
// exponent with a zero fraction.
//
// Interface: `start` samples `a` and `b`; `result`, `ov` and a one-cycle
// `done` pulse appear on the next clock edge and hold until the next
// `start`. Synchronous active-high reset.
module fmul #(
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
  output logic                  done
);

  localparam int unsigned M = FRAC_W + 1;
  localparam logic [EXP_W-1:0] EMAX = '1;
  localparam int BIAS = (1 << (EXP_W - 1)) - 1;

  logic                    sr, za, zb, special;
  logic [EXP_W-1:0]        ea, eb;
  logic [M-1:0]            ma, mb;
  logic [2*M-1:0]          prod;
  logic [FRAC_W-1:0]       frac_r;
  logic signed [EXP_W+1:0] e_res;
  logic [EXP_W+FRAC_W:0]   res_c;
  logic                    ov_c;

  always_comb begin
    sr = a[EXP_W+FRAC_W] ^ b[EXP_W+FRAC_W];
    ea = a[EXP_W+FRAC_W-1:FRAC_W];
    eb = b[EXP_W+FRAC_W-1:FRAC_W];
    za = (ea == '0);
    zb = (eb == '0);
    special = (ea == EMAX) || (eb == EMAX);
    ma = {1'b1, a[FRAC_W-1:0]};
    mb = {1'b1, b[FRAC_W-1:0]};

    // Significand product, in [1,4) with 2*(M-1) fraction bits.
    prod = ma * mb;

    // Normalize and truncate.
    e_res = $signed({2'b00, ea}) + $signed({2'b00, eb}) - (EXP_W+2)'(BIAS);
    if (prod[2*M-1]) begin
      frac_r = prod[2*M-2 -: FRAC_W];
      e_res  = e_res + 1;
    end else begin
      frac_r = prod[2*M-3 -: FRAC_W];
    end

    ov_c = 1'b0;
    if (special) begin
      ov_c  = 1'b1;
      res_c = {sr, EMAX, {FRAC_W{1'b0}}};
    end else if (za || zb) begin
      res_c = {sr, {EXP_W{1'b0}}, {FRAC_W{1'b0}}};
    end else if (e_res >= $signed({2'b00, EMAX}) || e_res <= 0) begin
      ov_c  = 1'b1;
      res_c = {sr, EMAX, frac_r};
    end else begin
      res_c = {sr, e_res[EXP_W-1:0], frac_r};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      result <= '0;
      ov     <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= start;
      if (start) begin
        result <= res_c;
        ov     <= ov_c;
      end
    end
  end

endmodule
