// fadd_sub: floating point adder-subtractor, one of the three modules that
// can be loaded into the reconfigurable region.
//
// It follows the five classic steps: (1) exponent difference, (2) right
// shift of the smaller significand to align it with the larger one, (3) add
// or subtract the significands, (4) normalize the sum (one right shift on a
// carry, otherwise a left shift by the number of leading zeros, with the
// exponent adjusted by the shift), (5) round the significand back to
// FRAC_W fraction bits. The steps are the standard ones; the way each is
// built here is this design's own: the operands are first ordered by
// magnitude, and three extra bits (guard, round, sticky) are kept during
// alignment so that the rounded result equals the exact sum rounded.
//
// Rounding is truncation (round toward zero), the same as the multiplier
// and divider. A result whose exponent leaves the normal range, upward or
// downward, sets `ov` and returns the exponent field all ones with the
// truncated fraction. Operands with a zero exponent field count as zero
// (subnormals are flushed); an operand with an all-ones exponent field
// (infinity/NaN) sets `ov` and gives an all-ones exponent with a zero fraction.
// An exact zero sum is +0, or -0 when both operands are negative zeros.
//
// Interface: `start` samples `a`, `b` and `sub` (1 = a - b). The datapath is
// combinational and the result is registered: `result`, `ov` and a one-cycle
// `done` pulse appear on the clock edge after `start`, and `result`/`ov`
// hold until the next `start`. Synchronous active-high reset.
module fadd_sub #(
  parameter int unsigned EXP_W  = 8,
  parameter int unsigned FRAC_W = 23
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic                    sub,
  input  logic [EXP_W+FRAC_W:0]   a,
  input  logic [EXP_W+FRAC_W:0]   b,
  output logic [EXP_W+FRAC_W:0]   result,
  output logic                    ov,
  output logic                    done
);

  localparam int unsigned M  = FRAC_W + 1;   // significand incl. hidden bit
  localparam int unsigned G  = 3;            // guard, round, sticky
  localparam int unsigned AW = M + G;        // aligned significand width
  localparam int unsigned SW = AW + 1;       // sum width incl. carry
  localparam logic [EXP_W-1:0] EMAX = '1;

  logic                   sa, sb, sx, sy, swap, za, zb, special;
  logic [EXP_W-1:0]       ea, eb, ex, ey, d;
  logic [M-1:0]           ma, mb, mx, my;
  logic [AW-1:0]          yext, yal;
  logic                   sticky;
  logic [SW-1:0]          sum, norm;
  int unsigned            lz;
  logic                   found;
  logic signed [EXP_W+1:0] e_res;
  logic [FRAC_W-1:0]      frac_r;
  logic [EXP_W+FRAC_W:0]  res_c;
  logic                   ov_c;

  always_comb begin
    // Unpack; the subtract flag flips the sign of b.
    sa = a[EXP_W+FRAC_W];
    sb = b[EXP_W+FRAC_W] ^ sub;
    ea = a[EXP_W+FRAC_W-1:FRAC_W];
    eb = b[EXP_W+FRAC_W-1:FRAC_W];
    za = (ea == '0);
    zb = (eb == '0);
    ma = za ? '0 : {1'b1, a[FRAC_W-1:0]};
    mb = zb ? '0 : {1'b1, b[FRAC_W-1:0]};
    special = (ea == EMAX) || (eb == EMAX);

    // Step 1: compare magnitudes and take the exponent difference.
    swap = {eb, mb} > {ea, ma};
    ex = swap ? eb : ea;
    ey = swap ? ea : eb;
    mx = swap ? mb : ma;
    my = swap ? ma : mb;
    sx = swap ? sb : sa;
    sy = swap ? sa : sb;
    d  = ex - ey;

    // Step 2: align the smaller significand, collecting shifted-out bits.
    yext = {my, {G{1'b0}}};
    if (d >= EXP_W'(AW)) begin
      yal    = '0;
      sticky = |my;
    end else begin
      yal    = yext >> d;
      sticky = |(yext & ~({AW{1'b1}} << d));
    end
    yal[0] = yal[0] | sticky;

    // Step 3: add or subtract.
    if (sx == sy) sum = {1'b0, mx, {G{1'b0}}} + {1'b0, yal};
    else          sum = {1'b0, mx, {G{1'b0}}} - {1'b0, yal};

    // Step 4: normalize.
    lz    = 0;
    found = 1'b0;
    for (int i = SW - 2; i >= 0; i--) begin
      if (!found) begin
        if (sum[i]) found = 1'b1;
        else        lz = lz + 1;
      end
    end
    if (sum[SW-1]) begin
      norm    = sum >> 1;
      norm[0] = sum[1] | sum[0];
      e_res   = $signed({2'b00, ex}) + 1;
    end else begin
      norm  = sum << lz;
      e_res = $signed({2'b00, ex}) - $signed((EXP_W+2)'(lz));
    end

    // Step 5: round (truncate) to FRAC_W fraction bits.
    frac_r = norm[SW-3 -: FRAC_W];

    ov_c = 1'b0;
    if (special) begin
      ov_c  = 1'b1;
      res_c = {sx, EMAX, {FRAC_W{1'b0}}};
    end else if (sum == '0) begin
      res_c = {sx & sy, {EXP_W{1'b0}}, {FRAC_W{1'b0}}};
    end else if (e_res >= $signed({2'b00, EMAX}) || e_res <= 0) begin
      ov_c  = 1'b1;
      res_c = {sx, EMAX, frac_r};
    end else begin
      res_c = {sx, e_res[EXP_W-1:0], frac_r};
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
