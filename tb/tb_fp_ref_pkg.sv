// tb_fp_ref_pkg: reference models for checking the floating point units.
//
// They share the units' conventions (truncating rounding, zero-exponent
// operands read as zero, an all-ones exponent on any out-of-range result
// with `ov` set) but compute the answer a different way from the RTL:
//  - addition/subtraction exactly, on 300-bit integers holding each operand
//    as significand << exponent, then truncating the exact sum;
//  - multiplication and division in double precision reals (a product of two
//    24-bit significands is exact in a double; a non-exact quotient is never
//    close enough to a 24-bit boundary for the double rounding to matter),
//    then truncating the double to single precision by its bit fields.
package tb_fp_ref_pkg;

  typedef struct {
    logic [31:0] res;
    logic        ov;
  } ref_t;

  function automatic real to_real(logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 8'h00) return 0.0;
    d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // Truncate a nonzero double to the units' single precision convention.
  function automatic ref_t from_real(real r);
    ref_t        o;
    logic [63:0] d;
    int          e;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    o.ov = (e >= 255 || e <= 0);
    o.res = {d[63], o.ov ? 8'hFF : e[7:0], d[51:29]};
    return o;
  endfunction

  function automatic logic special(logic [31:0] x);
    return x[30:23] == 8'hFF;
  endfunction

  function automatic ref_t ref_mul(logic [31:0] a, logic [31:0] b);
    ref_t o;
    logic s;
    s = a[31] ^ b[31];
    if (special(a) || special(b)) begin
      o.ov = 1'b1; o.res = {s, 8'hFF, 23'd0};
    end else if (a[30:23] == 0 || b[30:23] == 0) begin
      o.ov = 1'b0; o.res = {s, 31'd0};
    end else begin
      o = from_real(to_real(a) * to_real(b));
    end
    return o;
  endfunction

  function automatic ref_t ref_div(logic [31:0] a, logic [31:0] b);
    ref_t o;
    logic s;
    s = a[31] ^ b[31];
    if (special(a) || special(b) || b[30:23] == 0) begin
      o.ov = 1'b1; o.res = {s, 8'hFF, 23'd0};
    end else if (a[30:23] == 0) begin
      o.ov = 1'b0; o.res = {s, 31'd0};
    end else begin
      o = from_real(to_real(a) / to_real(b));
    end
    return o;
  endfunction

  function automatic ref_t ref_add(logic [31:0] a, logic [31:0] b, logic sub);
    ref_t         o;
    logic [299:0] ia, ib, r;
    logic         sa, sb, sr;
    int           p, e;
    sa = a[31];
    sb = b[31] ^ sub;
    ia = (a[30:23] == 0) ? '0 : (300'({1'b1, a[22:0]}) << a[30:23]);
    ib = (b[30:23] == 0) ? '0 : (300'({1'b1, b[22:0]}) << b[30:23]);
    if (special(a) || special(b)) begin
      sr = (ib > ia) ? sb : sa;
      o.ov = 1'b1; o.res = {sr, 8'hFF, 23'd0};
      return o;
    end
    if (sa == sb) begin
      r = ia + ib; sr = sa;
    end else if (ia >= ib) begin
      r = ia - ib; sr = sa;
    end else begin
      r = ib - ia; sr = sb;
    end
    if (r == 0) begin
      o.ov = 1'b0; o.res = {sa & sb, 31'd0};
      return o;
    end
    p = 0;
    for (int i = 0; i < 300; i++) if (r[i]) p = i;
    e = p - 23;
    if (p >= 23) r = r >> (p - 23);
    else         r = r << (23 - p);
    o.ov = (e >= 255 || e <= 0);
    o.res = {sr, o.ov ? 8'hFF : e[7:0], r[22:0]};
    return o;
  endfunction

  // Random operand: mostly moderate exponents, sometimes any exponent,
  // sometimes one close to a given exponent (to cause cancellation).
  function automatic logic [31:0] rand_fp(logic [7:0] near);
    logic [31:0] x;
    int unsigned k;
    x = $urandom;
    k = $urandom_range(0, 9);
    if (k < 4)      x[30:23] = 8'(near + 8'($urandom_range(0, 6)) - 8'd3);
    else if (k < 8) x[30:23] = 8'($urandom_range(64, 190));
    if (x[30:23] == 8'hFF) x[30:23] = 8'hFE;
    if (x[30:23] == 8'h00) x[30:23] = 8'h01;
    return x;
  endfunction

endpackage
