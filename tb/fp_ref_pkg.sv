// fp_ref_pkg: reference model for the floating point testbenches.
//
// It works differently from the RTL: every operand is turned into an exact
// integer multiple of 2^-1074 (or, for a product, the exact 106-bit product
// of the significands with its power-of-two scale), the exact sum or product
// is formed in a wide integer, and only then is it rounded once to a double
// by counting bits from the most significant one. NaN results use the quiet
// NaN 7FF8_0000_0000_0000, an exact zero from cancelling operands is +0
// (-0 when rounding towards -inf). Also holds the operand generator.
package fp_ref_pkg;

  localparam int W = 2112;   // exact sum of two doubles needs ~2100 bits
  localparam logic [63:0] REF_QNAN = 64'h7FF8_0000_0000_0000;

  function automatic bit is_nan(logic [63:0] x);
    return x[62:52] == 11'h7FF && x[51:0] != 0;
  endfunction
  function automatic bit is_inf(logic [63:0] x);
    return x[62:52] == 11'h7FF && x[51:0] == 0;
  endfunction
  function automatic bit is_zero(logic [63:0] x);
    return x[62:0] == 0;
  endfunction

  // Round sign * mag * 2^k to a double in mode rm; ovf reports an exponent
  // overflow. mag must be non-zero.
  function automatic logic [63:0] round_exact(bit sign, logic [W-1:0] mag, int k,
                                              bit [1:0] rm, output bit ovf);
    int p, sh, qe, e;
    logic [W-1:0] q, mask;
    bit g, s, inc;
    p = 0;
    for (int i = 0; i < W; i++) if (mag[i]) p = i;
    if (p + k >= -1022) sh = p - 52;
    else                sh = -1074 - k;
    if (sh > 0) begin
      q    = mag >> sh;
      g    = mag[sh-1];
      mask = ~({W{1'b1}} << (sh - 1));
      s    = (mag & mask) != 0;
    end else begin
      q = mag << (-sh);
      g = 0;
      s = 0;
    end
    qe = k + sh;
    case (rm)
      2'b00:   inc = g && (s || q[0]);
      2'b01:   inc = 0;
      2'b10:   inc = !sign && (g || s);
      default: inc = sign && (g || s);
    endcase
    q = q + W'(inc);
    if (q[53]) begin
      q  = q >> 1;
      qe = qe + 1;
    end
    e   = q[52] ? qe + 1075 : 0;
    ovf = e >= 2047;
    if (ovf) begin
      if (rm == 2'b00 || (rm == 2'b10 && !sign) || (rm == 2'b11 && sign))
        return {sign, 11'h7FF, 52'd0};
      return {sign, 11'h7FE, {52{1'b1}}};
    end
    return {sign, 11'(e), q[51:0]};
  endfunction

  // Exact operand as an integer multiple of 2^-1074.
  function automatic logic [W-1:0] exact(logic [63:0] x);
    logic [W-1:0] m;
    int e;
    m = W'({x[62:52] != 0, x[51:0]});
    e = (x[62:52] == 0) ? 1 : int'(x[62:52]);
    return m << (e - 1);
  endfunction

  function automatic logic [63:0] ref_add(logic [63:0] a, logic [63:0] b, bit op,
                                          bit [1:0] rm, output bit ovf);
    logic [W-1:0] ea, eb, mag;
    bit sa, sb, sign;
    ovf = 0;
    sa = a[63];
    sb = b[63] ^ op;
    if (is_nan(a) || is_nan(b)) return REF_QNAN;
    if (is_inf(a) && is_inf(b)) return (sa == sb) ? {sa, 11'h7FF, 52'd0} : REF_QNAN;
    if (is_inf(a)) return {sa, 11'h7FF, 52'd0};
    if (is_inf(b)) return {sb, 11'h7FF, 52'd0};
    ea = exact(a);
    eb = exact(b);
    if (sa == sb) begin
      mag = ea + eb;  sign = sa;
    end else if (ea >= eb) begin
      mag = ea - eb;  sign = sa;
    end else begin
      mag = eb - ea;  sign = sb;
    end
    if (mag == 0) return {(sa == sb) ? sa : (rm == 2'b11), 63'd0};
    return round_exact(sign, mag, -1074, rm, ovf);
  endfunction

  function automatic logic [63:0] ref_mul(logic [63:0] a, logic [63:0] b,
                                          bit [1:0] rm, output bit ovf);
    logic [W-1:0] mag;
    bit sign;
    int k;
    ovf  = 0;
    sign = a[63] ^ b[63];
    if (is_nan(a) || is_nan(b)) return REF_QNAN;
    if ((is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b))) return REF_QNAN;
    if (is_inf(a) || is_inf(b)) return {sign, 11'h7FF, 52'd0};
    if (is_zero(a) || is_zero(b)) return {sign, 63'd0};
    mag = W'({a[62:52] != 0, a[51:0]}) * W'({b[62:52] != 0, b[51:0]});
    k = ((a[62:52] == 0) ? 1 : int'(a[62:52])) + ((b[62:52] == 0) ? 1 : int'(b[62:52])) - 2150;
    return round_exact(sign, mag, k, rm, ovf);
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom, $urandom};
  endfunction

  // Operand generator: random bit patterns, numbers near a given exponent
  // (so that additions cancel and products land where wanted) and the
  // special values.
  function automatic logic [63:0] gen_operand(int near_exp);
    logic [63:0] x;
    int sel;
    x   = rand64();
    sel = $urandom_range(0, 19);
    case (sel)
      0:  x[62:0] = 0;                                   // zero
      1:  x[62:0] = {11'h7FF, 52'd0};                    // infinity
      2:  x[62:52] = 11'h7FF;                            // NaN (if frac != 0)
      3:  x[62:52] = 0;                                  // denormal
      4:  x[62:0] = {11'h7FE, {52{1'b1}}};               // largest finite
      5:  x[62:52] = 11'($urandom_range(2030, 2046));    // huge
      6:  x[62:52] = 11'($urandom_range(1, 40));         // tiny
      7:  x[30:0] = 0;                                   // short fraction
      8, 9, 10, 11, 12, 13:
          x[62:52] = 11'(near_exp + $urandom_range(0, 4) - 2);
      default: ;                                         // any pattern
    endcase
    if (x[62:52] == 11'h7FF && sel != 1 && sel != 2 && sel != 4) x[62:52] = 11'h7FE;
    return x;
  endfunction

endpackage
