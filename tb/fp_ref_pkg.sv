// fp_ref_pkg: reference model of IEEE 754 binary64 addition for the
// testbenches.
//
// Written the textbook way and independent of the design under test: the
// operands are ordered by magnitude, the smaller one is aligned in a 128-bit
// frame with 64 guard bits and a jammed sticky bit, the sum or difference is
// formed in full, normalized (gradually underflowing below exponent 1) and
// rounded once from its guard and sticky bits. Rounding mode encoding:
// 0 nearest-even, 1 toward zero, 2 toward +inf, 3 toward -inf.
package fp_ref_pkg;

  function automatic logic rnd_up(logic [1:0] rm, logic sign, logic l, logic g, logic st);
    case (rm)
      2'd0:    return g & (st | l);
      2'd1:    return 1'b0;
      2'd2:    return ~sign & (g | st);
      default: return sign & (g | st);
    endcase
  endfunction

  function automatic logic [63:0] ref_add(logic [63:0] x, logic [63:0] y, logic sub,
                                          logic [1:0] rm);
    logic         sx, sy, sa, sb, eo, sign, g, st, up;
    logic [10:0]  ex, ey;
    logic [51:0]  fx, fy;
    logic [52:0]  mx, my, ma, mb;
    int           ea, eb, ex_e, ey_e, d, p, e, rs;
    logic [127:0] av, bv, bfull, r, sig, mask;
    sx = x[63]; ex = x[62:52]; fx = x[51:0];
    sy = y[63] ^ sub; ey = y[62:52]; fy = y[51:0];
    // specials
    if ((ex == 11'h7ff && fx != 0) || (ey == 11'h7ff && fy != 0))
      return 64'h7ff8_0000_0000_0000;
    if (ex == 11'h7ff && ey == 11'h7ff)
      return (sx == sy) ? {sx, 11'h7ff, 52'd0} : 64'h7ff8_0000_0000_0000;
    if (ex == 11'h7ff) return {sx, 11'h7ff, 52'd0};
    if (ey == 11'h7ff) return {sy, 11'h7ff, 52'd0};
    mx = {ex != 0, fx}; my = {ey != 0, fy};
    ex_e = (ex == 0) ? 1 : int'(ex);
    ey_e = (ey == 0) ? 1 : int'(ey);
    if (ex_e > ey_e || (ex_e == ey_e && mx >= my)) begin
      sa = sx; ea = ex_e; ma = mx; sb = sy; eb = ey_e; mb = my;
    end else begin
      sa = sy; ea = ey_e; ma = my; sb = sx; eb = ex_e; mb = mx;
    end
    eo = sa ^ sb;
    d  = ea - eb;
    av = 128'(ma) << 64;
    bfull = 128'(mb) << 64;
    if (d >= 120) bv = (mb != 0) ? 128'd1 : 128'd0;
    else begin
      bv   = bfull >> d;
      mask = (128'd1 << d) - 128'd1;
      if ((bfull & mask) != 0) bv[0] = 1'b1;
    end
    r = eo ? (av - bv) : (av + bv);
    if (r == 0) return {eo ? (rm == 2'd3) : sa, 63'd0};
    sign = sa;
    p = 0;
    for (int i = 0; i < 128; i++) if (r[i]) p = i;
    e  = ea + (p - 116);
    rs = 64 + (p - 116);
    if (e < 1) begin rs = rs + (1 - e); e = 1; end
    if (rs <= 0) begin
      sig = r << (-rs); g = 1'b0; st = 1'b0;
    end else begin
      sig  = r >> rs;
      g    = r[rs-1];
      mask = (128'd1 << (rs - 1)) - 128'd1;
      st   = (r & mask) != 0;
    end
    up  = rnd_up(rm, sign, sig[0], g, st);
    sig = sig + 128'(up);
    if (sig[53]) begin sig = sig >> 1; e = e + 1; end
    if (e >= 2047) begin
      if (rm == 2'd0 || (rm == 2'd2 && !sign) || (rm == 2'd3 && sign))
        return {sign, 11'h7ff, 52'd0};
      return {sign, 11'h7fe, {52{1'b1}}};
    end
    if (!sig[52]) return {sign, 11'd0, sig[51:0]};
    return {sign, 11'(e), sig[51:0]};
  endfunction

endpackage
