// fp_adder: IEEE 754 binary64 adder/subtractor with a single significand
// addition on every path.
//
// y = x + y_in (sub = 0) or x - y_in (sub = 1), rounded in mode rm. Both
// datapaths run side by side on the same operands:
//   g path  es_swap -> g_path: effective additions and subtractions with an
//           exponent difference d > 1 (alignment shift, then at most a
//           one-bit normalization);
//   l path  pred_swap -> l_path: effective subtractions with d <= 1 (at most
//           a one-bit alignment, then a possibly long normalization shift).
// Each path has one compound adder delivering X+Y and X+Y+1. Two's
// complementation and rounding are mutually exclusive, so a select signal
// (g_in, l_in) computed from the low-order bits takes over the job of a
// separate rounding addition. result_select finally picks the path
// (E_o AND d <= 1) and handles overflow and special operands.
// Subnormal operands are unpacked with a hidden bit of 0 and exponent 1 and
// subnormal results are produced (gradual underflow); exception flags are not
// produced. These IEEE details, the rounding mode encoding and the port list
// are choices of this design.
// The adder is purely combinational: the result is valid in the same cycle.
module fp_adder
  import fpadd_pkg::*;
#(
  parameter int unsigned N  = SIG_W,  // significand incl. hidden bit (53)
  parameter int unsigned EW = EXP_W,  // exponent field (11)
  parameter int unsigned W  = EW + N
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         sub,   // 1: compute x - y
  input  rmode_t       rm,
  output logic [W-1:0] z
);
  localparam logic [EW-1:0] EMAX = '1;

  logic [EW-1:0] ex_f, ey_f, ex, ey;
  logic [N-2:0]  fx, fy;
  logic [N-1:0]  mx, my;
  logic          sx, sy;
  logic          x_nan, y_nan, x_inf, y_inf;

  // Unpack.
  always_comb begin
    {sx, ex_f, fx} = x;
    sy             = y[W-1] ^ sub;
    ey_f           = y[W-2 -: EW];
    fy             = y[N-2:0];
    ex    = (ex_f == '0) ? EW'(1) : ex_f;
    ey    = (ey_f == '0) ? EW'(1) : ey_f;
    mx    = {ex_f != '0, fx};
    my    = {ey_f != '0, fy};
    x_nan = (ex_f == EMAX) && (fx != '0);
    y_nan = (ey_f == EMAX) && (fy != '0);
    x_inf = (ex_f == EMAX) && (fx == '0);
    y_inf = (ey_f == EMAX) && (fy == '0);
  end

  // g path.
  logic [EW-1:0] g_exp_a, d;
  logic [N-1:0]  g_sa, g_sb, g_sig;
  logic          g_sign, eo, g_inc, g_dec;

  es_swap #(.N(N), .EW(EW)) u_es (
    .exp_x(ex), .exp_y(ey), .sig_x(mx), .sig_y(my), .sign_x(sx), .sign_y(sy),
    .exp_a(g_exp_a), .sig_a(g_sa), .sig_b(g_sb), .sign_a(g_sign), .d(d),
    .eo(eo));

  g_path #(.N(N), .EW(EW)) u_g (
    .sig_a(g_sa), .sig_b(g_sb), .d(d), .eo(eo), .sign(g_sign), .rm(rm),
    .sig(g_sig), .exp_inc(g_inc), .exp_dec(g_dec));

  // l path.
  logic [EW-1:0] l_exp_a, l_exp;
  logic [N-1:0]  l_sa, l_sb, l_sig;
  logic          l_bn, l_sign_a, l_sign_b, pred, l_sign, l_zero;

  pred_swap #(.N(N), .EW(EW)) u_pred (
    .exp_x(ex), .exp_y(ey), .sig_x(mx), .sig_y(my), .sign_x(sx), .sign_y(sy),
    .exp_a(l_exp_a), .sig_a(l_sa), .sig_b(l_sb), .b_n(l_bn),
    .sign_a(l_sign_a), .sign_b(l_sign_b), .pred(pred));

  l_path #(.N(N), .EW(EW)) u_l (
    .sig_a(l_sa), .sig_b(l_sb), .b_n(l_bn), .pred(pred), .exp_a(l_exp_a),
    .sign_a(l_sign_a), .sign_b(l_sign_b), .rm(rm),
    .sig(l_sig), .exp_out(l_exp), .sign(l_sign), .zero(l_zero));

  // Final select (C_in of the two paths).
  logic close;
  assign close = eo && (d <= EW'(1));

  result_select #(.N(N), .EW(EW)) u_sel (
    .rm(rm), .close(close),
    .g_sig(g_sig), .g_inc(g_inc), .g_dec(g_dec), .g_exp_a(g_exp_a), .g_sign(g_sign),
    .l_sig(l_sig), .l_exp(l_exp), .l_sign(l_sign), .l_zero(l_zero),
    .x_nan(x_nan), .y_nan(y_nan), .x_inf(x_inf), .y_inf(y_inf),
    .x_sign(sx), .y_sign(sy), .result(z));
endmodule
