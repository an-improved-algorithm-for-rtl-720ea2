// result_select: final path select, exponent, overflow and special operands.
//
// The final select takes the l path exactly when the effective operation is
// a subtraction and d <= 1 (close = E_o AND d <= 1), otherwise the g path.
// For the g path the exponent is E_a plus one after a right shift or minus
// one after a left shift; a significand without its leading one (only
// possible when both inputs are subnormal) gets exponent field 0. A result
// exponent of all ones or more overflows: round to nearest gives infinity,
// toward zero the largest finite number, the directed modes one or the other
// depending on the sign. The l path has already formed its exponent field;
// its exact zero is +0, or -0 when rounding toward -infinity.
// Special operands bypass the datapath: a NaN input or infinity minus
// infinity gives the default quiet NaN (positive sign, top fraction bit set),
// an infinity passes through with its (effective) sign.
// Overflow, zero signs and special operands are IEEE 754 rules the adder
// needs but that the algorithm description leaves out.
// Purely combinational.
module result_select
  import fpadd_pkg::*;
#(
  parameter int unsigned N  = 53,
  parameter int unsigned EW = 11,
  parameter int unsigned W  = EW + N
) (
  input  rmode_t        rm,
  input  logic          close,      // E_o & (d <= 1): take the l path
  // g path
  input  logic [N-1:0]  g_sig,
  input  logic          g_inc,
  input  logic          g_dec,
  input  logic [EW-1:0] g_exp_a,
  input  logic          g_sign,
  // l path
  input  logic [N-1:0]  l_sig,
  input  logic [EW-1:0] l_exp,
  input  logic          l_sign,
  input  logic          l_zero,
  // special operands
  input  logic          x_nan,
  input  logic          y_nan,
  input  logic          x_inf,
  input  logic          y_inf,
  input  logic          x_sign,
  input  logic          y_sign,     // effective sign of y
  output logic [W-1:0]  result      // {sign, exponent field, fraction}
);
  localparam logic [EW-1:0] EMAX = '1;

  logic [EW+1:0] g_e;    // E_a + inc - dec, never negative
  logic          ovf_inf;

  always_comb begin
    g_e    = {2'b00, g_exp_a} + (EW+2)'(g_inc) - (EW+2)'(g_dec);
    result  = '0;
    ovf_inf = 1'b0;
    if (x_nan || y_nan || (x_inf && y_inf && (x_sign != y_sign))) begin
      result = {1'b0, EMAX, 1'b1, {(N-2){1'b0}}};
    end else if (x_inf) begin
      result = {x_sign, EMAX, {(N-1){1'b0}}};
    end else if (y_inf) begin
      result = {y_sign, EMAX, {(N-1){1'b0}}};
    end else if (close) begin
      if (l_zero) result = {rm == RM_RDN, {(W-1){1'b0}}};
      else        result = {l_sign, l_exp, l_sig[N-2:0]};
    end else if (g_e >= (EW+2)'(EMAX)) begin
      ovf_inf = (rm == RM_RNE) || (rm == RM_RUP && !g_sign) || (rm == RM_RDN && g_sign);
      if (ovf_inf) result = {g_sign, EMAX, {(N-1){1'b0}}};
      else         result = {g_sign, EMAX - EW'(1), {(N-1){1'b1}}};
    end else if (!g_sig[N-1]) begin
      result = {g_sign, {EW{1'b0}}, g_sig[N-2:0]};
    end else begin
      result = {g_sign, g_e[EW-1:0], g_sig[N-2:0]};
    end
  end
endmodule
