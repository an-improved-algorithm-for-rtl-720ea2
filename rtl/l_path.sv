// l_path: the path for effective subtractions with d <= 1.
//
// The operands come from pred_swap: A, and B already shifted right by the
// predicted 0 or 1 position with the shifted-out bit b_n. One compound
// addition forms X+Y = A + ~B and X+Y+1 = A - B. l_in chooses between them,
// combining the complementing "1" and the one possible rounding increment
// (only with d = 1 and no left shift). With d = 0 the difference can be
// negative; the carry out of X+Y+1 is then 0 and the magnitude is the bitwise
// inverse of X+Y (B - A = ~(A + ~B)), so the conversion needs no extra
// adder. The sign then comes from B.
// The leading-one detector and the left shifter normalize the selected sum;
// b_n is shifted in behind it. The shift is limited to E_a - 1 so a result
// below the normal range comes out subnormal with exponent field 0 (gradual
// underflow is this design's own addition). The leading-one detection works
// on the selected sum; it is not an anticipator working alongside the adder.
// Purely combinational.
module l_path
  import fpadd_pkg::*;
#(
  parameter int unsigned N  = 53,
  parameter int unsigned EW = 11,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  sig_a,
  input  logic [N-1:0]  sig_b,    // already shifted by the prediction
  input  logic          b_n,
  input  logic          pred,     // 1: d = 1, 0: d = 0
  input  logic [EW-1:0] exp_a,    // effective exponent of A (>= 1)
  input  logic          sign_a,
  input  logic          sign_b,
  input  rmode_t        rm,
  output logic [N-1:0]  sig,
  output logic [EW-1:0] exp_out,  // biased exponent field (0: subnormal/zero)
  output logic          sign,
  output logic          zero      // exact zero result
);
  logic [N-1:0]  y_op, sum0, sum1, sel;
  logic          cout0, cout1, neg, l_in, q, lz_zero;
  logic [CW-1:0] lz, amt;
  logic [EW-1:0] room;

  assign y_op = ~sig_b;

  compound_adder #(.N(N)) u_add (
    .x(sig_a), .y(y_op), .sum0(sum0), .sum1(sum1), .cout0(cout0), .cout1(cout1));

  // Negative only possible with d = 0 and B > A.
  assign neg  = ~pred & ~cout1;
  assign sign = neg ? sign_b : sign_a;

  lin_logic u_lin (
    .rm(rm), .sign(sign), .pred(pred), .b_n(b_n), .l0_0(sum0[N-1]),
    .s_l1(sig_a[0] ^ y_op[0]), .l_in(l_in), .q(q));

  assign sel = neg ? ~sum0 : (l_in ? sum1 : sum0);

  lod #(.N(N), .CW(CW)) u_lod (.val(sel), .lz(lz), .zero(lz_zero));

  always_comb begin
    room = exp_a - EW'(1);
    if (EW'(lz) > room) amt = CW'(room);
    else                amt = lz;
  end

  norm_shifter #(.N(N), .CW(CW)) u_norm (.val(sel), .q(q), .amt(amt), .out(sig));

  assign zero    = lz_zero & ~b_n;
  assign exp_out = sig[N-1] ? (exp_a - EW'(amt)) : '0;
endmodule
