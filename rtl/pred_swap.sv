// pred_swap: operand set-up of the l path (Pred + Swap).
//
// The l path only matters for an effective subtraction with d <= 1. In that
// case the exponents differ by one exactly when their LSBs differ, so the
// one-bit alignment right shift is predicted from E_a(0) xor E_b(0) without
// waiting for the full exponent subtraction. Which operand is larger is read
// from the two low exponent bits: with |Ex - Ey| = 1, Ex is the larger one iff
// (Ex[1:0] - Ey[1:0]) mod 4 == 1. That 2-bit comparison is a choice of this
// design. With equal LSBs (d = 0) nothing is swapped; a negative difference is
// then fixed by the conversion in l_path. When d > 1 the outputs are
// meaningless and the l path result is discarded by result_select.
// Outputs: A, B shifted by the predicted amount, and b_n (the bit shifted out).
// Purely combinational.
module pred_swap #(
  parameter int unsigned N  = 53,
  parameter int unsigned EW = 11
) (
  input  logic [EW-1:0] exp_x,     // effective exponents; only the two LSBs
  input  logic [EW-1:0] exp_y,     // steer the swap

  input  logic [N-1:0] sig_x,
  input  logic [N-1:0] sig_y,
  input  logic         sign_x,
  input  logic         sign_y,     // already flipped for a subtraction
  output logic [EW-1:0] exp_a,    // exponent of the A side
  output logic [N-1:0] sig_a,      // larger-exponent significand
  output logic [N-1:0] sig_b,      // other significand, shifted right by pred
  output logic         b_n,        // bit shifted out of sig_b (guard)
  output logic         sign_a,
  output logic         sign_b,
  output logic         pred        // 1: exponents differ by one
);
  logic       y_larger;
  logic [1:0] lsb_diff;
  logic [N-1:0] sig_small;

  always_comb begin
    pred      = exp_x[0] ^ exp_y[0];
    lsb_diff  = exp_y[1:0] - exp_x[1:0];
    y_larger  = pred && (lsb_diff == 2'd1);
    exp_a     = y_larger ? exp_y  : exp_x;
    sig_a     = y_larger ? sig_y  : sig_x;
    sig_small = y_larger ? sig_x  : sig_y;
    sign_a    = y_larger ? sign_y : sign_x;
    sign_b    = y_larger ? sign_x : sign_y;
    sig_b     = pred ? (sig_small >> 1) : sig_small;
    b_n       = pred & sig_small[0];
  end
endmodule
