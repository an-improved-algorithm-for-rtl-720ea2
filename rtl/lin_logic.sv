// lin_logic: select signal l_in and shift-in bit q of the l path.
//
// The l path subtracts with d <= 1, so of the shifted-out bits only b_n can be
// non-zero (b_n+1 = s = 0). X+Y+1 (the complete two's complement) is taken
// when the complementing "1" reaches the adder (b_n = 0, which includes
// d = 0), or when the result needs no left shift (MSB of X+Y set), b_n = 1
// makes it inexact and the mode rounds up: for round to nearest that is the
// tie case with an odd LSB (S_l1), for the directed modes it is an increment
// toward the result's infinity. When a left shift follows, the result is
// exact and b_n itself is the bit shifted in (q = b_n).
// The nearest, toward-zero and toward +infinity equations are the published
// ones; toward -infinity mirrors the sign; the explicit d = 0 term of the
// nearest equation is applied in all modes.
// Purely combinational.
module lin_logic
  import fpadd_pkg::*;
(
  input  rmode_t rm,
  input  logic   sign,   // sign of the result (S_E)
  input  logic   pred,   // exponents differ by one (E_a(0) xor E_b(0))
  input  logic   b_n,    // bit shifted out by the one-bit alignment
  input  logic   l0_0,   // MSB of X+Y
  input  logic   s_l1,   // half sum of the adder operands at the LSB
  output logic   l_in,   // 1: take X+Y+1
  output logic   q
);
  always_comb begin
    unique case (rm)
      RM_RNE:  l_in = (l0_0 & b_n & s_l1) | ~b_n | ~pred;
      RM_RTZ:  l_in = ~b_n | ~pred;
      default: l_in = (dir_inc(rm, sign) & l0_0 & b_n) | ~b_n | ~pred;
    endcase
    q = b_n;
  end
endmodule
