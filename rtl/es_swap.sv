// es_swap: exponent subtraction and operand swap of the g path (ES + Swap).
//
// Computes d = |Ea - Eb| and routes the operand with the larger exponent to
// the A side, so that only the B significand ever needs an alignment shifter.
// The effective operation E_o (0 = add, 1 = subtract) is the XOR of the two
// signs and the requested operation. Equal exponents keep the operands in
// place: the g path only sees that case for an effective addition, where the
// order does not matter, and the l path does its own swap.
// Exponents come in already "effective" (a zero field is presented as 1), and
// the sign of B already includes the subtract request.
// Purely combinational.
module es_swap #(
  parameter int unsigned N  = 53,
  parameter int unsigned EW = 11
) (
  input  logic [EW-1:0] exp_x,    // effective exponent of operand x
  input  logic [EW-1:0] exp_y,
  input  logic [N-1:0]  sig_x,    // significand incl. hidden bit
  input  logic [N-1:0]  sig_y,
  input  logic          sign_x,
  input  logic          sign_y,   // sign of y, already flipped for a subtraction
  output logic [EW-1:0] exp_a,    // larger exponent (E_a)
  output logic [N-1:0]  sig_a,    // significand of the larger-exponent operand
  output logic [N-1:0]  sig_b,    // significand to be aligned
  output logic          sign_a,   // sign of the result on the g path (S_E)
  output logic [EW-1:0] d,        // |E_a - E_b|
  output logic          eo        // effective operation, 1 = subtraction
);
  logic        swapped;
  logic [EW:0] diff;  // exp_x - exp_y with borrow in the top bit

  always_comb begin
    diff    = {1'b0, exp_x} - {1'b0, exp_y};
    swapped = diff[EW];
    eo      = sign_x ^ sign_y;
    if (swapped) begin
      exp_a  = exp_y;
      sig_a  = sig_y;
      sig_b  = sig_x;
      sign_a = sign_y;
      d      = exp_y - exp_x;
    end else begin
      exp_a  = exp_x;
      sig_a  = sig_x;
      sig_b  = sig_y;
      sign_a = sign_x;
      d      = diff[EW-1:0];
    end
  end
endmodule
