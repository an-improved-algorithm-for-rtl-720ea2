// fpadd_pkg: shared constants and types of the two-path floating-point adder.
//
// The adder works on IEEE 754 binary64 operands: a significand of N = 53 bits
// (hidden one included) and an exponent field of EW = 11 bits. The rounding
// mode encoding follows the order IEEE 754 lists the four modes in; the
// encoding itself is a choice of this design.
package fpadd_pkg;

  localparam int unsigned SIG_W = 53;  // n, significand length incl. hidden bit
  localparam int unsigned EXP_W = 11;  // binary64 exponent field

  // Rounding modes.
  typedef enum logic [1:0] {
    RM_RNE = 2'b00,  // round to nearest, ties to even (the default mode)
    RM_RTZ = 2'b01,  // round toward zero (truncate)
    RM_RUP = 2'b10,  // round toward +infinity
    RM_RDN = 2'b11   // round toward -infinity
  } rmode_t;

  // Increment direction of the two directed modes: for a result of sign
  // `sign`, a directed mode moves the magnitude up exactly when the mode points
  // away from zero on that side.
  function automatic logic dir_inc(rmode_t rm, logic sign);
    return ((rm == RM_RUP) && !sign) || ((rm == RM_RDN) && sign);
  endfunction

endpackage
