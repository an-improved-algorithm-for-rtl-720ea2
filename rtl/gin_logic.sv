// gin_logic: select signal g_in and shift-in bit q of the g path.
//
// The g path adds A and the aligned B (inverted for a subtraction) in a
// compound adder that gives both X+Y and X+Y+1. g_in picks X+Y+1 whenever the
// result needs the two's-complement "1" (C_c, which reaches the adder only when
// the shifted-out bits b_n, b_n+1 and s are all zero) or a rounding increment.
// The two never coincide, which is the reason a single addition suffices.
// Which increment is needed depends on the normalization the sum will need:
//   addition:    NRS (no carry out of A+B) or ORS (one-bit right shift),
//   subtraction: NLS (MSB of the sum set) or OLS (one-bit left shift).
// Round to nearest uses the merged closed-form equation derived for the two
// cases, written term by term below. Round toward zero selects only C_c.
// The two directed modes use the general rule C_in = (inexact AND increment
// wanted) OR C_c; for an effective addition whose sum LSB is 0 the half adder
// row has already added one, so X+Y is A+B+1 and X+Y+1 is A+B+2, and
// `clr_lsb` removes that one again when no rounding up is wanted.
// q is the bit shifted into the LSB on a one-bit left shift (OLS); its
// closed forms for nearest and toward-zero are the published ones.
// Purely combinational.
module gin_logic
  import fpadd_pkg::*;
(
  input  rmode_t rm,
  input  logic   eo,       // effective operation, 1 = subtraction
  input  logic   sign,     // sign of the result (S_E)
  input  logic   g_out0,   // carry out of A+B (addition only)
  input  logic   g0_0,     // MSB of A+B (subtraction only)
  input  logic   b_n,      // guard bit of the aligned B, before complementing
  input  logic   b_n1,     // round bit of the aligned B
  input  logic   s,        // sticky of the aligned B
  input  logic   s_g1,     // half sum of the adder operands at the LSB
  input  logic   s_g2,     // half sum one position above the LSB
  output logic   g_in,     // 1: take X+Y+1
  output logic   clr_lsb,  // 1: clear the LSB of the selected sum
  output logic   q         // bit shifted in on a one-bit left shift
);
  logic any_out;   // b_n | b_n+1 | s: C_c does not reach the adder
  logic g_cmp;     // guard bit after two's complement
  logic inc;       // directed mode wants the magnitude rounded up
  logic up_ols;    // directed increment in the OLS frame

  always_comb begin
    any_out = b_n | b_n1 | s;
    g_cmp   = b_n ^ (b_n1 | s);
    inc     = dir_inc(rm, sign);
    up_ols  = inc & (b_n1 | s);
    g_in    = 1'b0;
    clr_lsb = 1'b0;
    q       = 1'b0;
    unique case (rm)
      RM_RNE: begin
        g_in = (~eo & ( ( g_out0 & s_g1 & (b_n | b_n1 | s | s_g2))
                      | (~g_out0 & b_n & (b_n1 | s | s_g1))))
             | ( eo & ( (~b_n & ~b_n1 & ~s)
                      | ( g0_0 & ((~b_n & (b_n1 | s)) | (b_n & ~b_n1 & ~s & s_g1)))
                      | (~g0_0 & ~b_n & (b_n1 ^ s))));
        q    = (~b_n & b_n1 & s) | (b_n & ~b_n1);
      end
      RM_RTZ: begin
        g_in = eo & ~any_out;
        q    = b_n ^ (s | b_n1);
      end
      default: begin  // RM_RUP, RM_RDN
        if (!eo) begin
          if (g_out0)     g_in = inc & (s_g1 | any_out);
          else if (s_g1)  g_in = inc & any_out;
          else            clr_lsb = ~(inc & any_out);
        end else begin
          g_in = ~any_out | (g0_0 ? inc : (g_cmp & up_ols));
        end
        q = g_cmp ^ up_ols;
      end
    endcase
  end
endmodule
