// g_path: the path for effective additions and for subtractions with d > 1.
//
// Steps: Align (align_shifter), the half adder row, one compound addition
// giving X+Y and X+Y+1, and a select driven by g_in, followed by at most a
// one-bit normalization. There is no separate rounding adder: the rounding
// increment and the two's-complement "1" of a subtraction are both folded
// into the choice between X+Y and X+Y+1.
// After the select:
//   addition:    a carry out of the selected sum means one right shift
//                (exponent + 1); this also covers a rounding carry that
//                turns 1.11..1 into 10.00..0.
//   subtraction: the carry out is the discarded overflow of the complement;
//                an MSB of 0 means one left shift with q shifted in
//                (exponent - 1). With d > 1 no larger shift can occur.
// The shift direction is read from the selected sum rather than from the
// pre-rounding NLS/OLS decision, so a rounding carry into the MSB in the OLS
// case is normalized correctly (this is a choice of this design).
// sig_a must carry the larger exponent. Purely combinational.
module g_path
  import fpadd_pkg::*;
#(
  parameter int unsigned N  = 53,
  parameter int unsigned EW = 11
) (
  input  logic [N-1:0]  sig_a,
  input  logic [N-1:0]  sig_b,
  input  logic [EW-1:0] d,
  input  logic          eo,       // 1 = effective subtraction
  input  logic          sign,     // result sign (sign of A)
  input  rmode_t        rm,
  output logic [N-1:0]  sig,      // normalized (or subnormal) significand
  output logic          exp_inc,  // one-bit right shift happened
  output logic          exp_dec   // one-bit left shift happened
);
  logic [N-1:0] b_al, y_op, hs, hc_sh, sum0, sum1, sel;
  logic         b_n, b_n1, s_st, hc_out, fill, cout0, cout1, sel_c;
  logic         g_in, clr_lsb, q, g_out0_w;

  align_shifter #(.N(N), .DW(EW)) u_align (
    .sig_in(sig_b), .d(d), .sig_out(b_al), .b_n(b_n), .b_n1(b_n1), .s(s_st));

  assign y_op = eo ? ~b_al : b_al;

  half_adder_row #(.N(N)) u_har (
    .x(sig_a), .y(y_op), .fill_en(~eo & rm[1]),
    .hs(hs), .hc_sh(hc_sh), .fill(fill), .c_out(hc_out));

  compound_adder #(.N(N)) u_add (
    .x(hs), .y(hc_sh), .sum0(sum0), .sum1(sum1), .cout0(cout0), .cout1(cout1));

  // The half adder carry and the adder carry both weigh 2^N; their sum never
  // exceeds 2^(N+1) - 1, so at most one of them is set.
  assign g_out0_w = hc_out | cout0;

  gin_logic u_gin (
    .rm(rm), .eo(eo), .sign(sign),
    .g_out0(g_out0_w), .g0_0(sum0[N-1]),
    .b_n(b_n), .b_n1(b_n1), .s(s_st), .s_g1(hs[0]), .s_g2(hs[1]),
    .g_in(g_in), .clr_lsb(clr_lsb), .q(q));

  always_comb begin
    sel    = g_in ? sum1 : sum0;
    sel_c  = hc_out | (g_in ? cout1 : cout0);
    sel[0] = sel[0] & ~clr_lsb;
    exp_inc = 1'b0;
    exp_dec = 1'b0;
    sig     = sel;
    if (!eo) begin
      if (sel_c) begin
        sig     = {1'b1, sel[N-1:1]};
        exp_inc = 1'b1;
      end
    end else if (!sel[N-1]) begin
      sig     = {sel[N-2:0], q};
      exp_dec = 1'b1;
    end
  end
endmodule
