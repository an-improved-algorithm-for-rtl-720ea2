// align_shifter: alignment right shift of the smaller significand (Align).
//
// Shifts the N-bit significand right by d. Of the bits shifted out it keeps
// the first one, b_n (guard position G), the second one, b_n+1 (round position
// R), and the OR of all the others, s (sticky). Only these three are needed:
// the adder is N bits wide and the lower half of the exact 2N-bit sum only
// enters through G, R and s. A shift of N+2 or more moves everything into s.
// Purely combinational.
module align_shifter #(
  parameter int unsigned N  = 53,
  parameter int unsigned DW = 11   // width of the shift amount
) (
  input  logic [N-1:0]  sig_in,
  input  logic [DW-1:0] d,
  output logic [N-1:0]  sig_out,   // b_0 .. b_n-1 after the shift
  output logic          b_n,       // first bit shifted out
  output logic          b_n1,      // second bit shifted out
  output logic          s          // OR of the remaining shifted-out bits
);
  localparam int unsigned WIDE = 2 * N + 2;
  localparam int unsigned MAXS = N + 2;

  logic [WIDE-1:0] wide;
  logic [DW-1:0]   amt;

  always_comb begin
    amt     = (d > DW'(MAXS)) ? DW'(MAXS) : d;
    wide    = {sig_in, {(N + 2){1'b0}}} >> amt;
    sig_out = wide[WIDE-1 -: N];
    b_n     = wide[N+1];
    b_n1    = wide[N];
    s       = |wide[N-1:0];
  end
endmodule
