// half_adder_row: the row of N half adders placed in front of the g adder.
//
// Each position i produces a sum bit x_i ^ y_i and a carry bit x_i & y_i. The
// carry row is moved one place to the left, which leaves its LSB slot empty;
// that slot takes the inverted sum LSB when `fill_en` is set, else 0. Adding
// the two rows therefore gives x + y + fill, and the carry of the top position
// (`c_out`, weight 2^N) leaves the row beside the adder. With the fill active
// the following compound adder yields A+B+1 and A+B+2 whenever the LSB of A+B
// is 0, which is what directed rounding after a one-bit right shift needs (an
// LSB of 1 needs no fill: A+B+1 then already carries into the next bit). The
// structure (half adder row, shifted carry row, inverted sum LSB into the free
// slot) follows the published hardware for round to +infinity; the enable
// that limits it to directed rounding of an effective addition is this
// design's own.
// Purely combinational.
module half_adder_row #(
  parameter int unsigned N = 53
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         fill_en, // put NOT(hs[0]) into the free LSB
  output logic [N-1:0] hs,      // half sums
  output logic [N-1:0] hc_sh,   // carries shifted left, fill in the LSB
  output logic         fill,    // the fill bit actually used
  output logic         c_out    // carry out of the top half adder
);
  logic [N-1:0] hc;

  always_comb begin
    hs    = x ^ y;
    hc    = x & y;
    fill  = fill_en & ~hs[0];
    hc_sh = {hc[N-2:0], fill};
    c_out = hc[N-1];
  end
endmodule
