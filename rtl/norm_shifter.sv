// norm_shifter: left normalization shifter (Norm) of the l path.
//
// Shifts the N-bit sum left by `amt`. The adder is only N bits wide, so the
// guard bit of the exact difference is not in the sum: it is supplied as q
// and lands in the first vacated position (bit amt-1, counted from the LSB);
// the positions below it are zero. amt = 0 leaves the value unchanged.
// Purely combinational.
module norm_shifter #(
  parameter int unsigned N  = 53,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  val,
  input  logic          q,
  input  logic [CW-1:0] amt,
  output logic [N-1:0]  out
);
  logic [N:0] ext;

  always_comb begin
    ext = {val, q} << amt;
    out = ext[N:1];
  end
endmodule
