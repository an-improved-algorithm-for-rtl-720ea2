// lod: leading-one detector of the l path (LOD).
//
// Counts the zeros above the most significant one of an N-bit value, which
// is the left shift that normalizes it; `zero` flags an all-zero input (count
// then N). Written as a priority scan; synthesis builds the tree.
// Purely combinational.
module lod #(
  parameter int unsigned N  = 53,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  val,
  output logic [CW-1:0] lz,
  output logic          zero
);
  always_comb begin
    lz   = CW'(N);
    zero = ~|val;
    for (int i = 0; i < N; i++) begin
      if (val[i]) lz = CW'(N - 1 - i);
    end
  end
endmodule
