// compound_adder: N-bit adder that delivers both x + y and x + y + 1.
//
// Both sums come from one shared generate/propagate computation: sum1 is sum0
// incremented through the carry chain of the same operands (a carry-select
// form with carry-in 0 and 1). The select signals of the two paths (g_in,
// l_in) then pick one of them, which is how complementation and rounding share
// the single addition step. The internal adder structure (prefix tree,
// carry-select, ...) is left to synthesis.
// Purely combinational.
module compound_adder #(
  parameter int unsigned N = 53
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] sum0,   // x + y
  output logic [N-1:0] sum1,   // x + y + 1
  output logic         cout0,  // carry out of x + y
  output logic         cout1   // carry out of x + y + 1
);
  always_comb begin
    {cout0, sum0} = {1'b0, x} + {1'b0, y};
    {cout1, sum1} = {1'b0, x} + {1'b0, y} + {{N{1'b0}}, 1'b1};
  end
endmodule
