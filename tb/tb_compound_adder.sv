// tb_compound_adder: checks both sums and carries of the compound adder,
// including the all-ones carry cases.
module tb_compound_adder;
  logic [52:0] x, y, s0, s1;
  logic        c0, c1;
  int          checks = 0, failures = 0;

  compound_adder dut (.x(x), .y(y), .sum0(s0), .sum1(s1), .cout0(c0), .cout1(c1));

  initial begin #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [53:0] e0, e1;
      x = 53'({$urandom(), $urandom()});
      y = (i % 5 == 0) ? ~x : 53'({$urandom(), $urandom()});
      #1;
      e0 = 54'(x) + 54'(y);
      e1 = e0 + 54'd1;
      checks++;
      if ({c0, s0} != e0 || {c1, s1} != e1) begin
        failures++;
        $display("mismatch x=%h y=%h", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
