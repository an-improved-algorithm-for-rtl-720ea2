// tb_norm_shifter: left shifts of 0..53 with the q bit landing in the first
// vacated position and zeros below it.
module tb_norm_shifter;
  logic [52:0] v, o;
  logic        q;
  logic [5:0]  amt;
  int          checks = 0, failures = 0;

  norm_shifter dut (.val(v), .q(q), .amt(amt), .out(o));

  initial begin #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 54 * 40; i++) begin
      logic [127:0] e;
      v   = 53'({$urandom(), $urandom()});
      q   = 1'($urandom());
      amt = 6'(i % 54);
      #1;
      e = 128'(v) << amt;
      if (amt != 0) e[amt-1] = q;
      checks++;
      if (o != e[52:0]) begin
        failures++;
        $display("mismatch v=%h q=%0d amt=%0d o=%h", v, q, amt, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
