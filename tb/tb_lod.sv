// tb_lod: leading-zero count and zero flag for every leading-one position
// with random bits below it, and for zero.
module tb_lod;
  logic [52:0] v;
  logic [5:0]  lz;
  logic        zero;
  int          checks = 0, failures = 0;

  lod dut (.val(v), .lz(lz), .zero(zero));

  initial begin #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i <= 53 * 20; i++) begin
      int pos;
      pos = i % 54;   // 53 = zero input
      v = '0;
      if (pos < 53) begin
        v = 53'({$urandom(), $urandom()}) & ((53'd1 << pos) - 53'd1);
        v[pos] = 1'b1;
      end
      #1;
      checks++;
      if (pos < 53 ? (lz != 6'(52 - pos) || zero) : (lz != 6'd53 || !zero)) begin
        failures++;
        $display("mismatch pos=%0d lz=%0d", pos, lz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
