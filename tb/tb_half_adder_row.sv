// tb_half_adder_row: checks that the sum row plus the shifted carry row plus
// the top carry equals x + y + fill, with fill = NOT(LSB of x + y) when
// enabled, and that each row holds the half-adder sum and carry bits.
module tb_half_adder_row;
  logic [52:0] x, y, hs, hc_sh;
  logic        fill_en, fill, c_out;
  int          checks = 0, failures = 0;

  half_adder_row dut (.x(x), .y(y), .fill_en(fill_en), .hs(hs), .hc_sh(hc_sh),
                      .fill(fill), .c_out(c_out));

  initial begin #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [54:0] tot, expv;
      logic        f;
      x = 53'({$urandom(), $urandom()});
      y = 53'({$urandom(), $urandom()});
      fill_en = 1'($urandom());
      #1;
      f    = fill_en & ~(x[0] ^ y[0]);
      expv = 55'(x) + 55'(y) + 55'(f);
      tot  = 55'(hs) + 55'(hc_sh) + (55'(c_out) << 53);
      checks++;
      if (tot != expv || fill != f || hs != (x ^ y) || hc_sh[52:1] != (x[51:0] & y[51:0])) begin
        failures++;
        $display("mismatch x=%h y=%h", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
