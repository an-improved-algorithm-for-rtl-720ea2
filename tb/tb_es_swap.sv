// tb_es_swap: checks exponent difference, swap and effective operation of
// es_swap on random and equal exponents against directly computed values.
module tb_es_swap;
  logic [10:0] ex, ey, ea, d;
  logic [52:0] mx, my, sa, sb;
  logic        sx, sy, sign_a, eo;
  int          checks = 0, failures = 0;

  es_swap dut (.exp_x(ex), .exp_y(ey), .sig_x(mx), .sig_y(my), .sign_x(sx), .sign_y(sy),
               .exp_a(ea), .sig_a(sa), .sig_b(sb), .sign_a(sign_a), .d(d), .eo(eo));

  initial begin #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int dx;
      ex = 11'($urandom_range(1, 2046));
      ey = (i % 4 == 0) ? ex : 11'($urandom_range(1, 2046));
      mx = {1'b1, 52'({$urandom(), $urandom()})};
      my = {1'b1, 52'({$urandom(), $urandom()})};
      sx = 1'($urandom()); sy = 1'($urandom());
      #1;
      dx = int'(ex) - int'(ey);
      checks++;
      if (d != 11'(dx < 0 ? -dx : dx) || eo != (sx ^ sy) ||
          ea != ((ey > ex) ? ey : ex) ||
          sa != ((ey > ex) ? my : mx) || sb != ((ey > ex) ? mx : my) ||
          sign_a != ((ey > ex) ? sy : sx)) begin
        failures++;
        $display("mismatch ex=%0d ey=%0d d=%0d ea=%0d", ex, ey, d, ea);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
