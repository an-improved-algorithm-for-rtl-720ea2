// tb_align_shifter: compares the aligned significand, guard, round and
// sticky outputs with a 256-bit reference shift for shift amounts 0..80 and
// random larger ones, with single-bit inputs among them, where everything ends up in the sticky bit.
module tb_align_shifter;
  logic [52:0]  sin, sout;
  logic [10:0]  d;
  logic         bn, bn1, s;
  int           checks = 0, failures = 0;

  align_shifter dut (.sig_in(sin), .d(d), .sig_out(sout), .b_n(bn), .b_n1(bn1), .s(s));

  initial begin #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 6000; i++) begin
      logic [255:0] w;
      sin = {1'b1, 52'({$urandom(), $urandom()})};
      if (i % 3 == 0) sin[30:0] = '0;
      if (i % 3 == 1) sin = 53'd1 << $urandom_range(0, 52);   // single bits
      d   = (i < 5000) ? 11'(i % 81) : 11'($urandom_range(0, 2047));
      #1;
      w = (256'(sin) << 128) >> d;   // bits 127..0 hold what was shifted out
      if (d > 120) w = {128'd0, 1'b0, 1'b0, 125'(|sin)};
      checks++;
      if (sout != w[180:128] || bn != w[127] || bn1 != w[126] || s != (|w[125:0])) begin
        failures++;
        $display("mismatch sin=%h d=%0d", sin, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
