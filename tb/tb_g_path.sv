// tb_g_path: drives the g path with normal operands (A with the larger
// exponent; d > 1 for subtractions) in all rounding modes and compares the
// significand and exponent adjustment with the reference model, which sees
// the same operands as binary64 numbers.
module tb_g_path;
  import fpadd_pkg::*;
  import fp_ref_pkg::*;

  logic [52:0] sa, sb, sig;
  logic [10:0] d;
  logic        eo, sign, inc, dec;
  rmode_t      rm;
  int          checks = 0, failures = 0;

  g_path dut (.sig_a(sa), .sig_b(sb), .d(d), .eo(eo), .sign(sign), .rm(rm),
              .sig(sig), .exp_inc(inc), .exp_dec(dec));

  initial begin #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // Worked example of a subtraction with d = 2: 1.1 - 0.0111111111 needs no
  // left shift, 1.0 - 0.0111111111 needs one.
  initial begin
    rm = RM_RNE; eo = 1'b1; sign = 1'b0; d = 11'd2;
    sb = {1'b1, 8'hff, 44'd0};
    sa = {2'b11, 51'd0};
    #1;
    checks++;
    if (sig != {1'b1, 10'd1, 42'd0} || inc || dec) begin   // 1.0000000001
      failures++; $display("example (a) failed: sig=%h dec=%0d", sig, dec);
    end
    sa = {1'b1, 52'd0};
    #1;
    checks++;
    if (sig != {1'b1, 9'd1, 43'd0} || inc || !dec) begin   // 1.000000001 after the shift
      failures++; $display("example (b) failed: sig=%h dec=%0d", sig, dec);
    end
    for (int i = 0; i < 40000; i++) begin
      logic [63:0] xa, yb, r;
      logic [10:0] ea;
      int          e;
      rm   = rmode_t'(i % 4);
      eo   = 1'($urandom());
      sign = 1'($urandom());
      d    = eo ? 11'($urandom_range(2, 70)) : 11'($urandom_range(0, 70));
      if (i % 7 == 0) d = 11'($urandom_range(2, 3));
      ea   = 11'($urandom_range(200, 1800));
      sa   = {1'b1, 52'({$urandom(), $urandom()})};
      sb   = {1'b1, 52'({$urandom(), $urandom()})};
      if (i % 5 == 0) sa[51:0] = '1;
      if (i % 6 == 0) sb[25:0] = '0;
      #1;
      xa = {sign, ea, sa[51:0]};
      yb = {sign ^ eo, ea - d, sb[51:0]};
      r  = ref_add(xa, yb, 1'b0, 2'(rm));
      e  = int'(ea) + int'(inc) - int'(dec);
      checks++;
      if (!sig[52] || r[51:0] != sig[51:0] || int'(r[62:52]) != e) begin
        failures++;
        if (failures < 10)
          $display("mismatch rm=%0d eo=%0d d=%0d sa=%h sb=%h sig=%h e=%0d ref=%h",
                   rm, eo, d, sa, sb, sig, e, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
