// tb_l_path: drives the l path with effective subtractions of operands whose
// exponents differ by 0 or 1 (B pre-shifted as the prediction stage would),
// including near-total cancellation and subnormal results, and compares
// significand, exponent field, sign and zero flag with the reference model.
module tb_l_path;
  import fpadd_pkg::*;
  import fp_ref_pkg::*;

  logic [52:0] sa, sb, sig, mb;
  logic [10:0] ea, eout;
  logic        bn, pred, sign_a, sign_b, sign, zero;
  rmode_t      rm;
  int          checks = 0, failures = 0;

  l_path dut (.sig_a(sa), .sig_b(sb), .b_n(bn), .pred(pred), .exp_a(ea), .sign_a(sign_a),
              .sign_b(sign_b), .rm(rm), .sig(sig), .exp_out(eout), .sign(sign), .zero(zero));

  initial begin #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 40000; i++) begin
      logic [63:0] xa, yb, r;
      logic [10:0] eb;
      rm     = rmode_t'(i % 4);
      pred   = 1'($urandom());
      ea     = (i % 3 == 0) ? 11'($urandom_range(2, 6)) : 11'($urandom_range(2, 2000));
      eb     = pred ? ea - 11'd1 : ea;
      sign_a = 1'($urandom());
      sign_b = ~sign_a;
      sa     = {1'b1, 52'({$urandom(), $urandom()})};
      mb     = {1'b1, 52'({$urandom(), $urandom()})};
      if (i % 4 == 0) mb = pred ? {sa[51:0], 1'b0} ^ 53'($urandom_range(0, 15))
                                : sa ^ 53'($urandom_range(0, 15));
      mb[52] = 1'b1;
      sb     = pred ? (mb >> 1) : mb;
      bn     = pred & mb[0];
      #1;
      xa = {sign_a, ea, sa[51:0]};
      yb = {sign_b, eb, mb[51:0]};
      r  = ref_add(xa, yb, 1'b0, 2'(rm));
      checks++;
      if (zero ? (r[62:0] != 0)
               : (r[63] != sign || r[62:52] != eout || r[51:0] != sig[51:0] ||
                  sig[52] != (eout != 0))) begin
        failures++;
        if (failures < 10)
          $display("mismatch rm=%0d pred=%0d ea=%0d sa=%h mb=%h sig=%h e=%0d s=%0d z=%0d ref=%h",
                   rm, pred, ea, sa, mb, sig, eout, sign, zero, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
