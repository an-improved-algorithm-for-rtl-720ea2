// tb_gin_logic: exhaustive check of the g path select over all 4 x 2^9 input
// combinations. For each combination the expected behaviour is worked out
// arithmetically from a model of the low end of the sum: the LSB (and the
// bit above it) of A+B, and the shifted-out part of B as eighths of an LSB
// (G = 4, R = 2, sticky = 1). The selected value X+Y+g_in (X+Y includes the
// half adder fill) must then equal the correctly rounded result after the
// normalization shift the case implies, with q supplying the bit shifted in
// on a left shift.
module tb_gin_logic;
  import fpadd_pkg::*;
  import fp_ref_pkg::rnd_up;

  rmode_t rm;
  logic   eo, sign, g_out0, g0_0, bn, bn1, s, sg1, sg2, g_in, clr, q;
  int     checks = 0, failures = 0;

  gin_logic dut (.rm(rm), .eo(eo), .sign(sign), .g_out0(g_out0), .g0_0(g0_0), .b_n(bn),
                 .b_n1(bn1), .s(s), .s_g1(sg1), .s_g2(sg2), .g_in(g_in), .clr_lsb(clr), .q(q));

  initial begin #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int m = 0; m < 4; m++)
      for (int v = 0; v < 512; v++) begin
        int  low8, f8, got, want, fill;
        logic r, ok, gbit;
        rm = rmode_t'(m);
        {eo, sign, g_out0, g0_0, bn, bn1, s, sg1, sg2} = 9'(v);
        #1;
        low8 = 4 * int'(bn) + 2 * int'(bn1) + int'(s);
        ok   = 1'b1;
        if (!eo) begin
          fill = (m >= 2 && !sg1) ? 1 : 0;
          if (!g_out0) begin
            // no shift: round at the LSB of A+B
            r    = rnd_up(2'(m), sign, sg1, bn, bn1 | s);
            got  = int'(sg1) + fill + int'(g_in);
            if (clr) got = got & ~1;
            want = int'(sg1) + int'(r);
            ok   = (got == want) && !(clr && fill == 0);
          end else begin
            // one-bit right shift: LSB of A+B becomes the guard bit
            r    = rnd_up(2'(m), sign, sg2, sg1, bn | bn1 | s);
            got  = (int'(sg1) + fill + int'(g_in)) / 2;
            ok   = (got == int'(r)) && !clr;
          end
        end else if (low8 == 0) begin
          ok = g_in && !clr && !q;   // complementing one reaches the adder, exact
        end else begin
          f8 = 8 - low8;             // fraction of the difference below the LSB
          if (g0_0) begin
            r  = rnd_up(2'(m), sign, sg1, f8 >= 4, (f8 % 4) != 0);
            ok = (g_in == r) && !clr;
          end else begin
            gbit = f8 >= 4;
            r    = rnd_up(2'(m), sign, gbit, ((f8 / 2) % 2) == 1, (f8 % 2) == 1);
            ok   = (g_in == (gbit & r)) && (q == (gbit ^ r)) && !clr;
          end
        end
        checks++;
        if (!ok) begin
          failures++;
          $display("mismatch rm=%0d in=%b g_in=%b clr=%b q=%b", m, 9'(v), g_in, clr, q);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
