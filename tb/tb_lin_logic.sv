// tb_lin_logic: exhaustive check of the l path select. With a one-bit
// alignment the shifted-out half LSB either makes the complementing one
// reach the adder (b_n = 0) or leaves a difference with fraction 1/2; that
// fraction is rounded when no left shift follows and shifted in as q
// otherwise. Without alignment the full two's complement is always taken.
module tb_lin_logic;
  import fpadd_pkg::*;
  import fp_ref_pkg::rnd_up;

  rmode_t rm;
  logic   sign, pred, bn, l00, sl1, l_in, q;
  int     checks = 0, failures = 0;

  lin_logic dut (.rm(rm), .sign(sign), .pred(pred), .b_n(bn), .l0_0(l00), .s_l1(sl1),
                 .l_in(l_in), .q(q));

  initial begin #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int m = 0; m < 4; m++)
      for (int v = 0; v < 32; v++) begin
        logic ok;
        rm = rmode_t'(m);
        {sign, pred, bn, l00, sl1} = 5'(v);
        if (!pred && bn) continue;   // impossible: no bit is shifted out with d = 0
        #1;
        if (!bn)      ok = l_in && !q;
        else if (l00) ok = (l_in == rnd_up(2'(m), sign, sl1, 1'b1, 1'b0));
        else          ok = !l_in && q;
        checks++;
        if (!ok) begin
          failures++;
          $display("mismatch rm=%0d in=%b l_in=%b q=%b", m, 5'(v), l_in, q);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
