// tb_pred_swap: for exponent pairs that differ by 0 or 1, checks that the
// larger-exponent operand lands on the A side, that B is shifted by the
// exponent difference with the shifted-out bit in b_n, and the prediction.
module tb_pred_swap;
  logic [10:0] ex, ey, ea;
  logic [52:0] mx, my, sa, sb;
  logic        sx, sy, bn, sign_a, sign_b, pred;
  int          checks = 0, failures = 0;

  pred_swap dut (.exp_x(ex), .exp_y(ey), .sig_x(mx), .sig_y(my), .sign_x(sx), .sign_y(sy),
                 .exp_a(ea), .sig_a(sa), .sig_b(sb), .b_n(bn), .sign_a(sign_a),
                 .sign_b(sign_b), .pred(pred));

  initial begin #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [52:0] bg, sml;
      logic [10:0] ebig;
      logic        sbig, ssmall;
      int          dd;
      ex = 11'($urandom_range(2, 2045));
      case (i % 3)
        0: ey = ex;
        1: ey = ex + 11'd1;
        default: ey = ex - 11'd1;
      endcase
      mx = {1'b1, 52'({$urandom(), $urandom()})};
      my = {1'b1, 52'({$urandom(), $urandom()})};
      sx = 1'($urandom()); sy = 1'($urandom());
      #1;
      if (ey > ex) begin bg = my; sml = mx; ebig = ey; sbig = sy; ssmall = sx; dd = 1; end
      else begin bg = mx; sml = my; ebig = ex; sbig = sx; ssmall = sy; dd = (ex == ey) ? 0 : 1; end
      checks++;
      if (sa != bg || ea != ebig || sign_a != sbig || sign_b != ssmall ||
          pred != (dd == 1) || sb != (sml >> dd) || bn != (dd == 1 && sml[0])) begin
        failures++;
        $display("mismatch ex=%0d ey=%0d", ex, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
