// tb_result_select: directed and random checks of the final select: path
// choice, g path exponent update, subnormal packing, overflow in each
// rounding mode, the sign of an exact zero, NaN and infinity handling.
module tb_result_select;
  import fpadd_pkg::*;

  rmode_t      rm;
  logic        close, g_inc, g_dec, g_sign, l_sign, l_zero;
  logic        x_nan, y_nan, x_inf, y_inf, x_sign, y_sign;
  logic [52:0] g_sig, l_sig;
  logic [10:0] g_exp_a, l_exp;
  logic [63:0] res;
  int          checks = 0, failures = 0;

  result_select dut (.rm(rm), .close(close), .g_sig(g_sig), .g_inc(g_inc), .g_dec(g_dec),
                     .g_exp_a(g_exp_a), .g_sign(g_sign), .l_sig(l_sig), .l_exp(l_exp),
                     .l_sign(l_sign), .l_zero(l_zero), .x_nan(x_nan), .y_nan(y_nan),
                     .x_inf(x_inf), .y_inf(y_inf), .x_sign(x_sign), .y_sign(y_sign),
                     .result(res));

  initial begin #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic expect_res(logic [63:0] e, string what);
    #1;
    checks++;
    if (res != e) begin
      failures++;
      $display("mismatch (%s): got %h want %h", what, res, e);
    end
  endtask

  initial begin
    {x_nan, y_nan, x_inf, y_inf, x_sign, y_sign} = '0;
    for (int i = 0; i < 4000; i++) begin
      rm      = rmode_t'(i % 4);
      close   = 1'($urandom());
      g_sig   = {1'b1, 52'({$urandom(), $urandom()})};
      l_sig   = {1'b1, 52'({$urandom(), $urandom()})};
      g_exp_a = 11'($urandom_range(2, 2045));
      g_inc   = 1'($urandom());
      g_dec   = g_inc ? 1'b0 : 1'($urandom());
      g_sign  = 1'($urandom());
      l_exp   = 11'($urandom_range(1, 2046));
      l_sign  = 1'($urandom());
      l_zero  = 1'b0;
      expect_res(close ? {l_sign, l_exp, l_sig[51:0]}
                       : {g_sign, g_exp_a + 11'(g_inc) - 11'(g_dec), g_sig[51:0]}, "normal");
    end
    close = 1'b0;
    // subnormal g result
    g_sig = 53'h0_1234_5678_9abc; g_exp_a = 11'd1; g_inc = 0; g_dec = 0; g_sign = 1'b1;
    expect_res({1'b1, 11'd0, g_sig[51:0]}, "subnormal");
    // overflow in each mode and sign
    g_sig = {53{1'b1}}; g_exp_a = 11'd2046; g_inc = 1'b1;
    for (int m = 0; m < 4; m++)
      for (int sg = 0; sg < 2; sg++) begin
        logic inf;
        rm = rmode_t'(m); g_sign = 1'(sg);
        inf = (m == 0) || (m == 2 && sg == 0) || (m == 3 && sg == 1);
        expect_res(inf ? {1'(sg), 11'h7ff, 52'd0} : {1'(sg), 11'h7fe, {52{1'b1}}}, "overflow");
      end
    // exact zero of the l path
    close = 1'b1; l_zero = 1'b1; l_sign = 1'b1;
    for (int m = 0; m < 4; m++) begin
      rm = rmode_t'(m);
      expect_res({m == 3, 63'd0}, "zero");
    end
    // specials
    rm = RM_RNE; close = 1'b0; l_zero = 1'b0;
    x_nan = 1'b1; expect_res(64'h7ff8_0000_0000_0000, "nan x"); x_nan = 1'b0;
    y_nan = 1'b1; expect_res(64'h7ff8_0000_0000_0000, "nan y"); y_nan = 1'b0;
    x_inf = 1'b1; y_inf = 1'b1; x_sign = 1'b0; y_sign = 1'b1;
    expect_res(64'h7ff8_0000_0000_0000, "inf-inf");
    y_sign = 1'b0; expect_res(64'h7ff0_0000_0000_0000, "inf+inf");
    x_inf = 1'b0; y_sign = 1'b1; expect_res(64'hfff0_0000_0000_0000, "y inf");
    x_inf = 1'b1; y_inf = 1'b0; x_sign = 1'b1; expect_res(64'hfff0_0000_0000_0000, "x inf");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
