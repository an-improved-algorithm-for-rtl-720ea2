// tb_fp_adder: end-to-end test of the binary64 adder at its default size.
//
// Drives operand pairs chosen to reach every mechanism of the two-path
// adder (g path: no shift, one-bit right shift, rounding carry, one-bit left
// shift, rounding carry after a left shift; l path: d = 0, negative
// difference with conversion, d = 1 rounding, long normalization shift;
// subnormal results, overflow, the directed-mode A+B+2 case, special
// operands) in all four rounding modes. Every result is compared with an
// independent reference model (fp_ref_pkg); in round-to-nearest the
// reference itself is also compared with the simulator's native double
// arithmetic. Mechanisms are counted by watching internal select signals;
// one that never occurs counts as a failure.
// The adder is combinational: each result is checked one time step after
// the operands are applied.
module tb_fp_adder;
  import fpadd_pkg::*;
  import fp_ref_pkg::*;

  logic [63:0] x, y, z, exp_z, nat;
  logic        sub;
  rmode_t      rm;
  int          checks = 0, failures = 0;

  fp_adder dut (.x(x), .y(y), .sub(sub), .rm(rm), .z(z));

  // mechanism counters
  int n_nrs = 0, n_ors = 0, n_rcarry = 0, n_nls = 0, n_ols = 0, n_d0 = 0, n_conv = 0,
      n_d1rnd = 0, n_mls = 0, n_sub_l = 0, n_sub_g = 0, n_ovf = 0, n_plus2 = 0, n_clr = 0,
      n_nan = 0, n_inf = 0, n_zero = 0, n_olscarry = 0;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

  // Operand generator: kind selects the shape of the pair.
  task automatic gen(input int kind);
    logic [10:0] e;
    int          dd;
    x = rand64();
    y = rand64();
    case (kind)
      0: ;  // fully random bits
      1: begin  // close exponents
        e  = 11'($urandom_range(1, 2045));
        dd = $urandom_range(0, 3);
        x[62:52] = e;
        y[62:52] = (e > 11'(dd)) ? e - 11'(dd) : e;
      end
      2: begin  // near cancellation
        y = x ^ 64'($urandom_range(0, 255));
        if ($urandom_range(0, 1) == 1) y[62:52] = x[62:52] - 11'd1;
      end
      3: begin  // subnormal range
        x[62:52] = 11'($urandom_range(0, 3));
        y[62:52] = 11'($urandom_range(0, 3));
      end
      4: begin  // near overflow
        x[62:52] = 11'($urandom_range(2040, 2046));
        y[62:52] = 11'($urandom_range(2040, 2046));
      end
      5: begin  // long right shifts, sticky patterns
        e = 11'($urandom_range(100, 2000));
        x[62:52] = e;
        y[62:52] = e - 11'($urandom_range(2, 60));
        if ($urandom_range(0, 1) == 1) y[20:0] = '0;
        if ($urandom_range(0, 1) == 1) x[51:0] = {52{1'b1}};
      end
      6: begin  // specials and zeros
        case ($urandom_range(0, 5))
          0: x[62:0] = {11'h7ff, 52'd0};
          1: y[62:0] = {11'h7ff, 52'd1 << $urandom_range(0, 51)};
          2: begin x[62:0] = {11'h7ff, 52'd0}; y[62:0] = {11'h7ff, 52'd0}; end
          3: x[62:0] = '0;
          4: begin x[62:0] = '0; y[62:0] = '0; end
          default: y = x;
        endcase
      end
      default: begin  // all-ones significands (rounding carries)
        x[51:0] = {52{1'b1}};
        y[51:0] = {52{1'b1}} << $urandom_range(0, 52);
        e = 11'($urandom_range(1, 2040));
        x[62:52] = e;
        y[62:52] = e - 11'($urandom_range(0, 4) > int'(e) - 1 ? 0 : $urandom_range(0, 4));
      end
    endcase
  endtask

  function automatic logic is_nan(logic [63:0] v);
    return v[62:52] == 11'h7ff && v[51:0] != 0;
  endfunction

  task automatic check_one();
    #1;
    exp_z = ref_add(x, y, sub, rm);
    checks++;
    if (z !== exp_z) begin
      failures++;
      if (failures < 20)
        $display("MISMATCH x=%h y=%h sub=%0d rm=%0d z=%h exp=%h", x, y, sub, rm, z, exp_z);
    end
    if (rm == RM_RNE) begin
      nat = sub ? $realtobits($bitstoreal(x) - $bitstoreal(y))
                : $realtobits($bitstoreal(x) + $bitstoreal(y));
      checks++;
      if (is_nan(nat) ? !is_nan(exp_z) : (nat !== exp_z)) begin
        failures++;
        if (failures < 20) $display("REFERENCE vs native x=%h y=%h exp=%h nat=%h", x, y, exp_z, nat);
      end
    end
    // mechanism accounting
    if (dut.x_nan || dut.y_nan || (dut.x_inf && dut.y_inf && dut.eo)) n_nan++;
    else if (dut.x_inf || dut.y_inf) n_inf++;
    else if (dut.close) begin
      if (!dut.pred) n_d0++;
      if (dut.u_l.neg && !dut.l_zero) n_conv++;
      if (dut.pred && dut.u_l.b_n && dut.u_l.sum0[52] && dut.u_l.l_in) n_d1rnd++;
      if (dut.u_l.amt > 1) n_mls++;
      if (dut.l_zero) n_zero++;
      if (z[62:52] == 0 && z[51:0] != 0) n_sub_l++;
    end else begin
      if (dut.u_sel.g_e >= 13'h7ff) n_ovf++;
      else if (z[62:52] == 0 && z[51:0] != 0) n_sub_g++;
      if (!dut.eo && !dut.u_g.g_out0_w && !dut.g_inc) n_nrs++;
      if (!dut.eo && dut.u_g.g_out0_w) n_ors++;
      if (!dut.eo && !dut.u_g.g_out0_w && dut.g_inc) n_rcarry++;
      if (dut.eo && !dut.g_dec) n_nls++;
      if (dut.eo && dut.g_dec) n_ols++;
      if (dut.eo && !dut.u_g.sum0[52] && dut.u_g.g_in && dut.u_g.sum1[52] &&
          (dut.u_g.b_n | dut.u_g.b_n1 | dut.u_g.s_st)) n_olscarry++;
      if (dut.u_g.fill && dut.u_g.g_in) n_plus2++;
      if (dut.u_g.clr_lsb) n_clr++;
    end
  endtask

  task automatic need(string name, int n);
    $display("  %-28s %0d", name, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("  mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    // directed cases
    rm = RM_RNE; sub = 1'b0;
    x = 64'h3ff0_0000_0000_0000; y = 64'h3ff0_0000_0000_0000; check_one();  // 1+1
    x = 64'h3ff8_0000_0000_0000; y = 64'h3fe0_0000_0000_0000; sub = 1'b1; check_one(); // 1.5-0.5
    x = 64'h7fef_ffff_ffff_ffff; y = 64'h7fef_ffff_ffff_ffff; sub = 1'b0; check_one(); // overflow
    x = 64'h0010_0000_0000_0000; y = 64'h000f_ffff_ffff_ffff; sub = 1'b1; check_one(); // to subnormal
    // 1.25 - (0.25 + 2^-54): the difference sits just below 1.0 and needs a
    // left shift, but rounds up to exactly 1.0
    x = 64'h3ff4_0000_0000_0000; y = 64'h3fd0_0000_0000_0001; sub = 1'b1; check_one();
    checks++;
    if (z != 64'h3ff0_0000_0000_0000) begin
      failures++; $display("rounding carry after left shift: got %h", z);
    end
    for (int m = 0; m < 4; m++) begin
      rm = rmode_t'(m);
      for (int i = 0; i < 40000; i++) begin
        gen(i % 8);
        sub = 1'($urandom_range(0, 1));
        check_one();
      end
    end
    $display("mechanisms:");
    need("g add, no shift (NRS)", n_nrs);
    need("g add, right shift (ORS)", n_ors);
    need("g add, rounding carry", n_rcarry);
    need("g sub, no shift (NLS)", n_nls);
    need("g sub, left shift (OLS)", n_ols);
    need("g sub, rounding carry to MSB", n_olscarry);
    need("g add, A+B+2 via fill", n_plus2);
    need("g add, LSB clear after fill", n_clr);
    need("l path d = 0", n_d0);
    need("l path conversion", n_conv);
    need("l path d = 1 rounding", n_d1rnd);
    need("l path long left shift", n_mls);
    need("exact zero", n_zero);
    need("subnormal result, l path", n_sub_l);
    need("subnormal result, g path", n_sub_g);
    need("overflow", n_ovf);
    need("NaN result", n_nan);
    need("infinity operand", n_inf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
