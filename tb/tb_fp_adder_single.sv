// tb_fp_adder_single: the same adder built for IEEE binary32 (N = 24,
// EW = 8), checked in round-to-nearest mode. The expected value is the
// binary64 sum of the two operands rounded once to binary32; because binary64
// carries more than twice the binary32 precision plus two bits, that double
// rounding equals the correctly rounded single-precision sum.
module tb_fp_adder_single;
  import fpadd_pkg::*;

  logic [31:0] x, y, z, e;
  logic        sub;
  rmode_t      rm;
  int          checks = 0, failures = 0;

  fp_adder #(.N(24), .EW(8)) dut (.x(x), .y(y), .sub(sub), .rm(rm), .z(z));

  // Round a binary64 value to binary32, nearest-even, with gradual underflow.
  function automatic logic [31:0] to_single(logic [63:0] dv);
    logic         sg;
    int           ed, es, sh;
    logic [52:0]  m;
    logic [127:0] w, mask;
    logic [24:0]  k;
    logic         g, st;
    sg = dv[63];
    ed = int'(dv[62:52]);
    if (ed == 2047) return (dv[51:0] != 0) ? 32'h7fc0_0000 : {sg, 8'hff, 23'd0};
    if (ed == 0) return {sg, 31'd0};       // binary64 subnormals are far below binary32
    m  = {1'b1, dv[51:0]};
    es = ed - 1023 + 127;
    sh = 29;                               // 53 -> 24 bits
    if (es < 1) begin sh = sh + (1 - es); es = 1; end
    if (sh > 60) return {sg, 31'd0};
    w    = 128'(m) << 64;
    k    = 25'(w >> (64 + sh));
    g    = w[64 + sh - 1];
    mask = (128'd1 << (64 + sh - 1)) - 128'd1;
    st   = (w & mask) != 0;
    if (g && (st || k[0])) k = k + 25'd1;
    if (k[24]) begin k = k >> 1; es++; end
    if (es >= 255) return {sg, 8'hff, 23'd0};
    if (!k[23]) return {sg, 8'd0, k[22:0]};
    return {sg, 8'(es), k[22:0]};
  endfunction

  // Exact binary32 -> binary64 conversion.
  function automatic logic [63:0] to_double(logic [31:0] sv);
    logic        sg;
    int          es, ed;
    logic [22:0] f;
    sg = sv[31]; es = int'(sv[30:23]); f = sv[22:0];
    if (es == 255) return {sg, 11'h7ff, f, 29'd0};
    if (es == 0) begin
      if (f == 0) return {sg, 63'd0};
      ed = 1023 - 126;
      while (!f[22]) begin f = f << 1; ed--; end
      f = f << 1;   // drop the leading one
      ed--;
      return {sg, 11'(ed), f, 29'd0};
    end
    return {sg, 11'(es - 127 + 1023), f, 29'd0};
  endfunction

  initial begin #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    rm = RM_RNE;
    for (int i = 0; i < 60000; i++) begin
      real rx, ry;
      x = $urandom();
      y = $urandom();
      case (i % 4)
        1: y[30:23] = x[30:23] - 8'($urandom_range(0, 2));
        2: y = x ^ 32'($urandom_range(0, 63));
        3: begin x[30:23] = 8'($urandom_range(0, 2)); y[30:23] = 8'($urandom_range(0, 2)); end
        default: ;
      endcase
      sub = 1'($urandom());
      #1;
      rx = $bitstoreal(to_double(x));
      ry = $bitstoreal(to_double(y));
      e  = to_single($realtobits(sub ? rx - ry : rx + ry));
      checks++;
      if ((e[30:23] == 8'hff && e[22:0] != 0) ? !(z[30:23] == 8'hff && z[22:0] != 0) : (z != e)) begin
        failures++;
        if (failures < 10) $display("mismatch x=%h y=%h sub=%0d z=%h exp=%h", x, y, sub, z, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
