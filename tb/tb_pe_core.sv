// tb_pe_core: self-checking test of the PE core, including its BFloat16
// unit.
//
// Integer operations: random operands for every opcode, compared with a
// behavioural reference (wrap-around 16-bit arithmetic, signed compare for
// MIN/MAX/LT, shift amount b[3:0], SEL on bit 0, EQ/LT on bit_o).
// BFloat16 operations: random normal operands (exponents kept in a band so
// that the double-precision reference is exact before rounding), compared
// with a reference that computes in double precision and rounds once to
// BFloat16 with round-to-nearest-even (twice for MAC: after the product and
// after the sum, as the unit does). Special values are checked directly:
// zero operands, infinity, NaN, inf*0, inf-inf, overflow to infinity.
// Combinational.
`timescale 1ns/1ps
module tb_pe_core;
  import cgra_pkg::*;
  pe_cfg_t cfg;
  word_t a, b, c, y;
  logic [2:0] bits;
  logic bo;
  int checks = 0, failures = 0;

  pe_core dut (.cfg_i(cfg), .a_i(a), .b_i(b), .c_i(c), .bit_i(bits), .data_o(y), .bit_o(bo));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog timeout"); $finish;
  end

  function automatic real bf2r(logic [15:0] x);
    real v, p;
    int  e;
    if (x[14:7] == 8'h00) return 0.0;
    e = int'(x[14:7]) - 127;
    p = 1.0;
    for (int i = 0; i < e; i++)  p = p * 2.0;
    for (int i = 0; i < -e; i++) p = p / 2.0;
    v = (1.0 + real'(x[6:0]) / 128.0) * p;
    return x[15] ? -v : v;
  endfunction

  // round a double to BFloat16, RNE, flush results below the normal range
  function automatic logic [15:0] r2bf(real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] m;   // hidden bit + 52 fraction bits
    logic [8:0]  kept;
    logic [44:0] rest;
    d = $realtobits(r);
    s = d[63];
    if (d[62:0] == '0) return {s, 15'h0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    kept = {1'b0, m[52:45]};
    rest = m[44:0];
    if (rest > {1'b1, 44'h0} || (rest == {1'b1, 44'h0} && kept[0])) kept = kept + 1;
    if (kept[8]) begin kept = kept >> 1; e++; end
    if (e >= 255) return {s, 8'hFF, 7'h0};
    if (e <= 0)   return {s, 15'h0};
    return {s, e[7:0], kept[6:0]};
  endfunction

  function automatic logic [15:0] rand_bf(int lo, int hi);
    return {1'($urandom), 8'($urandom_range(lo, hi)), 7'($urandom)};
  endfunction

  function automatic bit same(logic [15:0] p, logic [15:0] q);
    // +0 and -0 compare equal
    return (p == q) || (p[14:0] == 0 && q[14:0] == 0);
  endfunction

  task automatic run(pe_op_e op, word_t ea, logic eb = 1'b0, bit chk_bit = 0);
    #1;
    check(y == ea, $sformatf("%s a=%h b=%h c=%h y=%h exp=%h", op.name(), a, b, c, y, ea));
    if (chk_bit) check(bo == eb, $sformatf("%s bit a=%h b=%h", op.name(), a, b));
  endtask

  initial begin
    bits = '0;
    // ------------------------------------------------------------ integer
    for (int it = 0; it < 3000; it++) begin
      logic signed [15:0] sa, sb;
      a = word_t'($urandom); b = word_t'($urandom); c = word_t'($urandom);
      if (it % 7 == 0) b = a;
      bits = 3'($urandom);
      sa = a; sb = b;
      cfg.op = OP_ADD;  run(OP_ADD, a + b);
      cfg.op = OP_SUB;  run(OP_SUB, a - b);
      cfg.op = OP_MUL;  run(OP_MUL, word_t'(a * b));
      cfg.op = OP_MAC;  run(OP_MAC, word_t'(a * b + c));
      cfg.op = OP_MIN;  run(OP_MIN, (sa < sb) ? a : b);
      cfg.op = OP_MAX;  run(OP_MAX, (sa > sb) ? a : b);
      cfg.op = OP_ABS;  run(OP_ABS, (sa < 0) ? word_t'(-sa) : a);
      cfg.op = OP_RELU; run(OP_RELU, (sa < 0) ? '0 : a);
      cfg.op = OP_SHL;  run(OP_SHL, a << b[3:0]);
      cfg.op = OP_SHR;  run(OP_SHR, a >> b[3:0]);
      cfg.op = OP_ASHR; run(OP_ASHR, word_t'(sa >>> b[3:0]));
      cfg.op = OP_AND;  run(OP_AND, a & b);
      cfg.op = OP_OR;   run(OP_OR, a | b);
      cfg.op = OP_XOR;  run(OP_XOR, a ^ b);
      cfg.op = OP_SEL;  run(OP_SEL, bits[0] ? a : b);
      cfg.op = OP_PASS; run(OP_PASS, a);
      cfg.op = OP_EQ;   run(OP_EQ, a, a == b, 1);
      cfg.op = OP_LT;   run(OP_LT, a, sa < sb, 1);
    end
    // ----------------------------------------------------------- bfloat16
    for (int it = 0; it < 5000; it++) begin
      logic [15:0] e;
      a = rand_bf(100, 150); b = rand_bf(100, 150); c = rand_bf(90, 170);
      if (it % 11 == 0) b = {~a[15], a[14:0]};          // exact cancellation
      if (it % 13 == 0) b = {a[15], a[14:7] - 8'($urandom_range(0, 3)), 7'($urandom)};
      cfg.op = OP_BF_ADD; #1;
      e = r2bf(bf2r(a) + bf2r(b));
      check(same(y, e), $sformatf("BF_ADD %h+%h=%h exp %h", a, b, y, e));
      cfg.op = OP_BF_MUL; #1;
      e = r2bf(bf2r(a) * bf2r(b));
      check(same(y, e), $sformatf("BF_MUL %h*%h=%h exp %h", a, b, y, e));
      cfg.op = OP_BF_MAC; #1;
      e = r2bf(bf2r(r2bf(bf2r(a) * bf2r(b))) + bf2r(c));
      check(same(y, e), $sformatf("BF_MAC %h*%h+%h=%h exp %h", a, b, c, y, e));
    end
    // ------------------------------------------------------ special values
    cfg.op = OP_BF_ADD;
    a = 16'h7F80; b = 16'h3F80; #1 check(y == 16'h7F80, "inf + 1 = inf");
    a = 16'h7F80; b = 16'hFF80; #1 check(y == 16'h7FC0, "inf - inf = NaN");
    a = 16'h7FC1; b = 16'h3F80; #1 check(y == 16'h7FC0, "NaN + 1 = NaN");
    a = 16'h0000; b = 16'h4040; #1 check(y == 16'h4040, "0 + 3 = 3");
    a = 16'h7F7F; b = 16'h7F7F; #1 check(y == 16'h7F80, "max + max overflows to inf");
    cfg.op = OP_BF_MUL;
    a = 16'h7F80; b = 16'h0000; #1 check(y == 16'h7FC0, "inf * 0 = NaN");
    a = 16'h4000; b = 16'hC040; #1 check(y == 16'hC0C0, "2 * -3 = -6");
    a = 16'h0080; b = 16'h0080; #1 check(y[14:0] == 15'h0, "underflow flushes to zero");
    cfg.op = OP_BF_MAC;
    a = 16'h4000; b = 16'h4040; c = 16'h3F80; #1 check(y == 16'h40E0, "2*3+1 = 7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
