// bf16_unit: BFloat16 adder and multiplier of the PE.
//
// BFloat16 is the upper half of an IEEE-754 single: 1 sign bit, 8 exponent
// bits (bias 127) and 7 fraction bits. The unit computes a+b, a*b or
// a*b+c (multiply, round, then add and round again). Results are rounded to
// nearest, ties to even. Subnormal inputs and results are flushed to zero
// (signed), overflow gives infinity, any NaN operand or inf*0 / inf-inf
// gives the quiet NaN 0x7FC0.
//
// The source design states only that its PEs support BFloat16 operations;
// the operation set, rounding and the subnormal/NaN policy are this
// design's choices. Purely combinational.
//
// mode_i: 0 = add, 1 = multiply, 2 = multiply-add, 3 = add (unused code).
`timescale 1ns/1ps
module bf16_unit (
  input  logic [1:0]  mode_i,
  input  logic [15:0] a_i,
  input  logic [15:0] b_i,
  input  logic [15:0] c_i,
  output logic [15:0] y_o
);

  localparam logic [15:0] QNAN = 16'h7FC0;

  // Round a normalized mantissa (hidden bit at bit 31) with biased exponent
  // exp and pack it.
  function automatic logic [15:0] round_pack(input logic s, input int exp,
                                             input logic [31:0] m);
    logic [8:0] kept;   // hidden bit + 7 fraction bits, plus carry
    logic       rnd, sticky;
    int         e;
    kept   = {1'b0, m[31:24]};
    rnd    = m[23];
    sticky = |m[22:0];
    e      = exp;
    if (rnd && (sticky || kept[0])) kept = kept + 9'd1;
    if (kept[8]) begin
      kept = kept >> 1;
      e    = e + 1;
    end
    if (e >= 255)     return {s, 8'hFF, 7'h00};
    else if (e <= 0)  return {s, 15'h0000};
    else              return {s, e[7:0], kept[6:0]};
  endfunction

  function automatic logic is_nan(input logic [15:0] x);
    return (x[14:7] == 8'hFF) && (x[6:0] != '0);
  endfunction
  function automatic logic is_inf(input logic [15:0] x);
    return (x[14:7] == 8'hFF) && (x[6:0] == '0);
  endfunction
  function automatic logic is_zero(input logic [15:0] x);
    return (x[14:7] == 8'h00);  // zero or flushed subnormal
  endfunction

  function automatic logic [15:0] bf_mul(input logic [15:0] a,
                                         input logic [15:0] b);
    logic        s;
    logic [15:0] p;
    logic [31:0] m;
    int          e;
    s = a[15] ^ b[15];
    if (is_nan(a) || is_nan(b)) return QNAN;
    if ((is_inf(a) && is_zero(b)) || (is_inf(b) && is_zero(a))) return QNAN;
    if (is_inf(a) || is_inf(b)) return {s, 8'hFF, 7'h00};
    if (is_zero(a) || is_zero(b)) return {s, 15'h0000};
    p = {8'h00, 1'b1, a[6:0]} * {8'h00, 1'b1, b[6:0]};  // in [1,4) * 2^14
    e = int'(a[14:7]) + int'(b[14:7]) - 127;
    if (p[15]) begin
      m = {p, 16'h0000};
      e = e + 1;
    end else begin
      m = {p[14:0], 17'h00000};
    end
    return round_pack(s, e, m);
  endfunction

  function automatic logic [15:0] bf_add(input logic [15:0] a,
                                         input logic [15:0] b);
    logic [15:0] x, y;
    logic [31:0] mx, my, sum, lost;
    int          d, e, p;
    if (is_nan(a) || is_nan(b)) return QNAN;
    if (is_inf(a) && is_inf(b)) return (a[15] == b[15]) ? a : QNAN;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    if (is_zero(a) && is_zero(b)) return {a[15] & b[15], 15'h0000};
    if (is_zero(a)) return b;
    if (is_zero(b)) return a;
    // x has the larger magnitude
    if (a[14:0] >= b[14:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    mx = {2'b01, x[6:0], 23'h0};   // hidden bit at bit 30
    my = {2'b01, y[6:0], 23'h0};
    d  = int'(x[14:7]) - int'(y[14:7]);
    if (d > 31) begin
      my = 32'd1;                  // only a sticky bit survives
    end else if (d > 0) begin
      lost = my & ((32'd1 << d) - 32'd1);
      my   = (my >> d) | {31'h0, |lost};
    end
    sum = (x[15] == y[15]) ? mx + my : mx - my;
    if (sum == '0) return 16'h0000;
    p = 0;
    for (int i = 0; i < 32; i++) begin
      if (sum[i]) p = i;           // position of the leading one
    end
    e = int'(x[14:7]) + (p - 30);
    return round_pack(x[15], e, sum << (31 - p));
  endfunction

  always_comb begin
    unique case (mode_i)
      2'd1:    y_o = bf_mul(a_i, b_i);
      2'd2:    y_o = bf_add(bf_mul(a_i, b_i), c_i);
      default: y_o = bf_add(a_i, b_i);
    endcase
  end

endmodule
