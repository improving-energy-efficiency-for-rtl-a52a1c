// pe_core: the processing element's ALU.
//
// Three 16-bit operands (a, b and the addend c of a multiply-accumulate)
// and three 1-bit operands arrive through the tile's connection boxes; a
// pond output can be selected there as an operand. The core computes one
// configured operation per cycle on INT16 or BFloat16 data: integer add,
// subtract, multiply, multiply-accumulate, signed min/max, abs, ReLU,
// shifts, bitwise logic, select, compare, and BFloat16 add, multiply and
// multiply-add (bf16_unit). The multiply-accumulate lets one PE consume a
// weight and an input from its 2R/1W pond and accumulate in one operation.
//
// The source design states that PEs support INT16 and BFloat16 operations
// and multiply-accumulate; the exact opcode list, the compare results on
// bit_o and the select on bit0 are this design's choices.
//
// Timing: purely combinational; the result is registered by the switch box
// that carries it away, or written into the pond for accumulation.
`timescale 1ns/1ps
module pe_core
  import cgra_pkg::*;
(
  input  pe_cfg_t    cfg_i,
  input  word_t      a_i,
  input  word_t      b_i,
  input  word_t      c_i,
  input  logic [2:0] bit_i,
  output word_t      data_o,
  output logic       bit_o
);

  logic signed [DATA_W-1:0] sa, sb;
  logic [1:0]               bf_mode;
  word_t                    bf_y;
  logic [3:0]               shamt;

  assign sa    = signed'(a_i);
  assign sb    = signed'(b_i);
  assign shamt = b_i[3:0];

  always_comb begin
    unique case (cfg_i.op)
      OP_BF_MUL: bf_mode = 2'd1;
      OP_BF_MAC: bf_mode = 2'd2;
      default:   bf_mode = 2'd0;
    endcase
  end

  bf16_unit u_bf16 (
    .mode_i (bf_mode),
    .a_i    (a_i),
    .b_i    (b_i),
    .c_i    (c_i),
    .y_o    (bf_y)
  );

  always_comb begin
    data_o = '0;
    bit_o  = 1'b0;
    unique case (cfg_i.op)
      OP_ADD:    data_o = a_i + b_i;
      OP_SUB:    data_o = a_i - b_i;
      OP_MUL:    data_o = a_i * b_i;
      OP_MAC:    data_o = a_i * b_i + c_i;
      OP_MIN:    data_o = (sa < sb) ? a_i : b_i;
      OP_MAX:    data_o = (sa > sb) ? a_i : b_i;
      OP_ABS:    data_o = sa[DATA_W-1] ? -a_i : a_i;
      OP_RELU:   data_o = sa[DATA_W-1] ? '0 : a_i;
      OP_SHL:    data_o = a_i << shamt;
      OP_SHR:    data_o = a_i >> shamt;
      OP_ASHR:   data_o = word_t'(sa >>> shamt);
      OP_AND:    data_o = a_i & b_i;
      OP_OR:     data_o = a_i | b_i;
      OP_XOR:    data_o = a_i ^ b_i;
      OP_SEL:    data_o = bit_i[0] ? a_i : b_i;
      OP_PASS:   data_o = a_i;
      OP_EQ:     begin data_o = a_i; bit_o = (a_i == b_i); end
      OP_LT:     begin data_o = a_i; bit_o = (sa < sb);    end
      OP_BF_ADD,
      OP_BF_MUL,
      OP_BF_MAC: data_o = bf_y;
      default:   data_o = '0;
    endcase
  end

endmodule
