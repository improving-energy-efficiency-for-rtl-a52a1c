// pd_mux: routing multiplexer with built-in power-domain boundary protection.
//
// A plain multiplexer lets a floating input from a powered-off neighbour
// reach internal gates. This one is split into three stages so that a data
// input can only ever meet a 2-input AND as its first gate:
//   1. one-hot decode of the binary select (from the configuration bits),
//   2. clamping: every data bit is ANDed with its one-hot enable, so every
//      unselected input is forced to 0 whatever its value,
//   3. an OR tree that merges the clamped inputs into the output.
// Because the select comes from the bitstream, no separate isolation-enable
// signal or controller is needed: programming the select away from an off
// tile is what isolates it. A select value of N or more enables nothing and
// drives 0 (the connection box also adds an explicit constant-0 input).
//
// The three-stage structure, the AND clamping and the OR tree follow the
// source design; keeping the clamp as the first cell is a netlist-level
// rule (no buffer in front, no restructuring) enforced in implementation,
// which RTL can only state. Purely combinational.
//
// Parameters: N inputs of WIDTH bits, SEL_W select bits.
`timescale 1ns/1ps
module pd_mux #(
  parameter int N     = 4,
  parameter int WIDTH = 16,
  parameter int SEL_W = (N > 1) ? $clog2(N + 1) : 1
) (
  input  logic [N-1:0][WIDTH-1:0] data_i,
  input  logic [SEL_W-1:0]        sel_i,
  output logic [WIDTH-1:0]        data_o,
  output logic [N-1:0]            onehot_o   // decoded select, for checking
);

  logic [N-1:0]            onehot;
  logic [N-1:0][WIDTH-1:0] clamped;

  // Stage 1: one-hot encoding of the select.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      onehot[i] = (int'(sel_i) == i);
    end
  end

  // Stage 2: clamping, one 2-input AND per data bit.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      clamped[i] = data_i[i] & {WIDTH{onehot[i]}};
    end
  end

  // Stage 3: OR tree.
  always_comb begin
    data_o = '0;
    for (int i = 0; i < N; i++) begin
      data_o = data_o | clamped[i];
    end
  end

  assign onehot_o = onehot;

endmodule
