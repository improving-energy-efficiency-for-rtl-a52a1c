// power_switch: behavioural model of a tile's daisy-chained header power
// switches. Not synthesizable logic: it stands in for physical switch cells.
//
// The switched supply VDD_SW of a tile is connected to the always-on VDD
// through a column of buffered power switches. The sleep control enters the
// first switch; each switch passes it on to the next after STAGE_PS, so the
// switches turn on one after another, which limits inrush current at the
// cost of a wake-up time of NUM_SWITCHES*STAGE_PS. The model reports the
// switched supply as good only when every switch is on (power-up) and as
// lost as soon as any switch is off (power-down). While the supply is off,
// the outputs of the switched domain float; float_o provides a stand-in
// value for them: a fixed pseudo-random bit pattern (a 32-bit xorshift
// sequence started from FLOAT_SEED), so that simulations can show that no
// floating value passes a neighbour's boundary-protecting multiplexers. The
// pattern is a constant, which keeps the model elaborable by synthesis
// tools; the delays are ignored there.
//
// Wake-up time follows the source design's daisy-chain analysis: 9 ns for a
// PE tile (the default) and 17.5 ns for a MEM tile. The number of switches
// per tile is this design's assumption.
//
// Ports: nsleep_i (1 = switches on, driven by the inverse of ps_en_reg),
// nsleep_o (end of the daisy chain), vdd_sw_on_o (switched supply good),
// float_o (stand-in for floating outputs).
`timescale 1ns/1ps
module power_switch #(
  parameter int NUM_SWITCHES = 18,
  parameter int STAGE_PS     = 500,   // 18 x 0.5 ns = 9 ns wake-up
  parameter int FLOAT_W      = 32,
  parameter logic [31:0] FLOAT_SEED = 32'h2545_F491
) (
  input  logic               nsleep_i,
  output logic               nsleep_o,
  output logic               vdd_sw_on_o,
  output logic [FLOAT_W-1:0] float_o
);

  logic [NUM_SWITCHES:0] chain;

  assign chain[0] = nsleep_i;
  for (genvar i = 0; i < NUM_SWITCHES; i++) begin : g_sw
    assign #(STAGE_PS / 1000.0) chain[i+1] = chain[i];
  end

  assign nsleep_o    = chain[NUM_SWITCHES];
  assign vdd_sw_on_o = &chain[NUM_SWITCHES:1];

  function automatic logic [FLOAT_W-1:0] float_pattern(logic [31:0] seed);
    logic [31:0] r;
    r = seed;
    for (int i = 0; i < FLOAT_W; i++) begin
      r = r ^ (r << 13);
      r = r ^ (r >> 17);
      r = r ^ (r << 5);
      float_pattern[i] = r[7];
    end
  endfunction

  localparam logic [FLOAT_W-1:0] FLOAT_VALUE = float_pattern(FLOAT_SEED);

  assign float_o = FLOAT_VALUE;

endmodule
