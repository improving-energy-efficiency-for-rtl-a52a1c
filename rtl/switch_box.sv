// switch_box: the tile's switch box for one network (16-bit data or 1-bit
// control).
//
// For every side and every track there is one output multiplexer that
// chooses between the same track arriving on the three other sides and the
// core outputs of the tile. Each multiplexer is a pd_mux, so a tile that is
// powered on never passes a floating value from an off neighbour as long as
// its select does not point at that neighbour; since one input is always the
// tile's own core, an SB can always be given a defined source.
//
// Input order of the multiplexer for output side s: side (s+1)%4, side
// (s+2)%4, side (s+3)%4, then core outputs 0..CORE_OUTS-1. Track t connects
// to track t only (disjoint switch box); this topology and the output
// register below are this design's choices, the source design only says
// that the SB joins any two tiles and selects among the other three sides
// and the core output.
//
// Timing: each output is registered (one cycle per hop), which also keeps
// the array free of combinational loops through neighbouring switch boxes.
// The register holds while en_i is low (fabric stall).
`timescale 1ns/1ps
module switch_box
  import cgra_pkg::*;
#(
  parameter int WIDTH = DATA_W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en_i,
  input  logic    [NUM_SIDES-1:0][NUM_TRACKS-1:0][WIDTH-1:0] in_i,
  input  logic    [CORE_OUTS-1:0][WIDTH-1:0]                 core_i,
  input  sb_sel_t [NUM_SIDES-1:0][NUM_TRACKS-1:0]            sel_i,
  output logic    [NUM_SIDES-1:0][NUM_TRACKS-1:0][WIDTH-1:0] out_o
);

  logic [NUM_SIDES-1:0][NUM_TRACKS-1:0][WIDTH-1:0] mux_out;

  for (genvar s = 0; s < NUM_SIDES; s++) begin : g_side
    for (genvar t = 0; t < NUM_TRACKS; t++) begin : g_track
      logic [SB_INPUTS-1:0][WIDTH-1:0] mux_in;
      always_comb begin
        for (int k = 0; k < 3; k++) begin
          mux_in[k] = in_i[(s + 1 + k) % NUM_SIDES][t];
        end
        for (int c = 0; c < CORE_OUTS; c++) begin
          mux_in[3 + c] = core_i[c];
        end
      end

      pd_mux #(
        .N     (SB_INPUTS),
        .WIDTH (WIDTH),
        .SEL_W (SB_SEL_W)
      ) u_mux (
        .data_i   (mux_in),
        .sel_i    (sel_i[s][t]),
        .data_o   (mux_out[s][t]),
        .onehot_o ()
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_o <= '0;
    end else if (en_i) begin
      out_o <= mux_out;
    end
  end

endmodule
