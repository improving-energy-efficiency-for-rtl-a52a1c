// connection_box: selects one core input from the routing tracks.
//
// The candidate inputs are every track of every side (side-major:
// side*NUM_TRACKS + track), then NUM_LOCAL tile-local signals (for example
// a pond output feeding an ALU input, or the ALU output feeding the pond),
// and finally a constant 0 as the last input. Select values beyond the last
// input enable nothing and also give 0. The multiplexer is a pd_mux, so unselected
// inputs are clamped to 0 by AND gates before the OR tree. The constant
// input matters when every neighbour of the tile is powered off: all track
// inputs may then float, and selecting the constant still gives the core a
// defined value. Purely combinational.
//
// The constant-0 input and the use of the three-stage multiplexer follow
// the source design; full connectivity to all tracks of all sides is this
// design's choice (the source design's CBs each see a subset of sides).
`timescale 1ns/1ps
module connection_box
  import cgra_pkg::*;
#(
  parameter int WIDTH     = DATA_W,
  parameter int NUM_LOCAL = 0
) (
  input  logic [NUM_SIDES-1:0][NUM_TRACKS-1:0][WIDTH-1:0] tracks_i,
  input  logic [(NUM_LOCAL > 0 ? NUM_LOCAL : 1)-1:0][WIDTH-1:0] local_i,
  input  cb_sel_t                                         sel_i,
  output logic [WIDTH-1:0]                                out_o
);

  localparam int N = CB_TRACK_INPUTS + NUM_LOCAL + 1;

  logic [N-1:0][WIDTH-1:0] mux_in;

  always_comb begin
    for (int s = 0; s < NUM_SIDES; s++) begin
      for (int t = 0; t < NUM_TRACKS; t++) begin
        mux_in[s * NUM_TRACKS + t] = tracks_i[s][t];
      end
    end
    for (int l = 0; l < NUM_LOCAL; l++) begin
      mux_in[CB_TRACK_INPUTS + l] = local_i[l];
    end
    mux_in[N-1] = '0;  // constant input for isolation
  end

  pd_mux #(
    .N     (N),
    .WIDTH (WIDTH),
    .SEL_W (CB_SEL_W)
  ) u_mux (
    .data_i   (mux_in),
    .sel_i    (sel_i),
    .data_o   (out_o),
    .onehot_o ()
  );

endmodule
