// cgra_top: the CGRA array, COLS x ROWS tiles, each its own power domain.
//
// Default size is 32 columns x 16 rows = 512 tiles. Every column with
// x % MEM_COL_PERIOD == MEM_COL_PERIOD-1 is a column of MEM tiles, giving
// 8 MEM columns (128 MEM tiles, 512 KB of tile SRAM) and 384 PE tiles with
// the defaults. Tile ids are tied per position as {x[7:0], y[7:0]}; row 0
// is the top row.
//
// Neighbouring tiles are joined by their switch-box outputs on both the
// 16-bit and the 1-bit network: the north input of tile (x,y) is the south
// output of tile (x,y-1), and so on. Inputs on the array edge come from the
// io_* ports and outputs on the array edge leave through them; this is where
// the global buffer would stream data in and out.
//
// Global signals (reset, stall, configuration bus) enter at the top tile of
// every column and are passed from tile to tile down the column through
// each tile's always-on domain, so turning a tile off never cuts the
// signals to the tiles below it. The configuration read-back data is an
// OR chain down each column (a tile that is off contributes only its
// always-on ps_en_reg); the column results are ORed into rd_data_o. The
// clock goes to every tile directly.
//
// Follows the source design: array size, PE/MEM mix of 384/128, per-tile
// power domains, always-on routing of global signals through the tiles,
// tie-off tile ids, read-back isolation. This design's choices: MEM column
// placement (every fourth column), column-wise global distribution, the
// clock fed straight to every tile, and the edge I/O ports.
//
// Timing: configuration writes land one clock after they are driven on
// cfg_i (the bus is combinational down each column). Data moves one tile
// per clock. A tile's power state changes NUM_SWITCHES x STAGE_PS after its
// ps_en_reg changes (9 ns for PE tiles, 17.5 ns for MEM tiles).
`timescale 1ns/1ps
module cgra_top
  import cgra_pkg::*;
#(
  parameter int COLS           = 32,
  parameter int ROWS           = 16,
  parameter int MEM_COL_PERIOD = 4,
  parameter int STAGE_PS       = 500
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  stall_i,
  input  cfg_bus_t              cfg_i,
  output logic [CFG_DATA_W-1:0] rd_data_o,
  // edge I/O, [position along the edge][track]
  input  word_t [COLS-1:0][NUM_TRACKS-1:0] io_n_data_i,
  output word_t [COLS-1:0][NUM_TRACKS-1:0] io_n_data_o,
  input  word_t [COLS-1:0][NUM_TRACKS-1:0] io_s_data_i,
  output word_t [COLS-1:0][NUM_TRACKS-1:0] io_s_data_o,
  input  word_t [ROWS-1:0][NUM_TRACKS-1:0] io_w_data_i,
  output word_t [ROWS-1:0][NUM_TRACKS-1:0] io_w_data_o,
  input  word_t [ROWS-1:0][NUM_TRACKS-1:0] io_e_data_i,
  output word_t [ROWS-1:0][NUM_TRACKS-1:0] io_e_data_o,
  input  logic  [COLS-1:0][NUM_TRACKS-1:0] io_n_bit_i,
  output logic  [COLS-1:0][NUM_TRACKS-1:0] io_n_bit_o,
  input  logic  [COLS-1:0][NUM_TRACKS-1:0] io_s_bit_i,
  output logic  [COLS-1:0][NUM_TRACKS-1:0] io_s_bit_o,
  input  logic  [ROWS-1:0][NUM_TRACKS-1:0] io_w_bit_i,
  output logic  [ROWS-1:0][NUM_TRACKS-1:0] io_w_bit_o,
  input  logic  [ROWS-1:0][NUM_TRACKS-1:0] io_e_bit_i,
  output logic  [ROWS-1:0][NUM_TRACKS-1:0] io_e_bit_o,
  // power state of every tile, [row][column]
  output logic  [ROWS-1:0][COLS-1:0]       pwr_on_o
);

  typedef word_t [NUM_SIDES-1:0][NUM_TRACKS-1:0] tile_data_t;
  typedef logic  [NUM_SIDES-1:0][NUM_TRACKS-1:0] tile_bit_t;

  tile_data_t t_din  [ROWS][COLS];
  tile_data_t t_dout [ROWS][COLS];
  tile_bit_t  t_bin  [ROWS][COLS];
  tile_bit_t  t_bout [ROWS][COLS];

  // Per-column read-back results.
  logic [CFG_DATA_W-1:0] col_rd [COLS];

  for (genvar x = 0; x < COLS; x++) begin : g_col
    for (genvar y = 0; y < ROWS; y++) begin : g_row
      localparam bit IS_MEM = (x % MEM_COL_PERIOD) == (MEM_COL_PERIOD - 1);
      localparam logic [TILE_ID_W-1:0] TILE_ID = {8'(x), 8'(y)};

      // global signals from the tile above (or the array inputs for row 0)
      // and towards the tile below
      logic                  rst_in, stall_in, rst_out, stall_out;
      cfg_bus_t              cfg_in, cfg_out;
      logic [CFG_DATA_W-1:0] rd_in, rd_out;
      if (y == 0) begin : g_first
        assign rst_in   = rst_n;
        assign stall_in = stall_i;
        assign cfg_in   = cfg_i;
        assign rd_in    = '0;
      end else begin : g_next
        assign rst_in   = g_row[y-1].rst_out;
        assign stall_in = g_row[y-1].stall_out;
        assign cfg_in   = g_row[y-1].cfg_out;
        assign rd_in    = g_row[y-1].rd_out;
      end

      // neighbour wiring
      always_comb begin
        t_din[y][x][SIDE_N] = (y == 0)        ? io_n_data_i[x] : t_dout[y-1][x][SIDE_S];
        t_din[y][x][SIDE_S] = (y == ROWS - 1) ? io_s_data_i[x] : t_dout[y+1][x][SIDE_N];
        t_din[y][x][SIDE_W] = (x == 0)        ? io_w_data_i[y] : t_dout[y][x-1][SIDE_E];
        t_din[y][x][SIDE_E] = (x == COLS - 1) ? io_e_data_i[y] : t_dout[y][x+1][SIDE_W];
        t_bin[y][x][SIDE_N] = (y == 0)        ? io_n_bit_i[x]  : t_bout[y-1][x][SIDE_S];
        t_bin[y][x][SIDE_S] = (y == ROWS - 1) ? io_s_bit_i[x]  : t_bout[y+1][x][SIDE_N];
        t_bin[y][x][SIDE_W] = (x == 0)        ? io_w_bit_i[y]  : t_bout[y][x-1][SIDE_E];
        t_bin[y][x][SIDE_E] = (x == COLS - 1) ? io_e_bit_i[y]  : t_bout[y][x+1][SIDE_W];
      end

      cgra_tile #(
        .IS_MEM   (IS_MEM),
        .STAGE_PS (STAGE_PS)
      ) u_tile (
        .clk,
        .rst_n_i    (rst_in),
        .rst_n_o    (rst_out),
        .stall_i    (stall_in),
        .stall_o    (stall_out),
        .cfg_i      (cfg_in),
        .cfg_o      (cfg_out),
        .rd_chain_i (rd_in),
        .rd_chain_o (rd_out),
        .tile_id_i  (TILE_ID),
        .data_i     (t_din[y][x]),
        .data_o     (t_dout[y][x]),
        .bit_i      (t_bin[y][x]),
        .bit_o      (t_bout[y][x]),
        .pwr_on_o   (pwr_on_o[y][x])
      );
    end

    assign col_rd[x] = g_row[ROWS-1].rd_out;

    // edge outputs of this column
    assign io_n_data_o[x] = t_dout[0][x][SIDE_N];
    assign io_s_data_o[x] = t_dout[ROWS-1][x][SIDE_S];
    assign io_n_bit_o[x]  = t_bout[0][x][SIDE_N];
    assign io_s_bit_o[x]  = t_bout[ROWS-1][x][SIDE_S];
  end

  for (genvar y = 0; y < ROWS; y++) begin : g_edge_row
    assign io_w_data_o[y] = t_dout[y][0][SIDE_W];
    assign io_e_data_o[y] = t_dout[y][COLS-1][SIDE_E];
    assign io_w_bit_o[y]  = t_bout[y][0][SIDE_W];
    assign io_e_bit_o[y]  = t_bout[y][COLS-1][SIDE_E];
  end

  // Read-back: OR of the column chains (only the addressed tile drives).
  always_comb begin
    rd_data_o = '0;
    for (int x = 0; x < COLS; x++) begin
      rd_data_o = rd_data_o | col_rd[x];
    end
  end

endmodule
