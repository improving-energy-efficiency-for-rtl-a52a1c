// cgra_tile: one tile of the CGRA, a PE tile (IS_MEM = 0) or a MEM tile
// (IS_MEM = 1), and one power domain.
//
// Datapath (switched domain, powered through power_switch):
//   - a 16-bit and a 1-bit switch box (switch_box), registered outputs on
//     all four sides, each output choosing among the other three sides and
//     the core outputs;
//   - connection boxes (connection_box) feeding every core input from all
//     tracks, with a constant-0 input;
//   - PE tile: pe_core plus a 2R/1W pond. The ALU inputs can take either
//     pond output, the pond input can take the ALU output, and both pond
//     outputs also drive the switch boxes so neighbouring PEs can use them.
//     Core outputs to the SBs: 16-bit {pond1, pond0, alu}, 1-bit
//     {pond valid1, pond valid0, alu bit}.
//   - MEM tile: mem_core. Core outputs: 16-bit {0, 0, read data}, 1-bit
//     {0, read start, read valid}.
//   - NUM_CFG_WORDS 32-bit configuration words holding route_cfg_t and the
//     core configuration (see cgra_pkg); they are lost when the tile is off.
// Always-on domain: pd_config_reg (tile-id decode and ps_en_reg),
// pd_read_isolation (configuration read-back chain), and the global signals
// (reset, stall, configuration bus) that pass through the tile to the tile
// below it in the column.
//
// Power gating: ps_en_reg = 1 turns the switches off. While the switched
// supply is off its state is held in reset (nothing is retained) and its
// outputs float; the model drives them with power_switch's fixed
// pseudo-random stand-in value. Neighbours stay safe because their
// pd_mux-based SBs and CBs clamp any input they do not select. After
// power-up the tile must be reconfigured; the switched configuration comes
// out of reset as all ones, which puts every SB/CB select beyond its last
// input, so an unconfigured tile drives only zeros.
//
// Lint note: the switched-domain reset sw_rst_n is used asynchronously by
// the registers and synchronously by the pond's assertions (their
// "disable iff" term), which a linter reports as a net used both ways. The
// assertions are simulation-only checks, so this is intended.
//
// Connection-box numbering (select values) for both networks: tracks
// side*NUM_TRACKS + track (N=0, E=1, S=2, W=3), then local inputs, then the
// constant 0. 16-bit CBs: 0-2 ALU a, b, c (locals: 20 = pond0, 21 = pond1,
// 22 = zero), 3 pond write data (local 20 = ALU out, 21 = zero); MEM tile
// uses CB 0 as write data (20 = zero). 1-bit CBs (20 = zero): PE 0-2 ALU
// bits, 3/4 init0
// start/valid, 5/6 init1 start/valid, 7 wb start, 8 update0 start,
// 9 update1 start; MEM 0 write valid, 1 write start, 2 read start.
//
// Tile structure (SBs, CBs, core, pond, always-on/switched split, global
// feed-through) follows the source design; track count, connectivity and
// register layout are this design's choices.
//
// Timing: a value leaving a tile was registered in its switch box, so each
// hop costs one cycle. Configuration writes take effect on the next clock
// edge. stall_i freezes the switched domain.
`timescale 1ns/1ps
module cgra_tile
  import cgra_pkg::*;
#(
  parameter bit IS_MEM       = 1'b0,
  parameter int NUM_SWITCHES = IS_MEM ? 35 : 18,  // 17.5 ns / 9 ns wake-up
  parameter int STAGE_PS     = 500
) (
  input  logic                 clk,
  // global signals, passed down the column through the always-on domain
  input  logic                 rst_n_i,
  output logic                 rst_n_o,
  input  logic                 stall_i,
  output logic                 stall_o,
  input  cfg_bus_t             cfg_i,
  output cfg_bus_t             cfg_o,
  input  logic [CFG_DATA_W-1:0] rd_chain_i,
  output logic [CFG_DATA_W-1:0] rd_chain_o,
  input  logic [TILE_ID_W-1:0] tile_id_i,
  // interconnect, indexed [side][track]
  input  word_t [NUM_SIDES-1:0][NUM_TRACKS-1:0] data_i,
  output word_t [NUM_SIDES-1:0][NUM_TRACKS-1:0] data_o,
  input  logic  [NUM_SIDES-1:0][NUM_TRACKS-1:0] bit_i,
  output logic  [NUM_SIDES-1:0][NUM_TRACKS-1:0] bit_o,
  // status
  output logic                 pwr_on_o
);

  localparam int NOUT16  = NUM_SIDES * NUM_TRACKS * DATA_W;
  localparam int NOUT1   = NUM_SIDES * NUM_TRACKS;
  localparam int FLOAT_W = NOUT16 + NOUT1;

  // ------------------------------------------------- always-on domain
  assign rst_n_o = rst_n_i;
  assign stall_o = stall_i;
  assign cfg_o   = cfg_i;

  logic                  ps_en, sw_we, sw_re, vdd_sw_on;
  logic [CFG_REG_W-1:0]  sw_idx;
  logic [CFG_DATA_W-1:0] aon_rdata, sw_rdata;
  logic [FLOAT_W-1:0]    float_val;

  pd_config_reg u_pd_cfg (
    .clk,
    .rst_n       (rst_n_i),
    .tile_id_i,
    .cfg_i,
    .ps_en_o     (ps_en),
    .sw_we_o     (sw_we),
    .sw_re_o     (sw_re),
    .sw_idx_o    (sw_idx),
    .aon_rdata_o (aon_rdata)
  );

  pd_read_isolation u_rd_iso (
    .ps_en_i     (ps_en),
    .chain_i     (rd_chain_i),
    .aon_rdata_i (aon_rdata),
    .sw_rdata_i  (sw_rdata),
    .chain_o     (rd_chain_o)
  );

  power_switch #(
    .NUM_SWITCHES (NUM_SWITCHES),
    .STAGE_PS     (STAGE_PS),
    .FLOAT_W      (FLOAT_W)
  ) u_ps (
    .nsleep_i    (~ps_en),
    .nsleep_o    (),
    .vdd_sw_on_o (vdd_sw_on),
    .float_o     (float_val)
  );

  assign pwr_on_o = vdd_sw_on;

  // ------------------------------------------------- switched domain
  logic sw_rst_n, en;
  assign sw_rst_n = rst_n_i & vdd_sw_on;
  assign en       = ~stall_i;

  logic [NUM_CFG_WORDS-1:0][CFG_DATA_W-1:0] cfg_q;
  tile_cfg_t                                tcfg;

  // Reset value all ones: every SB and CB select is then beyond its last
  // input and selects nothing, so an unconfigured tile drives zeros and
  // ignores whatever its (possibly unpowered) neighbours drive.
  always_ff @(posedge clk or negedge sw_rst_n) begin
    if (!sw_rst_n) begin
      cfg_q <= '1;
    end else if (sw_we) begin
      cfg_q[sw_idx[$clog2(NUM_CFG_WORDS)-1:0]] <= cfg_i.data;
    end
  end

  logic [NUM_CFG_WORDS*CFG_DATA_W-1:0] cfg_flat;
  assign cfg_flat = cfg_q;
  assign tcfg     = cfg_flat[$bits(tile_cfg_t)-1:0];
  assign sw_rdata = sw_re ? cfg_q[sw_idx[$clog2(NUM_CFG_WORDS)-1:0]] : '0;

  word_t [CORE_OUTS-1:0]                  core16;
  logic  [CORE_OUTS-1:0]                  core1;
  word_t [NUM_SIDES-1:0][NUM_TRACKS-1:0]  sb16_q;
  logic  [NUM_SIDES-1:0][NUM_TRACKS-1:0]  sb1_q;

  switch_box #(.WIDTH(DATA_W)) u_sb16 (
    .clk, .rst_n (sw_rst_n), .en_i (en),
    .in_i   (data_i),
    .core_i (core16),
    .sel_i  (tcfg.route.sb16),
    .out_o  (sb16_q)
  );

  switch_box #(.WIDTH(1)) u_sb1 (
    .clk, .rst_n (sw_rst_n), .en_i (en),
    .in_i   (bit_i),
    .core_i (core1),
    .sel_i  (tcfg.route.sb1),
    .out_o  (sb1_q)
  );

  // Outputs of an unpowered domain float.
  assign data_o = vdd_sw_on ? sb16_q : float_val[NOUT16-1:0];
  assign bit_o  = vdd_sw_on ? sb1_q  : float_val[FLOAT_W-1:NOUT16];

  if (!IS_MEM) begin : g_pe
    pe_cfg_t   pe_cfg;
    pond_cfg_t pond_cfg;
    word_t     alu_out, pond0, pond1, pond_wdata;
    logic      alu_bit, pond_v0, pond_v1;
    word_t [2:0] alu_in;
    logic  [PE_BIT_INS-1:0] bits;

    assign pe_cfg   = pe_cfg_t'(tcfg.core[$bits(pe_cfg_t)-1:0]);
    assign pond_cfg = pond_cfg_t'(tcfg.core[$bits(pe_cfg_t) +: $bits(pond_cfg_t)]);

    for (genvar k = 0; k < 3; k++) begin : g_alu_cb
      connection_box #(.WIDTH(DATA_W), .NUM_LOCAL(2)) u_cb (
        .tracks_i (data_i),
        .local_i  ({pond1, pond0}),
        .sel_i    (tcfg.route.cb16[k]),
        .out_o    (alu_in[k])
      );
    end

    connection_box #(.WIDTH(DATA_W), .NUM_LOCAL(1)) u_cb_pond (
      .tracks_i (data_i),
      .local_i  (alu_out),
      .sel_i    (tcfg.route.cb16[3]),
      .out_o    (pond_wdata)
    );

    for (genvar k = 0; k < PE_BIT_INS; k++) begin : g_bit_cb
      connection_box #(.WIDTH(1), .NUM_LOCAL(0)) u_cb (
        .tracks_i (bit_i),
        .local_i  (1'b0),
        .sel_i    (tcfg.route.cb1[k]),
        .out_o    (bits[k])
      );
    end

    pe_core u_pe (
      .cfg_i  (pe_cfg),
      .a_i    (alu_in[0]),
      .b_i    (alu_in[1]),
      .c_i    (alu_in[2]),
      .bit_i  (bits[2:0]),
      .data_o (alu_out),
      .bit_o  (alu_bit)
    );

    pond u_pond (
      .clk, .rst_n (sw_rst_n), .en_i (en),
      .cfg_i           (pond_cfg),
      .data_i          (pond_wdata),
      .alu_i           (alu_out),
      .init0_start_i   (bits[3]),
      .init0_valid_i   (bits[4]),
      .init1_start_i   (bits[5]),
      .init1_valid_i   (bits[6]),
      .wb_start_i      (bits[7]),
      .update0_start_i (bits[8]),
      .update1_start_i (bits[9]),
      .data0_o         (pond0),
      .valid0_o        (pond_v0),
      .data1_o         (pond1),
      .valid1_o        (pond_v1)
    );

    assign core16 = {pond1, pond0, alu_out};
    assign core1  = {pond_v1, pond_v0, alu_bit};

  end else begin : g_mem
    mem_cfg_t mem_cfg;
    word_t    wdata, rdata;
    logic [MEM_BIT_INS-1:0] bits;
    logic     rvalid, rstart;

    assign mem_cfg = mem_cfg_t'(tcfg.core[$bits(mem_cfg_t)-1:0]);

    connection_box #(.WIDTH(DATA_W), .NUM_LOCAL(0)) u_cb_wdata (
      .tracks_i (data_i),
      .local_i  (word_t'(0)),
      .sel_i    (tcfg.route.cb16[0]),
      .out_o    (wdata)
    );

    for (genvar k = 0; k < MEM_BIT_INS; k++) begin : g_bit_cb
      connection_box #(.WIDTH(1), .NUM_LOCAL(0)) u_cb (
        .tracks_i (bit_i),
        .local_i  (1'b0),
        .sel_i    (tcfg.route.cb1[k]),
        .out_o    (bits[k])
      );
    end

    mem_core u_mem (
      .clk, .rst_n (sw_rst_n), .en_i (en),
      .cfg_i    (mem_cfg),
      .wdata_i  (wdata),
      .wvalid_i (bits[0]),
      .wstart_i (bits[1]),
      .rstart_i (bits[2]),
      .rdata_o  (rdata),
      .rvalid_o (rvalid),
      .rstart_o (rstart)
    );

    assign core16 = {word_t'(0), word_t'(0), rdata};
    assign core1  = {1'b0, rstart, rvalid};
  end

endmodule
