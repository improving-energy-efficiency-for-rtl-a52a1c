// pd_config_reg: always-on configuration decode and power switch register
// of one tile.
//
// Every tile sees the global configuration bus (address, data, write,
// read) as it flows down its column. This block compares the tile-id field
// of the address (bits 15:0) with the tile's own tile_id, which is tied to
// constants by the array, and decodes the register index (bits 23:16).
// Register 0 is ps_en_reg, the power switch enable: 1 turns the tile's
// switched domain off, 0 turns it on. It resets to 0 so that every tile is
// on after reset. Because this block, the register and the tile-id ties sit
// in the always-on domain, an off tile can still be turned back on through
// the configuration bus. Writes to registers 1..NUM_CFG_WORDS are passed to
// the switched domain's configuration words, but only while the tile is on.
//
// The always-on placement, the tile-id comparison and ps_en_reg (1 = off,
// reset on) follow the source design; the address layout and the register
// numbering are this design's choices.
//
// Timing: ps_en_o is registered (written on the clock edge of a write
// cycle); the write strobe and read data toward the switched domain and the
// read-back chain are combinational.
`timescale 1ns/1ps
module pd_config_reg
  import cgra_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [TILE_ID_W-1:0] tile_id_i,
  input  cfg_bus_t             cfg_i,
  output logic                 ps_en_o,      // 1: switched domain off
  output logic                 sw_we_o,      // write one switched-domain word
  output logic                 sw_re_o,      // read one switched-domain word
  output logic [CFG_REG_W-1:0] sw_idx_o,     // word index, 0-based
  output logic [CFG_DATA_W-1:0] aon_rdata_o  // ps_en_reg read-back
);

  logic                 hit;
  logic [CFG_REG_W-1:0] reg_idx;
  logic                 ps_en_q;

  assign hit      = (cfg_i.addr[TILE_ID_W-1:0] == tile_id_i);
  assign reg_idx  = cfg_i.addr[TILE_ID_W +: CFG_REG_W];
  assign sw_idx_o = reg_idx - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps_en_q <= 1'b0;
    end else if (cfg_i.write && hit && reg_idx == PS_EN_REG_IDX) begin
      ps_en_q <= cfg_i.data[0];
    end
  end

  assign ps_en_o = ps_en_q;
  assign sw_we_o = cfg_i.write && hit && !ps_en_q &&
                   (reg_idx != PS_EN_REG_IDX) &&
                   (int'(reg_idx) <= NUM_CFG_WORDS);
  assign sw_re_o = cfg_i.read && hit &&
                   (reg_idx != PS_EN_REG_IDX) &&
                   (int'(reg_idx) <= NUM_CFG_WORDS);
  assign aon_rdata_o = (cfg_i.read && hit && reg_idx == PS_EN_REG_IDX) ?
                       CFG_DATA_W'(ps_en_q) : '0;

endmodule
