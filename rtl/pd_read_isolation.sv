// pd_read_isolation: one stage of the configuration read-back OR chain,
// protected against a powered-off tile.
//
// Every tile can put the value of one of its configuration registers on the
// read_config_data bus; a tile that is not addressed drives 0, and the tiles
// of a column are joined by an OR chain. If a tile is off, its switched
// domain would inject a floating value into that chain and corrupt every
// read-back downstream. In this stage the switched domain's contribution is
// ANDed with the inverse of ps_en_reg before the OR, so an off tile
// contributes nothing while the upstream value and the always-on
// contribution (the ps_en_reg read-back) still pass. When the tile is on it
// is a plain 3-input OR.
//
// The gating by ps_en_reg and the always-on placement of this logic follow
// the source design. Purely combinational.
`timescale 1ns/1ps
module pd_read_isolation
  import cgra_pkg::*;
(
  input  logic                  ps_en_i,     // 1: switched domain off
  input  logic [CFG_DATA_W-1:0] chain_i,     // from the tile above
  input  logic [CFG_DATA_W-1:0] aon_rdata_i, // always-on registers
  input  logic [CFG_DATA_W-1:0] sw_rdata_i,  // switched-domain registers
  output logic [CFG_DATA_W-1:0] chain_o      // to the tile below
);

  assign chain_o = chain_i | aon_rdata_i | (sw_rdata_i & {CFG_DATA_W{~ps_en_i}});

endmodule
