// pond_init_ctrl: initialization (load) controller of a pond write port.
//
// A memory tile may broadcast one stream to many ponds (multicast). It
// sends a start pulse at the beginning of the stream and a valid with every
// word; both are shared by all the ponds on the stream. Each pond decides by
// itself which words to keep: the stream is cut into blocks of
// block_factor words, blocks are dealt round-robin to cyclic_factor ponds,
// and this pond keeps the blocks whose turn equals its index. Kept words are
// written at contiguous addresses starting at offset (modulo the pond
// size). Example with cyclic_factor 3: block_factor 4 keeps words 0-3 in
// pond 0, 4-7 in pond 1; block_factor 1 keeps words 0,3,6,9 in pond 0.
//
// The start/valid timing inputs replace a cycle-counting schedule generator,
// and contiguous addressing replaces the two-level loop nest; both follow
// the source design. The configuration has no range field (none is listed
// among the pond's registers), so the controller keeps capturing until the
// next start.
//
// Timing: combinational from valid_i to we_o/waddr_o. A start and the first
// valid may arrive in the same cycle; that word is word 0 of the stream.
// Before the first start after reset, nothing is written.
`timescale 1ns/1ps
module pond_init_ctrl
  import cgra_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en_i,      // fabric not stalled
  input  pond_init_cfg_t cfg_i,
  input  logic           start_i,
  input  logic           valid_i,
  output logic           we_o,
  output pond_addr_t     waddr_o
);

  logic                  active_q;
  pond_addr_t            in_blk_q, in_blk;    // position inside current block
  logic [POND_IDX_W-1:0] turn_q, turn;        // block owner, 0..cyclic-1
  pond_addr_t            wr_cnt_q, wr_cnt;    // words kept so far

  logic                  active;
  logic                  last_in_blk;
  logic                  last_turn;

  // Block factor 0 stands for POND_DEPTH (wraps naturally); cyclic factor 0
  // stands for 1.
  assign active      = active_q | start_i;
  assign in_blk      = start_i ? '0 : in_blk_q;
  assign turn        = start_i ? '0 : turn_q;
  assign wr_cnt      = start_i ? '0 : wr_cnt_q;
  assign last_in_blk = (in_blk == cfg_i.block_factor - pond_addr_t'(1));
  assign last_turn   = (cfg_i.cyclic_factor == '0) ||
                       (turn == cfg_i.cyclic_factor - 1'b1);

  assign we_o    = en_i && active && valid_i && (turn == cfg_i.index);
  assign waddr_o = cfg_i.offset + wr_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      in_blk_q <= '0;
      turn_q   <= '0;
      wr_cnt_q <= '0;
    end else if (en_i) begin
      active_q <= active;
      in_blk_q <= in_blk;
      turn_q   <= turn;
      wr_cnt_q <= wr_cnt;
      if (active && valid_i) begin
        if (we_o) wr_cnt_q <= wr_cnt + 1'b1;
        if (last_in_blk) begin
          in_blk_q <= '0;
          turn_q   <= last_turn ? '0 : turn + 1'b1;
        end else begin
          in_blk_q <= in_blk + 1'b1;
        end
      end
    end
  end

endmodule
