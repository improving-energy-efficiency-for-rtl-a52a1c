// pond_wb_ctrl: write-back controller, reads final results out of a pond.
//
// After a wb_start pulse (shared by all the ponds that write back to the
// same memory tile) the controller reads range words from contiguous
// addresses starting at offset and drives an internally generated valid
// with each one. When several ponds share the memory tile, time is cut into
// slots of block_factor cycles dealt round-robin to cyclic_factor ponds;
// this pond only sends in the slots whose turn equals its index, so the
// ponds' chunks interleave on the shared track without collisions. Example:
// range 9, block_factor 3 sends three chunks of three words.
//
// Contiguous addressing, the external start and the internal valid follow
// the source design; the slot scheme is this design's reading of the
// index/block/cyclic fields, mirrored from the initialization controller.
//
// Timing: the first slot begins in the cycle after wb_start; valid_o and
// raddr_o are registered-state outputs. A new wb_start restarts the
// sequence. range 0 and block_factor 0 stand for POND_DEPTH, cyclic_factor
// 0 for 1.
`timescale 1ns/1ps
module pond_wb_ctrl
  import cgra_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en_i,
  input  pond_wb_cfg_t cfg_i,
  input  logic         start_i,
  output logic         valid_o,
  output pond_addr_t   raddr_o,
  output logic         busy_o
);

  logic                  active_q;
  pond_addr_t            in_blk_q;
  logic [POND_IDX_W-1:0] turn_q;
  logic [POND_AW:0]      sent_q;    // one bit wider: range 0 means DEPTH

  logic [POND_AW:0] range_words;
  logic             my_turn, last_in_blk, last_turn, last_word;

  assign range_words = (cfg_i.range == '0) ? (POND_AW+1)'(POND_DEPTH)
                                           : {1'b0, cfg_i.range};
  assign my_turn     = (turn_q == cfg_i.index);
  assign last_in_blk = (in_blk_q == cfg_i.block_factor - pond_addr_t'(1));
  assign last_turn   = (cfg_i.cyclic_factor == '0) ||
                       (turn_q == cfg_i.cyclic_factor - 1'b1);
  assign last_word   = (sent_q + 1'b1 == range_words);

  assign valid_o = active_q && my_turn && en_i;
  assign raddr_o = cfg_i.offset + pond_addr_t'(sent_q);
  assign busy_o  = active_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      in_blk_q <= '0;
      turn_q   <= '0;
      sent_q   <= '0;
    end else if (en_i) begin
      if (start_i) begin
        active_q <= 1'b1;
        in_blk_q <= '0;
        turn_q   <= '0;
        sent_q   <= '0;
      end else if (active_q) begin
        if (my_turn) begin
          sent_q <= sent_q + 1'b1;
          if (last_word) active_q <= 1'b0;
        end
        if (last_in_blk) begin
          in_blk_q <= '0;
          turn_q   <= last_turn ? '0 : turn_q + 1'b1;
        end else begin
          in_blk_q <= in_blk_q + 1'b1;
        end
      end
    end
  end

endmodule
