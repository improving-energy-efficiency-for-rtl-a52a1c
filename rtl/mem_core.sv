// mem_core: the MEM tile's 4 KB SRAM with streaming controllers.
//
// The memory tile is the next level above the ponds: it buffers blocks of
// data and streams them to PEs and ponds in the order the schedule needs.
//   write side: each wvalid_i writes wdata_i at the next contiguous address;
//               wstart_i rewinds the write pointer to wr_offset (a start and
//               a valid in the same cycle write at wr_offset).
//   read side:  rstart_i launches one pass of a three-level affine pattern
//                 addr = rd_offset + i2*rd_stride[2] + i1*rd_stride[1]
//                                  + i0*rd_stride[0]
//               issuing one read per cycle. Each word leaves with
//               rvalid_o, and rstart_o marks block starts for the ponds:
//                 start_level 0: every word
//                 start_level 1: words with i0 == 0
//                 start_level 2: words with i0 == i1 == 0
//                 start_level 3: only the first word of the pass
// The valid/start pair is what the ponds' initialization controllers use;
// with multicast, one such stream feeds many ponds.
//
// The source design gives the size (4 KB) and says the memory tile has
// streaming controllers with diverse access patterns that emit start and
// valid signals to the ponds; the three-level read pattern, contiguous
// writes, the start_level encoding and the separate read and write ports
// (a simple dual-port array) are this design's choices.
//
// Timing: the SRAM read is registered, so rdata_o/rvalid_o/rstart_o appear
// one cycle after the address is issued, i.e. two cycles after rstart_i for
// the first word. en_i low (stall) freezes both controllers and the read
// pipeline. range 0 stands for MEM_DEPTH.
`timescale 1ns/1ps
module mem_core
  import cgra_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en_i,
  input  mem_cfg_t cfg_i,
  input  word_t    wdata_i,
  input  logic     wvalid_i,
  input  logic     wstart_i,
  input  logic     rstart_i,
  output word_t    rdata_o,
  output logic     rvalid_o,
  output logic     rstart_o
);

  word_t     mem [MEM_DEPTH];
  mem_addr_t waddr_q, waddr;

  // ------------------------------------------------------------ write side
  assign waddr = wstart_i ? cfg_i.wr_offset : waddr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waddr_q <= '0;
    end else if (en_i) begin
      waddr_q <= (wvalid_i) ? waddr + 1'b1 : waddr;
    end
  end

  always_ff @(posedge clk) begin
    if (en_i && wvalid_i) mem[waddr] <= wdata_i;
  end

  // ------------------------------------------------------------- read side
  logic                       active_q;
  mem_addr_t [MEM_DIM-1:0]    idx_q;
  mem_addr_t [MEM_DIM-1:1]    base_q;   // base_q[k]: address at start of level k
  mem_addr_t                  raddr_q;
  logic                       first_q;
  logic [MEM_DIM-1:0]         last;
  logic                       blk_start;

  always_comb begin
    for (int k = 0; k < MEM_DIM; k++) begin
      last[k] = (idx_q[k] == cfg_i.rd_range[k] - mem_addr_t'(1));
    end
    unique case (cfg_i.start_level)
      2'd0:    blk_start = 1'b1;
      2'd1:    blk_start = (idx_q[0] == '0);
      2'd2:    blk_start = (idx_q[0] == '0) && (idx_q[1] == '0);
      default: blk_start = first_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      idx_q    <= '0;
      base_q   <= '0;
      raddr_q  <= '0;
      first_q  <= 1'b0;
      rvalid_o <= 1'b0;
      rstart_o <= 1'b0;
    end else if (en_i) begin
      rvalid_o <= active_q;
      rstart_o <= active_q && blk_start;
      if (rstart_i) begin
        active_q <= 1'b1;
        idx_q    <= '0;
        base_q   <= {(MEM_DIM-1){cfg_i.rd_offset}};
        raddr_q  <= cfg_i.rd_offset;
        first_q  <= 1'b1;
      end else if (active_q) begin
        first_q <= 1'b0;
        // advance the loop nest: the lowest level that is not at its last
        // iteration steps, all levels below it rewind
        if (!last[0]) begin
          idx_q[0] <= idx_q[0] + 1'b1;
          raddr_q  <= raddr_q + cfg_i.rd_stride[0];
        end else if (!last[1]) begin
          idx_q[0]  <= '0;
          idx_q[1]  <= idx_q[1] + 1'b1;
          base_q[1] <= base_q[1] + cfg_i.rd_stride[1];
          raddr_q   <= base_q[1] + cfg_i.rd_stride[1];
        end else if (!last[2]) begin
          idx_q[0]  <= '0;
          idx_q[1]  <= '0;
          idx_q[2]  <= idx_q[2] + 1'b1;
          base_q[1] <= base_q[2] + cfg_i.rd_stride[2];
          base_q[2] <= base_q[2] + cfg_i.rd_stride[2];
          raddr_q   <= base_q[2] + cfg_i.rd_stride[2];
        end else begin
          active_q <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en_i) rdata_o <= mem[raddr_q];
  end

endmodule
