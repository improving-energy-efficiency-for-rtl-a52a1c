// pond: streaming register file of a PE tile (2 read ports, 1 write port).
//
// A pond is a 32-entry x 16-bit (64 B) flip-flop register file placed next
// to the ALU, so that operands with high reuse (weights, inputs, partial
// sums of a blocked DNN loop nest) are read at a fraction of the cost of a
// memory tile access. It has no instruction stream: each port is driven by a
// small configured controller that "pushes" data to the ALU.
//
//   write port   init0, init1: load a block of a (possibly multicast) stream
//                                arriving on data_i (pond_init_ctrl)
//                accumulation: write the ALU result back at the address read
//                                acc_delay cycles earlier (pond_acc_delay)
//   read port 0  update0: two-level affine reads (pond_update_ctrl), the
//                                source of the read-modify-write loop
//   read port 1  update1: a second affine reader without accumulation,
//                wb:      write-back of final results (pond_wb_ctrl),
//                                multiplexed with update1
//
// Controller set, port arrangement, configuration fields and widths follow
// the source design's optimized 2R/1W pond. This design's choices: the
// write-port priority (accumulation, then init0, then init1) with an
// assertion that two sources never collide, the read-port-1 priority
// (write-back over update1) likewise asserted, and the write-data
// multiplexer that takes alu_i for accumulation writes and data_i
// otherwise. Storage is reset to zero.
//
// Timing: reads are combinational from the storage, so data_o/valid_o
// appear in the same cycle as the controller's read enable; writes take
// effect at the next clock edge. en_i low (fabric stall) freezes every
// controller and blocks all writes.
`timescale 1ns/1ps
module pond
  import cgra_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en_i,
  input  pond_cfg_t cfg_i,
  // write data: stream from the pond connection box and the ALU result
  input  word_t     data_i,
  input  word_t     alu_i,
  // timing signals from the 1-bit network
  input  logic      init0_start_i,
  input  logic      init0_valid_i,
  input  logic      init1_start_i,
  input  logic      init1_valid_i,
  input  logic      wb_start_i,
  input  logic      update0_start_i,
  input  logic      update1_start_i,
  // read ports
  output word_t     data0_o,
  output logic      valid0_o,
  output word_t     data1_o,
  output logic      valid1_o
);

  word_t [POND_DEPTH-1:0] mem_q;

  logic       init0_we, init1_we, acc_we, u0_re, u1_re, wb_re;
  pond_addr_t init0_wa, init1_wa, acc_wa, u0_ra, u1_ra, wb_ra;
  logic       we;
  pond_addr_t waddr, raddr1;
  word_t      wdata;

  pond_init_ctrl u_init0 (
    .clk, .rst_n, .en_i,
    .cfg_i   (cfg_i.init0),
    .start_i (init0_start_i),
    .valid_i (init0_valid_i),
    .we_o    (init0_we),
    .waddr_o (init0_wa)
  );

  pond_init_ctrl u_init1 (
    .clk, .rst_n, .en_i,
    .cfg_i   (cfg_i.init1),
    .start_i (init1_start_i),
    .valid_i (init1_valid_i),
    .we_o    (init1_we),
    .waddr_o (init1_wa)
  );

  pond_update_ctrl u_update0 (
    .clk, .rst_n, .en_i,
    .cfg_i   (cfg_i.update0),
    .start_i (update0_start_i),
    .re_o    (u0_re),
    .raddr_o (u0_ra),
    .busy_o  ()
  );

  pond_acc_delay u_acc_delay (
    .clk, .rst_n, .en_i,
    .acc_en_i (cfg_i.update_acc_en),
    .delay_i  (cfg_i.update_acc_delay),
    .re_i     (u0_re),
    .raddr_i  (u0_ra),
    .we_o     (acc_we),
    .waddr_o  (acc_wa)
  );

  pond_update_ctrl u_update1 (
    .clk, .rst_n, .en_i,
    .cfg_i   (cfg_i.update1),
    .start_i (update1_start_i),
    .re_o    (u1_re),
    .raddr_o (u1_ra),
    .busy_o  ()
  );

  pond_wb_ctrl u_wb (
    .clk, .rst_n, .en_i,
    .cfg_i   (cfg_i.wb),
    .start_i (wb_start_i),
    .valid_o (wb_re),
    .raddr_o (wb_ra),
    .busy_o  ()
  );

  // Write port: three multiplexed address generators.
  always_comb begin
    we    = acc_we | init0_we | init1_we;
    waddr = acc_we ? acc_wa : (init0_we ? init0_wa : init1_wa);
    wdata = acc_we ? alu_i : data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_q <= '0;
    end else if (we) begin
      mem_q[waddr] <= wdata;
    end
  end

  // Read ports.
  assign raddr1   = wb_re ? wb_ra : u1_ra;
  assign data0_o  = mem_q[u0_ra];
  assign valid0_o = u0_re;
  assign data1_o  = mem_q[raddr1];
  assign valid1_o = wb_re | u1_re;

  // Port-sharing rules of the configured schedule.
  a_one_writer : assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0({acc_we, init0_we, init1_we}))
    else $error("pond: two write sources in one cycle");
  a_one_reader1 : assert property (@(posedge clk) disable iff (!rst_n)
      !(wb_re && u1_re))
    else $error("pond: write-back and update1 both read port 1");

endmodule
