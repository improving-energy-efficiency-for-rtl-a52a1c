// pond_acc_delay: variable delay block for the pond's read-modify-write.
//
// For output accumulation the pond reads a partial sum, the ALU adds to it,
// and the result is written back to the same address some cycles later.
// Reading and updating use the same address pattern, so instead of a second
// update controller the read stream (enable and address) of update
// controller 0 is delayed by update_acc_delay cycles and reused as the
// write stream. Delay 0 writes in the same cycle as the read (combinational
// ALU); delays 1..7 use a shift register. With acc_en low no write is
// produced. This sharing of one controller plus a delay follows the source
// design, which programs delays 0 to 4 in a 3-bit field; this block accepts
// the full 3-bit range.
//
// Timing: we_o/waddr_o equal re_i/raddr_i delayed by delay_i cycles. The
// shift register holds while en_i is low, so a stall stretches both sides
// alike.
`timescale 1ns/1ps
module pond_acc_delay
  import cgra_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en_i,
  input  logic                  acc_en_i,
  input  logic [POND_DLY_W-1:0] delay_i,
  input  logic                  re_i,
  input  pond_addr_t            raddr_i,
  output logic                  we_o,
  output pond_addr_t            waddr_o
);

  logic       [POND_MAX_DELAY:1] v_q;
  pond_addr_t [POND_MAX_DELAY:1] a_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
      a_q <= '0;
    end else if (en_i) begin
      v_q[1] <= re_i && acc_en_i;
      a_q[1] <= raddr_i;
      for (int k = 2; k <= POND_MAX_DELAY; k++) begin
        v_q[k] <= v_q[k-1];
        a_q[k] <= a_q[k-1];
      end
    end
  end

  always_comb begin
    if (delay_i == '0) begin
      we_o    = re_i && acc_en_i;
      waddr_o = raddr_i;
    end else begin
      we_o    = v_q[delay_i];
      waddr_o = a_q[delay_i];
    end
    we_o = we_o && en_i;
  end

endmodule
