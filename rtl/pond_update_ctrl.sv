// pond_update_ctrl: update (computation read) controller of a pond.
//
// Generates the two-level affine read pattern
//     for j in range(range[1]):
//       for i in range(range[0]):
//         addr = offset + j*stride[1] + i*stride[0]
// once per update_start pulse, issuing one read every cycle_stride cycles.
// The iteration domain (the i, j loop counters), the address generator and
// the schedule are kept apart as in the source design, and the
// multiplications are turned into running sums so that each level needs
// only an adder: the inner address adds stride[0] per step and the row base
// adds stride[1] per outer step. The start pulse replaces a long
// cycle-counting schedule generator; only the small cycle-stride counter is
// left. Addresses wrap modulo the pond size, so a stride of DEPTH-k steps
// backwards by k.
//
// Timing: the first read is issued in the cycle after update_start, the
// next ones every cycle_stride cycles (0 is treated as 1). re_o/raddr_o
// come from registers. A start during a running pass restarts it. range 0
// stands for POND_DEPTH.
`timescale 1ns/1ps
module pond_update_ctrl
  import cgra_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en_i,
  input  pond_update_cfg_t cfg_i,
  input  logic             start_i,
  output logic             re_o,
  output pond_addr_t       raddr_o,
  output logic             busy_o
);

  logic                  active_q;
  pond_addr_t            i_q, j_q;        // iteration domain
  pond_addr_t            addr_q, base_q;  // address generator
  logic [POND_CYC_W-1:0] cyc_q;           // schedule: cycles since last read

  logic                  fire, last_i, last_j;
  logic [POND_CYC_W-1:0] cyc_last;

  assign cyc_last = (cfg_i.cycle_stride == '0) ? '0 : cfg_i.cycle_stride - 1'b1;
  assign fire     = active_q && (cyc_q == '0);
  assign last_i   = (i_q == cfg_i.range[0] - pond_addr_t'(1));
  assign last_j   = (j_q == cfg_i.range[1] - pond_addr_t'(1));

  assign re_o    = fire && en_i;
  assign raddr_o = addr_q;
  assign busy_o  = active_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      i_q      <= '0;
      j_q      <= '0;
      addr_q   <= '0;
      base_q   <= '0;
      cyc_q    <= '0;
    end else if (en_i) begin
      if (start_i) begin
        active_q <= 1'b1;
        i_q      <= '0;
        j_q      <= '0;
        addr_q   <= cfg_i.offset;
        base_q   <= cfg_i.offset;
        cyc_q    <= '0;
      end else if (active_q) begin
        cyc_q <= (cyc_q == cyc_last) ? '0 : cyc_q + 1'b1;
        if (fire) begin
          if (!last_i) begin
            i_q    <= i_q + 1'b1;
            addr_q <= addr_q + cfg_i.stride[0];
          end else begin
            i_q <= '0;
            if (last_j) begin
              active_q <= 1'b0;
            end else begin
              j_q    <= j_q + 1'b1;
              base_q <= base_q + cfg_i.stride[1];
              addr_q <= base_q + cfg_i.stride[1];
            end
          end
        end
      end
    end
  end

endmodule
