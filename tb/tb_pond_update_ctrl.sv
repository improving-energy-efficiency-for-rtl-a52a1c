// tb_pond_update_ctrl: self-checking test of the pond update controller.
//
// For random two-level affine configurations (ranges 1..8 or 0 = 32,
// strides, offset, cycle stride 0..4) and random stall cycles, a reference
// model predicts the read schedule: the first read exactly one enabled cycle
// after start, then one read every cycle_stride enabled cycles, read number
// n at address offset + (n % range0)*stride0 + (n / range0)*stride1
// (modulo 32), range0*range1 reads in total. Checks every cycle's re_o and
// raddr_o, the read count, the read rate and busy_o; also checks a restart
// in the middle of a pass.
`timescale 1ns/1ps
module tb_pond_update_ctrl;
  import cgra_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, start = 0;
  pond_update_cfg_t cfg;
  logic re, busy;
  pond_addr_t ra;
  int checks = 0, failures = 0, reads = 0, stalls = 0, restarts = 0;

  pond_update_ctrl dut (.clk, .rst_n, .en_i(en), .cfg_i(cfg), .start_i(start),
                        .re_o(re), .raddr_o(ra), .busy_o(busy));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  initial begin : watchdog
    #50000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog timeout"); $finish;
  end

  initial begin
    int r0, r1, cs, total, n, m, stop_at;
    cfg = '0;
    #12 rst_n = 1;
    for (int trial = 0; trial < 80; trial++) begin
      cfg.range[0]     = ($urandom_range(0, 6) == 0) ? '0 : pond_addr_t'($urandom_range(1, 8));
      cfg.range[1]     = pond_addr_t'($urandom_range(1, 6));
      cfg.stride[0]    = pond_addr_t'($urandom);
      cfg.stride[1]    = pond_addr_t'($urandom);
      cfg.offset       = pond_addr_t'($urandom);
      cfg.cycle_stride = POND_CYC_W'($urandom_range(0, 4));
      r0 = (cfg.range[0] == 0) ? 32 : int'(cfg.range[0]);
      r1 = int'(cfg.range[1]);
      cs = (cfg.cycle_stride == 0) ? 1 : int'(cfg.cycle_stride);
      total = r0 * r1;
      // occasionally cut the pass short with a restart
      stop_at = ($urandom_range(0, 4) == 0 && total > 1) ? $urandom_range(1, total - 1) : total + 1;
      @(negedge clk); en = 1; start = 1;
      @(negedge clk); start = 0;
      for (int rep = 0; rep < 2; rep++) begin
        n = 0; m = 0;
        while (1) begin
          bit exp_re;
          if (rep == 0 && n == stop_at) begin
            en = 1; start = 1; restarts++;
            @(negedge clk); start = 0;
            break;
          end
          en = ($urandom_range(0, 5) != 0);
          #1;
          exp_re = en && (n < total) && (m % cs == 0);
          check(re == exp_re, $sformatf("re n=%0d m=%0d cs=%0d", n, m, cs));
          if (exp_re)
            check(ra == pond_addr_t'(int'(cfg.offset) + (n % r0) * int'(cfg.stride[0])
                                     + (n / r0) * int'(cfg.stride[1])),
                  $sformatf("raddr n=%0d", n));
          if (en) begin
            if (re) begin n++; reads++; end
            m++;
          end else stalls++;
          if (n == total) begin
            @(negedge clk); #1;
            check(!busy && !re, "idle after the last read");
            break;
          end
          @(negedge clk);
        end
        if (stop_at > total) break;
      end
    end
    check(reads > 0 && stalls > 0 && restarts > 0, "mechanisms exercised");
    $display("reads=%0d stalls=%0d restarts=%0d", reads, stalls, restarts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
