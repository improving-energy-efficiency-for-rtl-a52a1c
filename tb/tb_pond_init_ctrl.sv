// tb_pond_init_ctrl: self-checking test of the pond initialization
// controller, including multicast.
//
// Four controllers with index 0..3 watch one shared valid stream, as four
// ponds on a multicast route would. For random configurations (block factor
// 1..8 or 0 = 32, cyclic factor 0..4, per-pond offset) and random valid gaps
// and stall cycles, a reference model predicts for every accepted word which
// pond captures it (block number modulo the cyclic factor) and at which
// address (offset plus the number of words that pond has kept). Checks every
// cycle's write enables and addresses, that each word is captured by exactly
// one pond when the cyclic factor is 1..4, the same-cycle start/valid case,
// and that nothing is written before the first start or while stalled.
`timescale 1ns/1ps
module tb_pond_init_ctrl;
  import cgra_pkg::*;
  localparam int P = 4;
  logic clk = 0, rst_n = 0, en = 1, start = 0, valid = 0;
  pond_init_cfg_t cfg [P];
  logic       we [P];
  pond_addr_t wa [P];
  int checks = 0, failures = 0, writes = 0, stalls = 0, multicast_words = 0;

  for (genvar i = 0; i < P; i++) begin : g_dut
    pond_init_ctrl dut (.clk, .rst_n, .en_i(en), .cfg_i(cfg[i]), .start_i(start),
                        .valid_i(valid), .we_o(we[i]), .waddr_o(wa[i]));
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  initial begin : watchdog
    #5000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog timeout"); $finish;
  end

  initial begin
    int bf, cyc, k, kept [P], nwords;
    bit started;
    for (int i = 0; i < P; i++) cfg[i] = '0;
    #12 rst_n = 1;
    // nothing happens before the first start
    repeat (5) begin
      @(negedge clk); valid = 1; #1;
      for (int i = 0; i < P; i++) check(!we[i], "no write before first start");
    end
    valid = 0;
    for (int trial = 0; trial < 60; trial++) begin
      bf  = ($urandom_range(0, 5) == 0) ? 0 : $urandom_range(1, 8);
      cyc = $urandom_range(0, 4);
      for (int i = 0; i < P; i++) begin
        cfg[i].offset        = pond_addr_t'($urandom);
        cfg[i].index         = POND_IDX_W'(i);
        cfg[i].block_factor  = pond_addr_t'(bf);
        cfg[i].cyclic_factor = POND_IDX_W'(cyc);
        kept[i] = 0;
      end
      nwords = $urandom_range(10, 80);
      k = 0;
      started = 0;
      while (k < nwords) begin
        int blk, turn, owners;
        @(negedge clk);
        start = !started && ($urandom_range(0, 1) == 0 || k == 0);
        valid = (start && $urandom_range(0, 1) == 0) || (started && $urandom_range(0, 2) != 0);
        en    = ($urandom_range(0, 7) != 0);
        #1;
        blk  = k / ((bf == 0) ? 32 : bf);
        turn = blk % ((cyc == 0) ? 1 : cyc);
        owners = 0;
        for (int i = 0; i < P; i++) begin
          bit exp_we;
          exp_we = en && valid && (turn == i);
          check(we[i] == exp_we, $sformatf("we[%0d] k=%0d bf=%0d cyc=%0d", i, k, bf, cyc));
          if (exp_we) begin
            check(wa[i] == pond_addr_t'(int'(cfg[i].offset) + kept[i]),
                  $sformatf("waddr[%0d] k=%0d", i, k));
          end
          if (we[i]) owners++;
        end
        if (!en) stalls++;
        if (en && start) started = 1;
        if (en && valid) begin
          check(owners == 1, "each word captured by exactly one pond");
          if (cyc > 1) multicast_words++;
          for (int i = 0; i < P; i++) if (we[i]) begin kept[i]++; writes++; end
          k++;
        end
        @(posedge clk);
      end
      @(negedge clk); start = 0; valid = 0; en = 1;
    end
    check(writes > 0 && stalls > 0 && multicast_words > 0, "mechanisms exercised");
    $display("writes=%0d stalls=%0d multicast_words=%0d", writes, stalls, multicast_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
