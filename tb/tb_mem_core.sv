// tb_mem_core: self-checking test of the MEM tile core.
//
// Writes random words with wvalid (random gaps, wstart with the first word)
// at a random write offset, then runs read passes with random three-level
// patterns (ranges, strides, offset) and every start_level. A reference model
// predicts each word's address, data and start flag; data is compared only
// at addresses written so far, since the SRAM contents start undefined. Checks: the first word
// leaves exactly two cycles after rstart and then one word per cycle, rvalid
// covers exactly range0*range1*range2 words, rstart marks the block starts of
// the chosen level, and a stalled cycle freezes the output.
`timescale 1ns/1ps
module tb_mem_core;
  import cgra_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, wv = 0, ws = 0, rs = 0, rv, rso;
  mem_cfg_t cfg;
  word_t wd = '0, rd;
  word_t model [MEM_DEPTH];
  bit    known [MEM_DEPTH];  // address written since the start (SRAM has no reset)
  int checks = 0, failures = 0, words = 0, stalls = 0;

  mem_core dut (.clk, .rst_n, .en_i(en), .cfg_i(cfg), .wdata_i(wd), .wvalid_i(wv),
                .wstart_i(ws), .rstart_i(rs), .rdata_o(rd), .rvalid_o(rv), .rstart_o(rso));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  initial begin : watchdog
    #20000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog timeout"); $finish;
  end

  initial begin
    cfg = '0;
    for (int i = 0; i < MEM_DEPTH; i++) begin model[i] = '0; known[i] = 1'b0; end
    #12 rst_n = 1;
    for (int trial = 0; trial < 12; trial++) begin
      int nw, r [3], s [3], total, n;
      // ------------------------------------------------------------ write
      @(negedge clk);
      cfg.wr_offset = mem_addr_t'($urandom);
      nw = $urandom_range(50, 600);
      for (int k = 0; k < nw; ) begin
        ws = (k == 0);
        wv = (k == 0) || ($urandom_range(0, 3) != 0);
        wd = word_t'($urandom);
        if (wv) begin
          model[mem_addr_t'(int'(cfg.wr_offset) + k)] = wd;
          known[mem_addr_t'(int'(cfg.wr_offset) + k)] = 1'b1;
          k++;
        end
        @(negedge clk);
      end
      ws = 0; wv = 0;
      // ------------------------------------------------------------- read
      for (int l = 0; l < 3; l++) begin
        r[l] = $urandom_range(1, 6);
        s[l] = $urandom_range(0, 2047);
        cfg.rd_range[l]  = mem_addr_t'(r[l]);
        cfg.rd_stride[l] = mem_addr_t'(s[l]);
      end
      cfg.rd_offset   = mem_addr_t'($urandom);
      cfg.start_level = 2'(trial % 4);
      total = r[0] * r[1] * r[2];
      rs = 1;
      @(negedge clk); rs = 0;
      #1 check(!rv, "no data one cycle after rstart");
      @(negedge clk);
      n = 0;
      for (int c = 0; c < total + 6; c++) begin
        int i0, i1, i2;
        mem_addr_t a;
        bit st;
        i0 = n % r[0]; i1 = (n / r[0]) % r[1]; i2 = n / (r[0] * r[1]);
        a = mem_addr_t'(int'(cfg.rd_offset) + i0 * s[0] + i1 * s[1] + i2 * s[2]);
        unique case (cfg.start_level)
          2'd0: st = 1;
          2'd1: st = (i0 == 0);
          2'd2: st = (i0 == 0) && (i1 == 0);
          default: st = (n == 0);
        endcase
        #1;
        check(rv == (n < total), $sformatf("rvalid word %0d of %0d", n, total));
        if (rv && n < total) begin
          if (known[a]) check(rd == model[a], $sformatf("rdata word %0d addr %0d: %h exp %h", n, a, rd, model[a]));
          check(rso == st, $sformatf("rstart word %0d level %0d", n, cfg.start_level));
          words++;
        end
        // one stall cycle in the middle of the pass: output must hold
        if (n == total / 2 && trial % 2 == 0 && c == n) begin
          word_t hold_d;
          hold_d = rd;
          en = 0;
          @(negedge clk); #1;
          check(rd == hold_d && rv == (n < total), "hold while stalled");
          stalls++;
          en = 1;
        end
        if (rv) n++;
        @(negedge clk);
      end
    end
    check(words > 0 && stalls > 0, "mechanisms exercised");
    $display("words=%0d stalls=%0d", words, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
