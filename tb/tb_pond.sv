// tb_pond: end-to-end self-checking test of the 2R/1W pond.
//
// Phases, each checked against a reference copy of the 32 words:
//   1. init0 loads 32 random words (start with the first valid, one word
//      per valid, random valid gaps).
//   2. Three read-modify-write passes: update0 reads all 32 words in a
//      two-level pattern (8 x 4, strides 1 and 8); the testbench acts as the
//      ALU with a pipeline of acc_delay cycles (1..4) and returns read value
//      + inc, which the accumulation path writes back at the address read
//      acc_delay cycles earlier. Random stall cycles are inserted. Checks
//      every read value, one read per enabled cycle, and the final contents.
//   3. update1 reads all words with cycle stride 2 (one read every other
//      cycle) on port 1.
//   4. write-back streams all 32 words out of port 1 on consecutive cycles,
//      starting one cycle after wb start, valid generated internally.
//   5. init1 as pond 1 of a 2-way multicast with block factor 4 keeps
//      blocks 1, 3, 5, 7 of a 32-word stream at offset 16; write-back checks
//      the kept words and that words 0..15 were untouched.
// Counts the mechanisms exercised (RMW writes, stalls, multicast words,
// write-back words); any of them at zero is a failure.
`timescale 1ns/1ps
module tb_pond;
  import cgra_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  pond_cfg_t cfg;
  word_t data_in = '0, alu_in = '0, d0, d1;
  logic i0s = 0, i0v = 0, i1s = 0, i1v = 0, wbs = 0, u0s = 0, u1s = 0, v0, v1;
  int checks = 0, failures = 0;
  int n_rmw = 0, n_stall = 0, n_mc = 0, n_wb = 0;
  word_t model [32];

  pond dut (.clk, .rst_n, .en_i(en), .cfg_i(cfg), .data_i(data_in), .alu_i(alu_in),
    .init0_start_i(i0s), .init0_valid_i(i0v), .init1_start_i(i1s), .init1_valid_i(i1v),
    .wb_start_i(wbs), .update0_start_i(u0s), .update1_start_i(u1s),
    .data0_o(d0), .valid0_o(v0), .data1_o(d1), .valid1_o(v1));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  initial begin : watchdog
    #10000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog timeout"); $finish;
  end

  // write-back of all 32 words through port 1, checked against the model
  task automatic wb_check(string tag);
    @(negedge clk);
    cfg.wb = '{range: '0, offset: '0, index: '0, block_factor: '0, cyclic_factor: 9'd1};
    en = 1; wbs = 1;
    @(negedge clk); wbs = 0;
    for (int n = 0; n < 32; n++) begin
      #1;
      check(v1, $sformatf("%s wb valid on consecutive cycle %0d", tag, n));
      check(d1 == model[n], $sformatf("%s wb word %0d: %h exp %h", tag, n, d1, model[n]));
      if (v1) n_wb++;
      @(negedge clk);
    end
    #1 check(!v1, $sformatf("%s wb stops after range", tag));
  endtask

  initial begin
    cfg = '0;
    #12 rst_n = 1;
    // ---------------------------------------------------------- 1. init0
    @(negedge clk);
    cfg.init0 = '{offset: '0, index: '0, block_factor: '0, cyclic_factor: 9'd1};
    for (int n = 0; n < 32; ) begin
      i0s = (n == 0);
      i0v = (n == 0) || ($urandom_range(0, 3) != 0);
      data_in = word_t'($urandom);
      if (i0v) begin model[n] = data_in; n++; end
      @(negedge clk);
    end
    i0s = 0; i0v = 0;
    wb_check("init0");
    // --------------------------------------------------------- 2. RMW
    for (int pass = 0; pass < 3; pass++) begin
      int d, n, post;
      word_t inc;
      word_t rq [$];
      d   = $urandom_range(1, 4);
      inc = word_t'($urandom_range(1, 1000));
      cfg.update0 = '{range: '{5'd4, 5'd8}, offset: '0, stride: '{5'd8, 5'd1},
                      cycle_stride: 8'd1};
      cfg.update_acc_en    = 1'b1;
      cfg.update_acc_delay = 3'(d);
      @(negedge clk);
      en = 1; u0s = 1;
      @(negedge clk); u0s = 0;
      n = 0; post = 0;
      for (int c = 0; c < 400 && post <= d; c++) begin
        en = ($urandom_range(0, 4) != 0);
        // testbench ALU: result of the read d enabled cycles ago, plus inc
        alu_in = (rq.size() >= d) ? rq[rq.size() - d] + inc : '0;
        #1;
        if (en) begin
          check(v0 == (n < 32), $sformatf("RMW read every enabled cycle n=%0d", n));
          if (v0) begin
            check(d0 == model[n], $sformatf("RMW read %0d: %h exp %h", n, d0, model[n]));
            n++;
          end
          rq.push_back(d0);
          if (n == 32) post++;
          if (dut.acc_we) n_rmw++;
        end else begin
          check(!v0, "no read while stalled");
          n_stall++;
        end
        @(negedge clk);
      end
      for (int i = 0; i < 32; i++) model[i] = model[i] + inc;
      cfg.update_acc_en = 1'b0;
      wb_check($sformatf("RMW pass %0d", pass));
    end
    // ----------------------------------------------------- 3. update1
    @(negedge clk);
    cfg.update1 = '{range: '{5'd1, 5'd0}, offset: '0, stride: '{5'd0, 5'd1},
                    cycle_stride: 8'd2};
    en = 1; u1s = 1;
    @(negedge clk); u1s = 0;
    for (int c = 0; c < 64; c++) begin
      #1;
      check(v1 == (c % 2 == 0), $sformatf("update1 rate: cycle %0d", c));
      if (v1) check(d1 == model[c / 2], $sformatf("update1 word %0d", c / 2));
      @(negedge clk);
    end
    #1 check(!v1, "update1 done");
    // -------------------------------------------- 4. write-back timing
    wb_check("wb");
    // ------------------------------------------- 5. multicast via init1
    @(negedge clk);
    cfg.init1 = '{offset: 5'd16, index: 9'd1, block_factor: 5'd4, cyclic_factor: 9'd2};
    for (int n = 0, kept = 0; n < 32; ) begin
      i1s = (n == 0);
      i1v = 1;
      data_in = word_t'($urandom);
      #1;
      check(dut.init1_we == ((n / 4) % 2 == 1), $sformatf("multicast capture word %0d", n));
      if ((n / 4) % 2 == 1) begin model[16 + kept] = data_in; kept++; n_mc++; end
      n++;
      @(negedge clk);
    end
    i1s = 0; i1v = 0;
    wb_check("multicast");
    // ----------------------------------------------------------- summary
    check(n_rmw == 96, $sformatf("RMW writes %0d", n_rmw));
    check(n_stall > 0 && n_mc == 16 && n_wb > 0, "mechanisms exercised");
    $display("rmw=%0d stall=%0d multicast=%0d wb=%0d", n_rmw, n_stall, n_mc, n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
