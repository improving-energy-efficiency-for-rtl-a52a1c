// tb_pond_wb_ctrl: self-checking test of the pond write-back controller.
//
// Up to four controllers (index 0..3) share one start pulse, as ponds whose
// results leave on one shared track would. A cycle-accurate reference model
// predicts, for every enabled cycle after start, whose turn it is (slots of
// block_factor cycles, round-robin over cyclic_factor ponds) and which
// address that pond reads (offset + words sent). Checks: valid is generated
// internally with no input valid; the first word of pond 0 appears exactly
// one cycle after start; at most one pond is valid per cycle; every pond
// sends exactly range words (0 = 32) at consecutive addresses; stalls
// freeze the schedule; busy falls after the last word.
`timescale 1ns/1ps
module tb_pond_wb_ctrl;
  import cgra_pkg::*;
  localparam int P = 4;
  logic clk = 0, rst_n = 0, en = 1, start = 0;
  pond_wb_cfg_t cfg [P];
  logic       v [P], busy [P];
  pond_addr_t ra [P];
  int checks = 0, failures = 0, words = 0, stalls = 0;

  for (genvar i = 0; i < P; i++) begin : g_dut
    pond_wb_ctrl dut (.clk, .rst_n, .en_i(en), .cfg_i(cfg[i]), .start_i(start),
                      .valid_o(v[i]), .raddr_o(ra[i]), .busy_o(busy[i]));
  end

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
    int bf, cyc, rng, np, m, sent [P], nv;
    for (int i = 0; i < P; i++) cfg[i] = '0;
    #12 rst_n = 1;
    for (int trial = 0; trial < 60; trial++) begin
      bf  = $urandom_range(1, 6);
      cyc = $urandom_range(1, 4);
      rng = ($urandom_range(0, 4) == 0) ? 0 : $urandom_range(1, 20);
      for (int i = 0; i < P; i++) begin
        cfg[i].range         = pond_addr_t'(rng);
        cfg[i].offset        = pond_addr_t'($urandom);
        cfg[i].index         = POND_IDX_W'(i);
        cfg[i].block_factor  = pond_addr_t'(bf);
        cfg[i].cyclic_factor = POND_IDX_W'(cyc);
        sent[i] = 0;
      end
      if (rng == 0) rng = 32;
      @(negedge clk); en = 1; start = 1;
      @(negedge clk); start = 0;
      m = 0;
      for (int c = 0; c < rng * cyc * 2 + cyc * bf * 2 + 10; c++) begin
        int turn;
        en = ($urandom_range(0, 7) != 0);
        #1;
        turn = (m / bf) % cyc;
        nv = 0;
        for (int i = 0; i < P; i++) begin
          bit exp_v;
          exp_v = en && (i < cyc) && (turn == i) && (sent[i] < rng);
          check(v[i] == exp_v, $sformatf("valid[%0d] m=%0d", i, m));
          if (v[i]) begin
            nv++;
            check(ra[i] == pond_addr_t'(int'(cfg[i].offset) + sent[i]), "raddr");
          end
          if (c == 0) check(v[i] == (en && i == 0), "first word one cycle after start");
        end
        check(nv <= 1, "one pond per cycle");
        if (en) begin
          for (int i = 0; i < P; i++) if (v[i]) begin sent[i]++; words++; end
          m++;
        end else stalls++;
        @(negedge clk);
      end
      for (int i = 0; i < P; i++) begin
        check(sent[i] == ((i < cyc) ? rng : 0), $sformatf("pond %0d sent %0d of %0d", i, sent[i], rng));
        if (i < cyc) check(!busy[i], "busy cleared after last word");
      end
    end
    check(words > 0 && stalls > 0, "mechanisms exercised");
    $display("words=%0d stalls=%0d", words, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
