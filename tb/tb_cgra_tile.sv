// tb_cgra_tile: self-checking test of a PE tile and a MEM tile as power
// domains, following the power-domain test list of the source design.
//
// The PE tile (id 0x0000) sits above the MEM tile (id 0x0001) in a column:
// the configuration bus, reset, stall and read-back chain of the MEM tile
// pass through the PE tile's always-on domain. The clock runs at 750 MHz.
// Tests:
//   reset:          both tiles powered on, outputs 0;
//   config/readback: switched-domain words written and read back through the
//                   read chain;
//   routing + PE:   ALU operands from the west tracks through the CBs, the
//                   sum leaves east one cycle later; a north-south
//                   pass-through track;
//   stall:          outputs hold while stall is high;
//   power off:      ps_en_reg = 1 drops the supply within a cycle, outputs
//                   float (stand-in pattern), switched read-back is isolated
//                   to 0, ps_en_reg reads back 1, writes are ignored, the MEM
//                   tile below still receives configuration (global signal
//                   feed-through);
//   power on:       supply back after 9 ns = 7 cycles (PE) and 17.5 ns =
//                   14 cycles (MEM), configuration lost (back at its all-ones
//                   reset value), outputs reset, the
//                   tile works again after reconfiguration (on-off-on);
//   MEM tile:       write a block through its CB, read it back as a stream,
//                   first word leaves 3 cycles after rstart arrives;
//   tile id / spurious enable: writes to other ids never power a tile off.
`timescale 1ns/1ps
module tb_cgra_tile;
  import cgra_pkg::*;
  localparam logic [15:0] PE_ID = 16'h0000, MEM_ID = 16'h0001;

  logic clk = 0, rst_n = 0, stall = 0;
  cfg_bus_t cfg, cfg_mid, cfg_end;
  logic rst_mid, rst_end, stall_mid, stall_end;
  logic [31:0] rd_mid, rd_end;
  word_t [3:0][4:0] pe_din, pe_dout, mem_din, mem_dout;
  logic  [3:0][4:0] pe_bin, pe_bout, mem_bin, mem_bout;
  logic pe_on, mem_on;
  int checks = 0, failures = 0;
  int n_route = 0, n_stall = 0, n_off = 0, n_on = 0, n_iso = 0, n_mem = 0;

  cgra_tile #(.IS_MEM(1'b0)) u_pe (
    .clk, .rst_n_i(rst_n), .rst_n_o(rst_mid), .stall_i(stall), .stall_o(stall_mid),
    .cfg_i(cfg), .cfg_o(cfg_mid), .rd_chain_i(32'h0), .rd_chain_o(rd_mid),
    .tile_id_i(PE_ID), .data_i(pe_din), .data_o(pe_dout), .bit_i(pe_bin),
    .bit_o(pe_bout), .pwr_on_o(pe_on));

  cgra_tile #(.IS_MEM(1'b1)) u_mem (
    .clk, .rst_n_i(rst_mid), .rst_n_o(rst_end), .stall_i(stall_mid), .stall_o(stall_end),
    .cfg_i(cfg_mid), .cfg_o(cfg_end), .rd_chain_i(rd_mid), .rd_chain_o(rd_end),
    .tile_id_i(MEM_ID), .data_i(mem_din), .data_o(mem_dout), .bit_i(mem_bin),
    .bit_o(mem_bout), .pwr_on_o(mem_on));

  always #0.667 clk = ~clk;   // 750 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  initial begin : watchdog
    #2000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog timeout"); $finish;
  end

  task automatic cfg_write(logic [15:0] id, int r, logic [31:0] d);
    @(negedge clk);
    cfg = '{addr: {8'h00, 8'(r), id}, data: d, write: 1'b1, read: 1'b0};
    @(negedge clk);
    cfg = '0;
  endtask

  task automatic cfg_read(logic [15:0] id, int r, output logic [31:0] d);
    @(negedge clk);
    cfg = '{addr: {8'h00, 8'(r), id}, data: '0, write: 1'b0, read: 1'b1};
    #0.1 d = rd_end;
    @(negedge clk);
    cfg = '0;
  endtask

  task automatic write_tile(logic [15:0] id, tile_cfg_t tc);
    logic [NUM_CFG_WORDS*32-1:0] flat;
    flat = '0;
    flat[$bits(tile_cfg_t)-1:0] = tc;
    for (int i = 0; i < NUM_CFG_WORDS; i++) cfg_write(id, i + 1, flat[i*32 +: 32]);
  endtask

  function automatic tile_cfg_t pe_add_cfg();
    tile_cfg_t tc;
    tc = '0;
    tc.route.cb16[0] = cb_sel_t'(SIDE_W * NUM_TRACKS + 0);
    tc.route.cb16[1] = cb_sel_t'(SIDE_W * NUM_TRACKS + 1);
    tc.route.cb16[2] = cb_sel_t'(22);                   // constant 0
    tc.route.sb16[SIDE_E][0] = sb_sel_t'(3);            // core 0: ALU
    tc.route.sb16[SIDE_N][0] = sb_sel_t'(1);            // from south
    tc.core[$bits(pe_cfg_t)-1:0] = OP_ADD;
    return tc;
  endfunction

  function automatic tile_cfg_t mem_cfg_stream();
    tile_cfg_t tc;
    mem_cfg_t  mc;
    tc = '0; mc = '0;
    tc.route.cb16[0] = cb_sel_t'(SIDE_W * NUM_TRACKS + 0);   // write data
    tc.route.cb1[0]  = cb_sel_t'(SIDE_W * NUM_TRACKS + 0);   // write valid
    tc.route.cb1[1]  = cb_sel_t'(SIDE_W * NUM_TRACKS + 1);   // write start
    tc.route.cb1[2]  = cb_sel_t'(SIDE_W * NUM_TRACKS + 2);   // read start
    tc.route.sb16[SIDE_E][0] = sb_sel_t'(3);                 // read data
    tc.route.sb1[SIDE_E][0]  = sb_sel_t'(3);                 // read valid
    tc.route.sb1[SIDE_E][1]  = sb_sel_t'(4);                 // block start
    mc.wr_offset = 11'd100; mc.rd_offset = 11'd100;
    mc.rd_range  = '{11'd1, 11'd1, 11'd8};
    mc.rd_stride = '{11'd0, 11'd0, 11'd1};
    mc.start_level = 2'd3;
    tc.core[$bits(mem_cfg_t)-1:0] = mc;
    return tc;
  endfunction

  task automatic pe_compute(int n, string tag);
    for (int it = 0; it < n; it++) begin
      word_t a, b, s;
      @(negedge clk);
      a = word_t'($urandom); b = word_t'($urandom); s = word_t'($urandom);
      pe_din[SIDE_W][0] = a; pe_din[SIDE_W][1] = b; pe_din[SIDE_S][0] = s;
      @(negedge clk);
      check(pe_dout[SIDE_E][0] == word_t'(a + b), $sformatf("%s ALU add on east track", tag));
      check(pe_dout[SIDE_N][0] == s, $sformatf("%s south-north route", tag));
      n_route++;
    end
  endtask


  // time from the writing clock edge until the supply is good
  task automatic wait_on(bit mem, output real ns);
    realtime t0;
    t0 = $realtime - 0.667;
    while (!(mem ? mem_on : pe_on) && $realtime - t0 < 100.0) #0.05;
    ns = $realtime - t0;
  endtask

  initial begin
    real wake_ns;
    logic [31:0] d;
    tile_cfg_t tc;
    int cyc;
    cfg = '0; pe_din = '0; pe_bin = '0; mem_din = '0; mem_bin = '0;
    #5 rst_n = 1;
    // --------------------------------------------------------------- reset
    #20;
    check(pe_on && mem_on, "reset test: both tiles on");
    check(pe_dout == '0 && mem_dout == '0, "reset test: outputs 0");
    // ------------------------------------------- configuration + read-back
    tc = pe_add_cfg();
    write_tile(PE_ID, tc);
    begin
      logic [NUM_CFG_WORDS*32-1:0] flat;
      flat = '0; flat[$bits(tile_cfg_t)-1:0] = tc;
      for (int i = 0; i < 8; i++) begin
        cfg_read(PE_ID, i + 1, d);
        check(d == flat[i*32 +: 32], $sformatf("read-back word %0d: %h", i, d));
      end
    end
    cfg_read(PE_ID, 0, d);
    check(d == 32'h0, "ps_en_reg reads 0 while on");
    // ----------------------------------------------------- routing and PE
    pe_compute(40, "on");
    // --------------------------------------------------------------- stall
    @(negedge clk);
    begin
      word_t held;
      held = pe_dout[SIDE_E][0];
      stall = 1;
      pe_din[SIDE_W][0] = pe_din[SIDE_W][0] + 1;
      repeat (3) begin
        @(negedge clk);
        check(pe_dout[SIDE_E][0] == held, "output holds while stalled");
        n_stall++;
      end
      stall = 0;
      @(negedge clk);
      check(pe_dout[SIDE_E][0] == word_t'(pe_din[SIDE_W][0] + pe_din[SIDE_W][1]),
            "resumes after stall");
    end
    // ----------------------------------------------------------- power off
    cfg_write(PE_ID, 0, 32'h1);
    check(!pe_on, "power switch disable: supply lost within a cycle");
    check(mem_on, "MEM tile unaffected");
    n_off++;
    check(pe_dout != '0, "outputs float while off");
    cfg_read(PE_ID, 1, d);
    check(d == 32'h0, "switched read-back isolated while off");
    n_iso++;
    cfg_read(PE_ID, 0, d);
    check(d == 32'h1, "ps_en_reg reads 1 while off");
    cfg_write(PE_ID, 1, 32'hFFFF_FFFF);      // must be ignored
    // global signals still reach the tile below
    tc = mem_cfg_stream();
    write_tile(MEM_ID, tc);
    cfg_read(MEM_ID, 1, d);
    check(d == tc[31:0], "global signal test: MEM tile configured through an off PE tile");
    // ------------------------------------------------------------ power on
    cfg_write(PE_ID, 0, 32'h0);
    // cfg_write returns half a cycle after the clock edge that wrote
    wait_on(1'b0, wake_ns);
    cyc = int'($ceil(wake_ns / 1.334));
    check(wake_ns > 8.9 && wake_ns < 9.1, $sformatf("PE wake-up 9 ns, got %0.2f", wake_ns));
    check(cyc == 7, $sformatf("PE wake-up = 7 cycles at 750 MHz, got %0d", cyc));
    check(pe_dout == '0, "outputs reset at power-up");
    n_on++;
    @(negedge clk);
    cfg_read(PE_ID, 1, d);
    check(d == 32'hFFFF_FFFF, "configuration lost after power cycle (all-ones reset value)");
    write_tile(PE_ID, pe_add_cfg());
    pe_compute(20, "on-off-on");
    // ------------------------------------------------------------ MEM tile
    @(negedge clk);
    for (int k = 0; k < 8; k++) begin
      mem_din[SIDE_W][0] = word_t'(16'h1000 + k * 7);
      mem_bin[SIDE_W][0] = 1'b1;
      mem_bin[SIDE_W][1] = (k == 0);
      @(negedge clk);
    end
    mem_bin = '0;
    @(negedge clk);
    mem_bin[SIDE_W][2] = 1'b1;      // read start
    @(negedge clk);
    mem_bin[SIDE_W][2] = 1'b0;
    cyc = 1;
    while (!mem_bout[SIDE_E][0] && cyc < 20) begin @(negedge clk); cyc++; end
    check(cyc == 3, $sformatf("MEM first word 3 cycles after rstart, got %0d", cyc));
    check(mem_bout[SIDE_E][1], "MEM block start with first word");
    for (int k = 0; k < 8; k++) begin
      check(mem_bout[SIDE_E][0], "MEM read valid");
      check(mem_dout[SIDE_E][0] == word_t'(16'h1000 + k * 7), $sformatf("MEM word %0d", k));
      n_mem++;
      @(negedge clk);
    end
    check(!mem_bout[SIDE_E][0], "MEM stream ends");
    // MEM tile power cycle
    cfg_write(MEM_ID, 0, 32'h1);
    check(!mem_on && pe_on, "MEM off, PE on");
    n_off++;
    cfg_write(MEM_ID, 0, 32'h0);
    wait_on(1'b1, wake_ns);
    cyc = int'($ceil(wake_ns / 1.334));
    check(wake_ns > 17.4 && wake_ns < 17.6, $sformatf("MEM wake-up 17.5 ns, got %0.2f", wake_ns));
    check(cyc == 14, $sformatf("MEM wake-up = 14 cycles at 750 MHz, got %0d", cyc));
    n_on++;
    // ------------------------------------------ spurious tile enable test
    for (int k = 0; k < 50; k++) begin
      logic [15:0] other;
      other = 16'($urandom);
      if (other == PE_ID || other == MEM_ID) continue;
      cfg_write(other, 0, 32'h1);
    end
    check(pe_on && mem_on, "writes to other tile ids never turn a tile off");
    pe_compute(5, "after spurious writes");
    // ------------------------------------------------------------- summary
    check(n_route > 0 && n_stall > 0 && n_off == 2 && n_on == 2 && n_iso > 0 && n_mem == 8,
          "mechanisms exercised");
    $display("route=%0d stall=%0d off=%0d on=%0d iso=%0d mem=%0d",
             n_route, n_stall, n_off, n_on, n_iso, n_mem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
