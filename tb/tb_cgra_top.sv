// tb_cgra_top: end-to-end self-checking test of the CGRA array (8 x 4 tiles, two MEM columns).
//
// Runs a small blocked-DNN style kernel across a MEM tile and two PE tiles
// of row 0 while every other tile of the array is powered off:
//   1. all unused tiles are switched off through their ps_en_reg (power
//      off), and the pwr_on map is checked;
//   2. the MEM tile at (3,0) is loaded with 32 words from its north edge
//      tracks and then streams them east with valid and block-start bits;
//   3. PE (4,0) forwards the stream to PE (5,0) (one cycle per hop) and both
//      ponds capture it with a 2-way multicast (block factor 4): PE (4,0)
//      keeps blocks 0, 2, 4, 6, PE (5,0) blocks 1, 3, 5, 7;
//   4. both ponds run a read-modify-write pass: update0 reads every word,
//      the ALU adds a bias taken from the north edge, the accumulation path
//      writes the sum back (acc delay 0);
//   5. a write-back streams the 16 results of each pond out of the north
//      edge; a 3-cycle fabric stall is inserted during the stream; the
//      first word leaves exactly two cycles after the write-back start;
//   6. read-back isolation: a switched register of an off tile reads 0 while
//      its ps_en_reg reads 1; a configured register of an on tile reads back;
//   7. on-off-on: PE (5,0) is switched off and on again, its configuration
//      is gone after power-up (reads its all-ones reset value), PE (4,0)
//      keeps working.
// Throughout, the working tiles sit next to floating neighbours; the results
// being exact shows the boundary multiplexers isolate them.
// Each mechanism is counted (power off, power on, isolation, multicast, RMW,
// write-back, stall, MEM stream, route hop); a count of zero is a failure.
`timescale 1ns/1ps
module tb_cgra_top;
  import cgra_pkg::*;
  localparam int COLS = 8, ROWS = 4;

  logic clk = 0, rst_n = 0, stall = 0;
  cfg_bus_t cfg;
  logic [31:0] rd;
  word_t [COLS-1:0][NUM_TRACKS-1:0] n_di, n_do, s_di, s_do;
  word_t [ROWS-1:0][NUM_TRACKS-1:0] w_di, w_do, e_di, e_do;
  logic  [COLS-1:0][NUM_TRACKS-1:0] n_bi, n_bo, s_bi, s_bo;
  logic  [ROWS-1:0][NUM_TRACKS-1:0] w_bi, w_bo, e_bi, e_bo;
  logic  [ROWS-1:0][COLS-1:0]       pwr_on;
  int checks = 0, failures = 0;
  int n_off = 0, n_on = 0, n_iso = 0, n_mc = 0, n_rmw = 0, n_wb = 0,
      n_stall = 0, n_mem = 0, n_hop = 0;

  cgra_top #(.COLS(COLS), .ROWS(ROWS)) dut (
    .clk, .rst_n, .stall_i(stall), .cfg_i(cfg), .rd_data_o(rd),
    .io_n_data_i(n_di), .io_n_data_o(n_do), .io_s_data_i(s_di), .io_s_data_o(s_do),
    .io_w_data_i(w_di), .io_w_data_o(w_do), .io_e_data_i(e_di), .io_e_data_o(e_do),
    .io_n_bit_i(n_bi), .io_n_bit_o(n_bo), .io_s_bit_i(s_bi), .io_s_bit_o(s_bo),
    .io_w_bit_i(w_bi), .io_w_bit_o(w_bo), .io_e_bit_i(e_bi), .io_e_bit_o(e_bo),
    .pwr_on_o(pwr_on));

  always #0.667 clk = ~clk;   // 750 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  initial begin : watchdog
    #5000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog timeout"); $finish;
  end

  function automatic logic [15:0] tid(int x, int y);
    return {8'(x), 8'(y)};
  endfunction

  task automatic cfg_write(logic [15:0] id, int r, logic [31:0] d);
    @(negedge clk);
    cfg = '{addr: {8'h00, 8'(r), id}, data: d, write: 1'b1, read: 1'b0};
    @(negedge clk);
    cfg = '0;
  endtask

  task automatic cfg_read(logic [15:0] id, int r, output logic [31:0] d);
    @(negedge clk);
    cfg = '{addr: {8'h00, 8'(r), id}, data: '0, write: 1'b0, read: 1'b1};
    #0.1 d = rd;
    @(negedge clk);
    cfg = '0;
  endtask

  task automatic write_tile(logic [15:0] id, tile_cfg_t tc);
    logic [NUM_CFG_WORDS*32-1:0] flat;
    flat = '0;
    flat[$bits(tile_cfg_t)-1:0] = tc;
    for (int i = 0; i < NUM_CFG_WORDS; i++) cfg_write(id, i + 1, flat[i*32 +: 32]);
  endtask

  // MEM tile (3,0): write port from north tracks, stream out east.
  function automatic tile_cfg_t mem_cfg();
    tile_cfg_t tc;
    mem_cfg_t  mc;
    tc = '0; mc = '0;
    tc.route.cb16[0] = cb_sel_t'(SIDE_N * NUM_TRACKS + 0);   // write data
    tc.route.cb1[0]  = cb_sel_t'(SIDE_N * NUM_TRACKS + 0);   // write valid
    tc.route.cb1[1]  = cb_sel_t'(SIDE_N * NUM_TRACKS + 1);   // write start
    tc.route.cb1[2]  = cb_sel_t'(SIDE_N * NUM_TRACKS + 2);   // read start
    tc.route.sb16[SIDE_E][0] = sb_sel_t'(3);                 // read data
    tc.route.sb1[SIDE_E][0]  = sb_sel_t'(3);                 // read valid
    tc.route.sb1[SIDE_E][1]  = sb_sel_t'(4);                 // block start
    mc.rd_range  = '{11'd1, 11'd1, 11'd32};
    mc.rd_stride = '{11'd0, 11'd0, 11'd1};
    mc.start_level = 2'd3;
    tc.core[$bits(mem_cfg_t)-1:0] = mc;
    return tc;
  endfunction

  // PE (x,0): pond loads its multicast share from the west, RMW with a bias
  // from north track 1, write-back out of north track 0.
  function automatic tile_cfg_t pe_cfg(int index, bit forward);
    tile_cfg_t tc;
    pond_cfg_t pc;
    tc = '0; pc = '0;
    tc.route.cb16[0] = cb_sel_t'(20);                        // pond port 0
    tc.route.cb16[1] = cb_sel_t'(SIDE_N * NUM_TRACKS + 1);   // bias
    tc.route.cb16[2] = cb_sel_t'(22);                        // zero
    tc.route.cb16[3] = cb_sel_t'(SIDE_W * NUM_TRACKS + 0);   // pond write data
    tc.route.cb1[3]  = cb_sel_t'(SIDE_W * NUM_TRACKS + 1);   // init0 start
    tc.route.cb1[4]  = cb_sel_t'(SIDE_W * NUM_TRACKS + 0);   // init0 valid
    for (int k = 0; k < 3; k++) tc.route.cb1[k] = cb_sel_t'(20);
    tc.route.cb1[5]  = cb_sel_t'(20);
    tc.route.cb1[6]  = cb_sel_t'(20);
    tc.route.cb1[7]  = cb_sel_t'(SIDE_N * NUM_TRACKS + 3);   // wb start
    tc.route.cb1[8]  = cb_sel_t'(SIDE_N * NUM_TRACKS + 2);   // update0 start
    tc.route.cb1[9]  = cb_sel_t'(20);
    tc.route.sb16[SIDE_N][0] = sb_sel_t'(5);                 // pond port 1
    tc.route.sb1[SIDE_N][0]  = sb_sel_t'(5);                 // its valid
    if (forward) begin                                       // west -> east
      tc.route.sb16[SIDE_E][0] = sb_sel_t'(1);
      tc.route.sb1[SIDE_E][0]  = sb_sel_t'(1);
      tc.route.sb1[SIDE_E][1]  = sb_sel_t'(1);
    end
    pc.init0  = '{offset: '0, index: 9'(index), block_factor: 5'd4, cyclic_factor: 9'd2};
    pc.update0 = '{range: '{5'd2, 5'd8}, offset: '0, stride: '{5'd8, 5'd1}, cycle_stride: 8'd1};
    pc.update_acc_en    = 1'b1;
    pc.update_acc_delay = 3'd0;
    pc.wb = '{range: 5'd16, offset: '0, index: '0, block_factor: '0, cyclic_factor: 9'd1};
    tc.core[$bits(pe_cfg_t)-1:0] = OP_ADD;
    tc.core[$bits(pe_cfg_t) +: $bits(pond_cfg_t)] = pc;
    return tc;
  endfunction

  `define POND(X) dut.g_col[X].g_row[0].u_tile.g_pe.u_pond

  initial begin
    word_t stream [32];
    word_t bias [2];
    word_t got [2][$];
    logic [31:0] d;
    int cyc;
    bit used;
    cfg = '0;
    n_di = '0; s_di = '0; w_di = '0; e_di = '0;
    n_bi = '0; s_bi = '0; w_bi = '0; e_bi = '0;
    #5 rst_n = 1;
    #20;
    check(&pwr_on, "reset test: every tile on after reset");
    // --------------------------------------------------- 1. power off
    for (int x = 0; x < COLS; x++)
      for (int y = 0; y < ROWS; y++) begin
        used = (y == 0) && (x >= 3 && x <= 5);
        if (!used) begin cfg_write(tid(x, y), 0, 32'h1); n_off++; end
      end
    #20;
    for (int x = 0; x < COLS; x++)
      for (int y = 0; y < ROWS; y++) begin
        used = (y == 0) && (x >= 3 && x <= 5);
        check(pwr_on[y][x] == used, $sformatf("pwr_on map (%0d,%0d)", x, y));
      end
    // ------------------------------------------------ configuration
    write_tile(tid(3, 0), mem_cfg());
    write_tile(tid(4, 0), pe_cfg(0, 1'b1));
    write_tile(tid(5, 0), pe_cfg(1, 1'b0));
    // --------------------------------------------- 2. MEM tile load
    @(negedge clk);
    for (int k = 0; k < 32; k++) begin
      stream[k] = word_t'($urandom);
      n_di[3][0] = stream[k];
      n_bi[3][0] = 1'b1;
      n_bi[3][1] = (k == 0);
      @(negedge clk);
    end
    n_bi[3] = '0;
    // ---------------------------------- 3. stream + multicast capture
    n_bi[3][2] = 1'b1;
    @(negedge clk);
    n_bi[3][2] = 1'b0;
    for (int c = 0; c < 45; c++) begin
      if (dut.g_col[3].g_row[0].u_tile.g_mem.rvalid) n_mem++;
      if (`POND(4).init0_we) n_mc++;
      if (`POND(5).init0_we) n_mc++;
      if (dut.t_bin[0][5][SIDE_W][0]) n_hop++;
      @(negedge clk);
    end
    check(n_mem == 32, $sformatf("MEM streamed %0d of 32 words", n_mem));
    check(n_mc == 32, $sformatf("multicast captured %0d of 32 words", n_mc));
    // -------------------------------------------------------- 4. RMW
    bias[0] = word_t'($urandom); bias[1] = word_t'($urandom);
    n_di[4][1] = bias[0]; n_di[5][1] = bias[1];
    n_bi[4][2] = 1'b1; n_bi[5][2] = 1'b1;
    @(negedge clk);
    n_bi[4][2] = 1'b0; n_bi[5][2] = 1'b0;
    for (int c = 0; c < 20; c++) begin
      if (`POND(4).acc_we) n_rmw++;
      if (`POND(5).acc_we) n_rmw++;
      @(negedge clk);
    end
    check(n_rmw == 32, $sformatf("RMW writes %0d of 32", n_rmw));
    // --------------------------------------------- 5. write-back + stall
    n_bi[4][3] = 1'b1; n_bi[5][3] = 1'b1;
    @(negedge clk);
    n_bi[4][3] = 1'b0; n_bi[5][3] = 1'b0;
    check(!n_bo[4][0], "write-back not out after one cycle");
    @(negedge clk);
    check(n_bo[4][0] && n_bo[5][0], "write-back first word two cycles after start");
    for (int c = 0; c < 30; c++) begin
      for (int p = 0; p < 2; p++) if (n_bo[4 + p][0]) begin got[p].push_back(n_do[4 + p][0]); n_wb++; end
      if (c == 6) begin
        // stall: the output register holds, nothing new is produced
        stall = 1;
        repeat (3) begin @(negedge clk); n_stall++; end
        stall = 0;
      end
      @(negedge clk);
    end
    for (int p = 0; p < 2; p++) begin
      check(got[p].size() == 16, $sformatf("pond %0d wrote back %0d of 16", p, got[p].size()));
      for (int i = 0; i < 16 && i < got[p].size(); i++) begin
        int k;
        k = (i / 4) * 8 + p * 4 + (i % 4);      // multicast block order
        check(got[p][i] == word_t'(stream[k] + bias[p]),
              $sformatf("result pond %0d word %0d: %h exp %h", p, i, got[p][i], stream[k] + bias[p]));
      end
    end
    // ------------------------------------------- 6. read-back isolation
    cfg_read(tid(4, 1), 1, d);
    check(d == 32'h0, "off tile: switched register isolated to 0");
    cfg_read(tid(4, 1), 0, d);
    check(d == 32'h1, "off tile: ps_en_reg reads 1");
    n_iso++;
    begin
      tile_cfg_t tc;
      tc = pe_cfg(1, 1'b0);
      cfg_read(tid(5, 0), 1, d);
      check(d == tc[31:0], "on tile: configuration reads back");
    end
    // ----------------------------------------------------- 7. on-off-on
    cfg_write(tid(5, 0), 0, 32'h1);
    check(!pwr_on[0][5], "PE (5,0) off");
    n_off++;
    cfg_write(tid(5, 0), 0, 32'h0);
    cyc = 0;
    while (!pwr_on[0][5] && cyc < 50) begin @(negedge clk); cyc++; end
    check(pwr_on[0][5] && cyc == 7, $sformatf("PE (5,0) back on after %0d cycles", cyc));
    n_on++;
    cfg_read(tid(5, 0), 1, d);
    check(d == 32'hFFFF_FFFF, "configuration lost after power cycle (all-ones reset value)");
    // PE (4,0) unaffected: write back again
    n_bi[4][3] = 1'b1;
    @(negedge clk);
    n_bi[4][3] = 1'b0;
    @(negedge clk);
    check(n_bo[4][0] && n_do[4][0] == got[0][0], "PE (4,0) still works");
    // power the rest back on
    for (int x = 0; x < COLS; x++) begin
      cfg_write(tid(x, ROWS - 1), 0, 32'h0);
    end
    #30;
    for (int x = 0; x < COLS; x++) check(pwr_on[ROWS-1][x], "bottom row back on");
    n_on++;
    // ------------------------------------------------------------ summary
    $display("off=%0d on=%0d iso=%0d multicast=%0d rmw=%0d wb=%0d stall=%0d mem=%0d hop=%0d",
             n_off, n_on, n_iso, n_mc, n_rmw, n_wb, n_stall, n_mem, n_hop);
    check(n_off > 0, "mechanism: power off");
    check(n_on > 0, "mechanism: power on");
    check(n_iso > 0, "mechanism: isolation");
    check(n_mc > 0, "mechanism: multicast");
    check(n_rmw > 0, "mechanism: RMW");
    check(n_wb > 0, "mechanism: write-back");
    check(n_stall > 0, "mechanism: stall");
    check(n_mem > 0, "mechanism: MEM stream");
    check(n_hop > 0, "mechanism: route hop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
