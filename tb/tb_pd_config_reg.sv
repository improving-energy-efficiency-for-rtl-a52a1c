// tb_pd_config_reg: self-checking test of the always-on configuration
// decoder and ps_en_reg.
//
// Checks: reset value 0 of ps_en_reg (tile powered on after reset); writes
// to register 0 at this tile's id set and clear ps_en; writes to other tile
// ids never change it (spurious-enable test); switched-domain writes are
// decoded (sw_we, 0-based index) only while the tile is on and only for
// indices 1..NUM_CFG_WORDS; a read of register 0 returns ps_en on the
// always-on read data; reads of other registers raise sw_re. The register
// update takes one clock.
`timescale 1ns/1ps
module tb_pd_config_reg;
  import cgra_pkg::*;
  localparam logic [TILE_ID_W-1:0] ID = 16'h0305;
  logic clk = 0, rst_n = 0;
  cfg_bus_t cfg;
  logic ps_en, sw_we, sw_re;
  logic [CFG_REG_W-1:0] sw_idx;
  logic [CFG_DATA_W-1:0] aon;
  int checks = 0, failures = 0;

  pd_config_reg dut (.clk, .rst_n, .tile_id_i(ID), .cfg_i(cfg), .ps_en_o(ps_en),
    .sw_we_o(sw_we), .sw_re_o(sw_re), .sw_idx_o(sw_idx), .aon_rdata_o(aon));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic cfg_bus_t wr(logic [15:0] id, int r, logic [31:0] d);
    cfg_bus_t c;
    c.addr = {8'h00, 8'(r), id}; c.data = d; c.write = 1'b1; c.read = 1'b0;
    return c;
  endfunction

  initial begin : watchdog
    #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog timeout"); $finish;
  end

  initial begin
    bit model_ps = 0;
    cfg = '0;
    #12 rst_n = 1;
    check(ps_en == 1'b0, "reset value: tile on");
    for (int it = 0; it < 2000; it++) begin
      logic [15:0] id;
      int r;
      bit is_rd;
      @(negedge clk);
      id    = ($urandom_range(0, 2) == 0) ? 16'($urandom) : ID;
      r     = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(0, 20);
      is_rd = ($urandom_range(0, 3) == 0);
      cfg   = wr(id, r, $urandom);
      cfg.write = !is_rd;
      cfg.read  = is_rd;
      #1;
      check(sw_we == (!is_rd && id == ID && !model_ps && r >= 1 && r <= NUM_CFG_WORDS),
            $sformatf("sw_we id=%h r=%0d", id, r));
      check(sw_re == (is_rd && id == ID && r >= 1 && r <= NUM_CFG_WORDS), "sw_re");
      if (sw_we || sw_re) check(int'(sw_idx) == r - 1, "sw_idx");
      check(aon == ((is_rd && id == ID && r == 0) ? 32'(model_ps) : 32'h0), "aon read-back");
      if (!is_rd && id == ID && r == 0) model_ps = cfg.data[0];
      @(posedge clk); #1;
      check(ps_en == model_ps, $sformatf("ps_en model=%0b", model_ps));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
