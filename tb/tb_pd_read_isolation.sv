// tb_pd_read_isolation: self-checking test of the read-back isolation.
//
// With random chain, always-on and switched-domain read values, checks that
// the outgoing chain is chain | always-on | switched when the tile is on, and
// that the switched-domain value (floating while the tile is off) is masked
// completely when ps_en is 1, while the always-on ps_en_reg value still
// passes. Combinational.
`timescale 1ns/1ps
module tb_pd_read_isolation;
  import cgra_pkg::*;
  logic ps_en;
  logic [CFG_DATA_W-1:0] chain, aon, sw, y;
  int checks = 0, failures = 0;

  pd_read_isolation dut (.ps_en_i(ps_en), .chain_i(chain), .aon_rdata_i(aon),
                         .sw_rdata_i(sw), .chain_o(y));

  initial begin : watchdog
    #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog timeout"); $finish;
  end

  initial begin
    for (int it = 0; it < 1000; it++) begin
      logic [CFG_DATA_W-1:0] exp;
      ps_en = 1'($urandom);
      chain = ($urandom_range(0, 1) != 0) ? $urandom : '0;
      aon   = ($urandom_range(0, 1) != 0) ? $urandom : '0;
      sw    = $urandom;
      exp   = chain | aon | (ps_en ? '0 : sw);
      #1;
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL ps_en=%b chain=%h aon=%h sw=%h y=%h", ps_en, chain, aon, sw, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
