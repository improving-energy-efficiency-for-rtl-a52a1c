// tb_switch_box: self-checking test of the registered switch box.
//
// Drives random values on all four sides and the three core outputs and
// random selects, and checks one clock later that each side/track output
// holds the value chosen by its select (input order: sides s+1, s+2, s+3,
// then core 0..2; out-of-range selects give 0). Checks the one-cycle hop
// latency, that the outputs hold while en_i is low (stall), and the reset
// value 0.
`timescale 1ns/1ps
module tb_switch_box;
  import cgra_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  logic    [NUM_SIDES-1:0][NUM_TRACKS-1:0][DATA_W-1:0] in, out, exp;
  logic    [CORE_OUTS-1:0][DATA_W-1:0] core;
  sb_sel_t [NUM_SIDES-1:0][NUM_TRACKS-1:0] sel;
  int checks = 0, failures = 0, stalls = 0;

  switch_box #(.WIDTH(DATA_W)) dut (
    .clk, .rst_n, .en_i(en), .in_i(in), .core_i(core), .sel_i(sel), .out_o(out));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog timeout"); $finish;
  end

  initial begin
    in = '0; core = '0; sel = '0;
    #12;
    check(out == '0, "reset value");
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      for (int s = 0; s < NUM_SIDES; s++)
        for (int t = 0; t < NUM_TRACKS; t++) begin
          in[s][t]  = DATA_W'($urandom);
          sel[s][t] = sb_sel_t'($urandom_range(0, 7));
        end
      for (int c = 0; c < CORE_OUTS; c++) core[c] = DATA_W'($urandom);
      for (int s = 0; s < NUM_SIDES; s++)
        for (int t = 0; t < NUM_TRACKS; t++) begin
          int k;
          k = int'(sel[s][t]);
          if (k < 3)      exp[s][t] = in[(s + 1 + k) % NUM_SIDES][t];
          else if (k < 6) exp[s][t] = core[k - 3];
          else            exp[s][t] = '0;
        end
      en = ($urandom_range(0, 4) != 0);
      begin
        logic [NUM_SIDES-1:0][NUM_TRACKS-1:0][DATA_W-1:0] prev;
        prev = out;
        #1 check(out == prev, "output is registered (no change before edge)");
        @(posedge clk); #1;
        if (en) check(out == exp, $sformatf("routing it=%0d", it));
        else begin
          stalls++;
          check(out == prev, "hold during stall");
        end
      end
    end
    check(stalls > 0, "stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
