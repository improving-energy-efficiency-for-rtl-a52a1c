// tb_pond_acc_delay: self-checking test of the read-modify-write delay.
//
// Drives a random read stream (re, raddr) and, for every delay setting 0..7
// with accumulation on and off, checks that the write enable and address
// equal the read enable and address of exactly `delay` enabled cycles
// earlier (delay 0: the same cycle), that nothing is written with acc_en
// low, and that stall cycles stretch the delay without losing entries.
`timescale 1ns/1ps
module tb_pond_acc_delay;
  import cgra_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, acc_en = 1, re = 0;
  logic [POND_DLY_W-1:0] dly = 0;
  pond_addr_t ra = 0, wa;
  logic we;
  int checks = 0, failures = 0, writes = 0, stalls = 0;
  logic       hist_v [$];
  pond_addr_t hist_a [$];

  pond_acc_delay dut (.clk, .rst_n, .en_i(en), .acc_en_i(acc_en), .delay_i(dly),
                      .re_i(re), .raddr_i(ra), .we_o(we), .waddr_o(wa));

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
    #12 rst_n = 1;
    for (int d = 0; d <= POND_MAX_DELAY; d++) begin
      for (int a = 1; a >= 0; a--) begin
        @(negedge clk);
        dly = POND_DLY_W'(d); acc_en = a[0];
        hist_v.delete(); hist_a.delete();
        // flush the pipeline with idle enabled cycles
        re = 0; en = 1;
        repeat (POND_MAX_DELAY + 1) @(negedge clk);
        for (int c = 0; c < 200; c++) begin
          bit exp_we;
          pond_addr_t exp_a;
          re = ($urandom_range(0, 2) != 0);
          ra = pond_addr_t'($urandom);
          en = ($urandom_range(0, 5) != 0);
          #1;
          if (d == 0) begin
            exp_we = re && acc_en; exp_a = ra;
          end else if (hist_v.size() >= d) begin
            exp_we = hist_v[hist_v.size() - d]; exp_a = hist_a[hist_a.size() - d];
          end else begin
            exp_we = 0; exp_a = '0;
          end
          exp_we = exp_we && en;
          check(we == exp_we, $sformatf("we d=%0d acc=%0d c=%0d", d, a, c));
          if (exp_we) check(wa == exp_a, $sformatf("waddr d=%0d", d));
          if (we) writes++;
          if (en) begin
            hist_v.push_back(re && acc_en);
            hist_a.push_back(ra);
          end else stalls++;
          @(negedge clk);
        end
      end
    end
    check(writes > 0 && stalls > 0, "mechanisms exercised");
    $display("writes=%0d stalls=%0d", writes, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
