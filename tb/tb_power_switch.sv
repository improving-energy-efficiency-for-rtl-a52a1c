// tb_power_switch: self-checking test of the power-switch daisy-chain model.
//
// For the PE tile setting (18 switches of 0.5 ns: 9 ns) and the MEM tile
// setting (35 switches: 17.5 ns), checks: the supply is reported on after
// reset-time settling; after nsleep falls the supply is lost at once (first
// switch off after one stage) and the chain end follows after the full
// chain delay; after nsleep rises the supply comes back exactly when the
// last switch turns on (wake-up time of the source design); repeated
// off-on-off sequencing behaves the same; the floating stand-in value is
// not all zeros.
`timescale 1ns/1ps
module tb_power_switch;
  logic ns_pe = 1, ns_mem = 1;
  logic nso_pe, nso_mem, on_pe, on_mem;
  logic [31:0] fl_pe, fl_mem;
  int checks = 0, failures = 0;

  power_switch #(.NUM_SWITCHES(18), .STAGE_PS(500), .FLOAT_W(32)) u_pe (
    .nsleep_i(ns_pe), .nsleep_o(nso_pe), .vdd_sw_on_o(on_pe), .float_o(fl_pe));
  power_switch #(.NUM_SWITCHES(35), .STAGE_PS(500), .FLOAT_W(32)) u_mem (
    .nsleep_i(ns_mem), .nsleep_o(nso_mem), .vdd_sw_on_o(on_mem), .float_o(fl_mem));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  initial begin : watchdog
    #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog timeout"); $finish;
  end

  initial begin
    realtime t0;
    #30;
    check(on_pe && on_mem, "on after settling");
    check(fl_pe != '0 && fl_mem != '0, "floating stand-in value is not zero");
    for (int rep = 0; rep < 3; rep++) begin
      // power down
      ns_pe = 0; ns_mem = 0; t0 = $realtime;
      #0.4 check(on_pe && on_mem, "still on before first stage");
      #0.2 check(!on_pe && !on_mem, "supply lost after the first switch");
      #(9.0 - 0.6 - 0.1) check(nso_pe, "PE chain end still on before 9 ns");
      #0.2 check(!nso_pe, "PE chain end off at 9 ns");
      #30;
      // power up
      ns_pe = 1; ns_mem = 1; t0 = $realtime;
      #8.9 check(!on_pe, "PE not on before 9 ns");
      #0.2 check(on_pe, "PE on at 9 ns (wake-up)");
      check(!on_mem, "MEM not yet on at 9 ns");
      #(17.5 - 9.1 - 0.1) check(!on_mem, "MEM not on before 17.5 ns");
      #0.2 check(on_mem, "MEM on at 17.5 ns (wake-up)");
      #20;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
