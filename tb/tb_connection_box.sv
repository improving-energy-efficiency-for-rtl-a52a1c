// tb_connection_box: self-checking test of the connection box.
//
// Instantiates a 16-bit CB with two local inputs (the PE ALU operand
// arrangement) and checks, for random track and local values, every select:
// 0..19 pick track side*5+track, 20..21 pick the locals, 22 (the last
// input) gives the constant 0 and larger selects give 0. It also checks the isolation use of
// the constant input: with all tracks scrambled (every neighbour off and
// floating) the constant select still returns exactly 0. Combinational.
`timescale 1ns/1ps
module tb_connection_box;
  import cgra_pkg::*;
  logic [NUM_SIDES-1:0][NUM_TRACKS-1:0][DATA_W-1:0] tracks;
  logic [1:0][DATA_W-1:0] locals;
  cb_sel_t sel;
  word_t y;
  int checks = 0, failures = 0;

  connection_box #(.WIDTH(DATA_W), .NUM_LOCAL(2)) dut (
    .tracks_i(tracks), .local_i(locals), .sel_i(sel), .out_o(y));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog timeout"); $finish;
  end

  initial begin
    for (int it = 0; it < 100; it++) begin
      for (int s = 0; s < 32; s++) begin
        word_t exp;
        for (int a = 0; a < NUM_SIDES; a++)
          for (int t = 0; t < NUM_TRACKS; t++) tracks[a][t] = DATA_W'($urandom);
        locals[0] = DATA_W'($urandom);
        locals[1] = DATA_W'($urandom);
        sel = cb_sel_t'(s);
        if (s < 20)       exp = tracks[s / NUM_TRACKS][s % NUM_TRACKS];
        else if (s < 22)  exp = locals[s - 20];
        else              exp = '0;
        #1;
        check(y == exp, $sformatf("sel=%0d y=%h exp=%h", s, y, exp));
      end
      // constant input under floating tracks
      sel = cb_sel_t'(22);
      for (int a = 0; a < NUM_SIDES; a++)
        for (int t = 0; t < NUM_TRACKS; t++) tracks[a][t] = 16'hFFFF ^ DATA_W'($urandom);
      #1;
      check(y == '0, "constant-0 input with floating tracks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
