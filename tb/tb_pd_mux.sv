// tb_pd_mux: self-checking test of the boundary-protecting multiplexer.
//
// Drives random data on every input and walks the select through every
// legal value and several out-of-range values. Checks that the output equals
// the selected input (0 when the select is out of range), that the one-hot
// decode has exactly the selected bit, and - the isolation property - that
// changing every unselected input (as a powered-off neighbour's floating
// output would) leaves the output unchanged. Purely combinational; there is
// no clock. Uses the default parameters widened to 6 inputs.
`timescale 1ns/1ps
module tb_pd_mux;
  localparam int N = 6, W = 16, SW = 3;
  logic [N-1:0][W-1:0] data;
  logic [SW-1:0]       sel;
  logic [W-1:0]        y;
  logic [N-1:0]        oh;
  int checks = 0, failures = 0;

  pd_mux #(.N(N), .WIDTH(W), .SEL_W(SW)) dut (
    .data_i(data), .sel_i(sel), .data_o(y), .onehot_o(oh));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog timeout"); $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      for (int s = 0; s < (1 << SW); s++) begin
        logic [W-1:0] y0;
        for (int i = 0; i < N; i++) data[i] = W'($urandom);
        sel = SW'(s);
        #1;
        y0 = y;
        check(y == ((s < N) ? data[s] : '0), $sformatf("sel=%0d y=%h", s, y));
        check(oh == ((s < N) ? N'(1) << s : '0), $sformatf("onehot sel=%0d %b", s, oh));
        // scramble every unselected input: output must not move
        for (int i = 0; i < N; i++) if (i != s) data[i] = W'($urandom);
        #1;
        check(y == y0, $sformatf("isolation sel=%0d", s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
