// Testbench for abc_test_mux: after the asynchronous reset the multiplexer
// shows test point 0 with test_strobe high; each test_clk edge moves on by
// one, wrapping after 128. Random test point patterns are checked for three
// full turns, and a reset in the middle of a turn.
`include "tb_util.svh"
module tb_abc_test_mux;
  int checks = 0, failures = 0;
  logic test_clk = 0;
  `WATCHDOG(test_clk, 2000)

  logic test_rstB, test_strobe, test_out;
  logic [127:0] tp;

  abc_test_mux dut (.test_clk, .test_rstB, .testpoint(tp), .test_strobe, .test_out);

  task automatic pulse();
    #5 test_clk = 1; #5 test_clk = 0;
  endtask

  initial begin
    tp = {4{$urandom}};
    test_rstB = 0; #3; test_rstB = 1; #2;
    for (int n = 0; n < 3 * 128 + 50; n++) begin
      int sel;
      sel = n % 128;
      tp = {4{$urandom}};
      #1;
      `CHECK(test_out == tp[sel], $sformatf("test point %0d", sel))
      `CHECK(test_strobe == (sel == 0), "strobe")
      pulse();
    end
    test_rstB = 0; #1;
    `CHECK(test_strobe && test_out == tp[0], "reset mid-turn")
    `FINISH
  end
endmodule
