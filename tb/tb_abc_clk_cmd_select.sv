// Testbench for abc_clk_cmd_select: exhaustive over the five inputs; the
// selected pair follows select_i.
`include "tb_util.svh"
module tb_abc_clk_cmd_select;
  int checks = 0, failures = 0;
  logic tick = 0;
  always #5 tick = ~tick;
  `WATCHDOG(tick, 1000)

  logic clk0, clk1, com0, com1, select_i, clk, command;
  abc_clk_cmd_select dut (.clk0, .clk1, .com0, .com1, .select_i, .clk, .command);

  initial begin
    for (int v = 0; v < 32; v++) begin
      {select_i, clk0, clk1, com0, com1} = 5'(v);
      #1;
      `CHECK(clk == (select_i ? clk1 : clk0), "clk selection")
      `CHECK(command == (select_i ? com1 : com0), "command selection")
    end
    `FINISH
  end
endmodule
