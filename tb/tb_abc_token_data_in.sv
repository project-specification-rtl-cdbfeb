// Testbench for abc_token_data_in: exhaustive; bypassin chooses input 1.
`include "tb_util.svh"
module tb_abc_token_data_in;
  int checks = 0, failures = 0;
  logic tick = 0;
  always #5 tick = ~tick;
  `WATCHDOG(tick, 1000)

  logic in0, in1, bypassin, out;
  abc_token_data_in dut (.in0, .in1, .bypassin, .out);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {bypassin, in0, in1} = 3'(v);
      #1;
      `CHECK(out == (bypassin ? in1 : in0), "input selection")
    end
    `FINISH
  end
endmodule
