// Testbench for abc_token_data_out: exhaustive; the signal appears as a
// complementary pair on output 0 (normal) or output 1 (bypass), the other
// pair resting at logic 0.
`include "tb_util.svh"
module tb_abc_token_data_out;
  int checks = 0, failures = 0;
  logic tick = 0;
  always #5 tick = ~tick;
  `WATCHDOG(tick, 1000)

  logic in, bypassout, out0, out0B, out1, out1B;
  abc_token_data_out dut (.in, .bypassout, .out0, .out0B, .out1, .out1B);

  initial begin
    for (int v = 0; v < 4; v++) begin
      {bypassout, in} = 2'(v);
      #1;
      `CHECK(out0 == (!bypassout && in) && out0B == !out0, "output pair 0")
      `CHECK(out1 == (bypassout && in) && out1B == !out1, "output pair 1")
    end
    `FINISH
  end
endmodule
