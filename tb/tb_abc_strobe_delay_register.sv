// Testbench for abc_strobe_delay_register: random loads; delay must hold the
// low 6 bits of the last loaded byte and clear on reset.
`include "tb_util.svh"
module tb_abc_strobe_delay_register;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)

  logic clrB, load;
  logic [7:0] data;
  logic [5:0] delay, e;

  abc_strobe_delay_register dut (.clk, .clrB, .load, .data, .delay);

  initial begin
    clrB = 0; load = 0; data = 0; e = 0;
    repeat (2) @(posedge clk);
    clrB <= 1;
    for (int n = 0; n < 300; n++) begin
      logic [7:0] d; bit l;
      d = 8'($urandom); l = $urandom_range(0, 3) == 0;
      data <= d; load <= l;
      @(posedge clk); #1;
      if (l) e = d[5:0];
      `CHECK(delay == e, "delay mismatch")
    end
    clrB <= 0; #1;
    `CHECK(delay == 0, "not cleared")
    `FINISH
  end
endmodule
