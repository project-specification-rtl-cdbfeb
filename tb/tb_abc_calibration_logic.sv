// Testbench for abc_calibration_logic: the strobe must start the clock after
// the calstrobe pulse and last exactly 5 clocks (125 ns at 40 MHz); the
// calibration code must follow calmode.
`include "tb_util.svh"
module tb_abc_calibration_logic;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)

  logic clrB, calstrobe, strobe;
  logic [1:0] calmode, calcode;

  abc_calibration_logic dut (.clk, .clrB, .calstrobe, .calmode, .strobe, .calcode);

  initial begin
    clrB = 0; calstrobe = 0; calmode = 0;
    repeat (2) @(posedge clk);
    clrB <= 1; @(posedge clk); #1;
    `CHECK(!strobe, "strobe high after reset")
    for (int n = 0; n < 40; n++) begin
      int width;
      calmode <= 2'(n); #1;
      `CHECK(calcode == 2'(n), "calcode mismatch")
      calstrobe <= 1; @(posedge clk); calstrobe <= 0; #1;
      width = 0;
      while (strobe) begin width++; @(posedge clk); #1; end
      `CHECK(width == 5, $sformatf("strobe width %0d", width))
      repeat ($urandom_range(1, 5)) @(posedge clk);
    end
    `FINISH
  end
endmodule
