// Testbench for abc_input_translator: random hit patterns with every
// combination of test_inputs, pulseinputreg and calmode; the expected output
// is the hit input ORed with the selected group of every 4th channel.
`include "tb_util.svh"
module tb_abc_input_translator;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 10000)

  logic [127:0] i, o, exp_o;
  logic test_inputs, pulseinputreg;
  logic [1:0] calmode;
  logic [3:0] en, exp_en;

  abc_input_translator dut (.i, .test_inputs, .pulseinputreg, .calmode, .o, .en);

  initial begin
    for (int n = 0; n < 400; n++) begin
      i = {$urandom, $urandom, $urandom, $urandom};
      if (n % 3 == 0) i = '0;
      test_inputs   = $urandom_range(0, 1);
      pulseinputreg = $urandom_range(0, 1);
      calmode       = 2'($urandom_range(0, 3));
      #1;
      exp_o = i;
      exp_en = '0;
      if (test_inputs || pulseinputreg) begin
        exp_en[calmode] = 1'b1;
        for (int k = calmode; k < 128; k += 4) exp_o[k] = 1'b1;
      end
      `CHECK(o == exp_o, $sformatf("o mismatch ti=%0d pr=%0d cm=%0d", test_inputs, pulseinputreg, calmode))
      `CHECK(en == exp_en, "en mismatch")
      @(posedge clk);
    end
    `FINISH
  end
endmodule
