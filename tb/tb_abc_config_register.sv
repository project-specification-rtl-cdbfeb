// Testbench for abc_config_register: shifts random 16-bit words in MS bit
// first, checks shiftreg after each word, checks that dataout changes only
// on the load pulse, and that reset clears both registers.
`include "tb_util.svh"
module tb_abc_config_register;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)

  logic clrB, shift, load, in;
  logic [15:0] dataout, shiftreg, cfg_exp;

  abc_config_register dut (.clk, .clrB, .shift, .load, .in, .dataout, .shiftreg);

  initial begin
    clrB = 0; shift = 0; load = 0; in = 0; cfg_exp = '0;
    repeat (2) @(posedge clk);
    clrB <= 1; @(posedge clk); #1;
    `CHECK(dataout == 16'h0 && shiftreg == 16'h0, "not cleared")
    for (int n = 0; n < 100; n++) begin
      logic [15:0] w;
      w = 16'($urandom);
      for (int k = 15; k >= 0; k--) begin
        shift <= 1; in <= w[k];
        @(posedge clk);
      end
      shift <= 0; in <= $urandom_range(0, 1);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
      `CHECK(shiftreg == w, "shiftreg mismatch")
      `CHECK(dataout == cfg_exp, "dataout changed without load")
      if (n % 2 == 0) begin
        load <= 1; @(posedge clk); load <= 0; #1;
        cfg_exp = w;
        `CHECK(dataout == w, "dataout not loaded")
      end
    end
    clrB <= 0; #1;
    `CHECK(dataout == 16'h0 && shiftreg == 16'h0, "async clear failed")
    `FINISH
  end
endmodule
