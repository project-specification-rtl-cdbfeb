// Testbench for abc_dac_register: random values presented on data with
// loadthresholdreg or loadbiasreg pulses; threshold is data[15:8], calamp
// data[7:0] and biasamp data[11:8] of the respective loads.
`include "tb_util.svh"
module tb_abc_dac_register;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)

  logic clrB, lt, lb;
  logic [15:0] data;
  logic [7:0] threshold, calamp, e_thr, e_cal;
  logic [3:0] biasamp, e_bias;

  abc_dac_register dut (.clk, .clrB, .loadthresholdreg(lt), .loadbiasreg(lb), .data,
                        .threshold, .calamp, .biasamp);

  initial begin
    clrB = 0; lt = 0; lb = 0; data = '0; e_thr = 0; e_cal = 0; e_bias = 0;
    repeat (2) @(posedge clk);
    clrB <= 1;
    for (int n = 0; n < 500; n++) begin
      logic [15:0] d;
      bit a, b;
      d = 16'($urandom); a = $urandom_range(0, 2) == 0; b = $urandom_range(0, 2) == 0;
      data <= d; lt <= a; lb <= b;
      @(posedge clk); #1;
      if (a) begin e_thr = d[15:8]; e_cal = d[7:0]; end
      if (b) e_bias = d[11:8];
      `CHECK(threshold == e_thr && calamp == e_cal && biasamp == e_bias, "DAC register mismatch")
    end
    lt <= 0; lb <= 0;
    clrB <= 0; #1;
    `CHECK(threshold == 0 && calamp == 0 && biasamp == 0, "not cleared by reset")
    `FINISH
  end
endmodule
