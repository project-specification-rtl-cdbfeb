// Testbench for abc_input_register: loads a random mask serially (channel 127
// first), then drives random inputs in normal, edge-detect and mask-test
// modes and compares with a reference model kept in the testbench.
`include "tb_util.svh"
module tb_abc_input_register;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)

  logic clrB, edgemode, load, sin, mode;
  logic [127:0] i, o, mask, s_now, s_prev, exp_o;

  abc_input_register dut (.clk, .clrB, .i, .edgemode, .load, .sin, .mode, .o);

  task automatic load_mask(input logic [127:0] m);
    for (int k = 127; k >= 0; k--) begin
      load <= 1; sin <= m[k];
      @(posedge clk);
    end
    load <= 0;
  endtask

  initial begin
    clrB = 0; edgemode = 0; load = 0; sin = 0; mode = 0; i = '0;
    s_now = '0; s_prev = '0;
    repeat (3) @(posedge clk);
    clrB <= 1;
    @(posedge clk);
    `CHECK(o == '0, "output not clear after reset")
    mask = {$urandom, $urandom, $urandom, $urandom};
    load_mask(mask);
    @(posedge clk);
    // test mode: mask contents drive the output
    mode <= 1; @(posedge clk); #1;
    `CHECK(o == mask, "mask not loaded with channel 127 first")
    for (int n = 0; n < 600; n++) begin
      edgemode <= (n >= 200 && n < 400);
      mode     <= (n >= 400 && n < 450);
      i        <= {$urandom, $urandom, $urandom, $urandom} & {4{32'($urandom)}};
      @(posedge clk); #1;
      s_prev = s_now;
      s_now  = i;
      exp_o  = mode ? mask : ((edgemode ? (s_now & ~s_prev) : s_now) & mask);
      `CHECK(o == exp_o, $sformatf("output mismatch n=%0d", n))
    end
    `FINISH
  end
endmodule
