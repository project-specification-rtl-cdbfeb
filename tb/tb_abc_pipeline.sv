// Testbench for abc_pipeline at its full depth of 132: random words are
// written every clock and remembered in the testbench; three-clock triggers
// must return the words written 133, 132 and 131 clocks before the
// one-clock-later output, oldest first, i.e. the triggered crossing and its
// neighbours at the 132-clock latency. Accumulator mode must return three
// copies of the OR of all words since the last clear.
`include "tb_util.svh"
module tb_abc_pipeline;
  localparam int D = 132;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)

  logic clrB, acen, level1, ovalid;
  logic [127:0] i, o, acc;
  logic [127:0] hist [$];   // hist[t] = word written in clock t after reset

  abc_pipeline dut (.clk, .clrB, .i, .acen, .level1, .o, .ovalid);

  int t;
  initial begin
    clrB = 0; acen = 0; level1 = 0; i = '0; t = 0; acc = '0;
    repeat (2) @(posedge clk);
    clrB <= 1;
    // fill and trigger
    for (int n = 0; n < 1500; n++) begin
      logic [127:0] w;
      w = {$urandom, $urandom, $urandom, $urandom};
      if (n % 7 == 0) w = 128'(n);
      i <= w;
      level1 <= (n >= 300) && ((n % 50) < 3);
      acen   <= (n >= 1000);
      @(posedge clk);
      hist.push_back(w);
      #1;
      if (ovalid) begin
        // read issued in clock n: returns word written in clock n-D
        if (!acen) begin
          `CHECK(o == hist[n - D], $sformatf("pipeline word mismatch at n=%0d", n))
        end
      end
    end
    // accumulator: clear with reset, accumulate known words, trigger
    clrB <= 0; @(posedge clk); clrB <= 1;
    acc = '0; acen <= 1;
    for (int n = 0; n < 20; n++) begin
      i <= 128'(1) << (n * 5); acc |= 128'(1) << (n * 5);
      @(posedge clk);
    end
    i <= '0; @(posedge clk);
    for (int k = 0; k < 3; k++) begin
      level1 <= 1; @(posedge clk); #1;
      `CHECK(ovalid && o == acc, "accumulator copy mismatch")
    end
    level1 <= 0; @(posedge clk); #1;
    `CHECK(!ovalid, "ovalid stays high")
    `FINISH
  end
endmodule
