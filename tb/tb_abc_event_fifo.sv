// Testbench for abc_event_fifo (24 x 12): random pushes and pops against a
// queue model, including pushes into a full FIFO (dropped) and simultaneous
// push and pop.
`include "tb_util.svh"
module tb_abc_event_fifo;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)

  logic clrB, push, pop, empty, full;
  logic [11:0] wdata, rdata;
  logic [11:0] q [$];
  int n_full;

  abc_event_fifo dut (.clk, .clrB, .push, .wdata, .pop, .rdata, .empty, .full);

  initial begin
    clrB = 0; push = 0; pop = 0; wdata = '0; n_full = 0;
    repeat (2) @(posedge clk);
    clrB <= 1;
    for (int n = 0; n < 3000; n++) begin
      bit p, r;
      logic [11:0] d;
      p = $urandom_range(0, 99) < ((n / 500) % 2 ? 70 : 35);
      r = $urandom_range(0, 99) < 50;
      d = 12'($urandom);
      #1;
      `CHECK(empty == (q.size() == 0), "empty mismatch")
      `CHECK(full == (q.size() == 24), "full mismatch")
      if (q.size() > 0) `CHECK(rdata == q[0], "rdata mismatch")
      push <= p; pop <= r; wdata <= d;
      @(posedge clk);
      if (r && q.size() > 0) begin
        void'(q.pop_front());
        if (p) q.push_back(d);
      end else if (p) begin
        if (q.size() < 24) q.push_back(d); else n_full++;
      end
    end
    `CHECK(n_full > 0, "full case not exercised")
    `FINISH
  end
endmodule
