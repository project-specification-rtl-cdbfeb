// Testbench for abc_readout_buffer (24 words, 8 events of 3 words): random
// event writes and reads, often at the same time, against a reference model
// kept as a queue of held events plus a count of lost events. Read data
// must match the event expected, the flags must match the model (overflow
// while lost events are outstanding, error after 16 lost events), and a
// reset must clear everything.
`include "tb_util.svh"
module tb_abc_readout_buffer;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 50000)

  logic clrB, write, read, data_avail, overflow, error;
  logic [127:0] i, o;

  abc_readout_buffer dut (.clk, .clrB, .i, .write, .read, .o, .data_avail, .overflow, .error);

  typedef logic [2:0][127:0] ev_t;
  ev_t held [$];
  int  lost;
  bit  err;
  int  n_ovf_reads, n_drops;

  // one 3-clock slot: optionally write an event and/or read one
  task automatic slot(input bit do_wr, input bit do_rd);
    ev_t w, exp_ev;
    bit rd_lost, rd_data;
    for (int k = 0; k < 3; k++) w[k] = {$urandom, $urandom, $urandom, $urandom};
    // model, read first
    rd_lost = 0; rd_data = 0;
    if (do_rd) begin
      `CHECK(data_avail == (held.size() > 0 || lost > 0), "data_avail mismatch before read")
      `CHECK(overflow == (lost > 0), "overflow mismatch before read")
      if (lost > 0) begin lost--; rd_lost = 1; n_ovf_reads++; end
      else if (held.size() > 0) begin exp_ev = held.pop_front(); rd_data = 1; end
    end
    if (do_wr) begin
      if (held.size() == 8) begin
        void'(held.pop_front());
        n_drops++;
        if (lost == 15) err = 1; else lost++;
      end
      held.push_back(w);
    end
    for (int k = 0; k < 3; k++) begin
      write <= do_wr; read <= do_rd; i <= w[k];
      @(posedge clk); #1;
      if (rd_data) `CHECK(o == exp_ev[k], $sformatf("read word %0d mismatch", k))
    end
    write <= 0; read <= 0;
    @(posedge clk); #1;
    if (rd_data) `CHECK(o == exp_ev[2], "read word 2 mismatch")
    `CHECK(error == err, "error flag mismatch")
    `CHECK(overflow == (lost > 0), "overflow flag mismatch")
    `CHECK(data_avail == (held.size() > 0 || lost > 0), "data_avail mismatch")
  endtask

  initial begin
    clrB = 0; write = 0; read = 0; i = '0; lost = 0; err = 0;
    n_ovf_reads = 0; n_drops = 0;
    repeat (2) @(posedge clk);
    clrB <= 1; @(posedge clk);
    `CHECK(!data_avail && !overflow && !error, "flags after reset")
    // simple fill and drain
    for (int n = 0; n < 5; n++) slot(1, 0);
    for (int n = 0; n < 5; n++) slot(0, 1);
    // overfill by 3, then drain
    for (int n = 0; n < 11; n++) slot(1, 0);
    `CHECK(overflow, "no overflow after 11 events")
    for (int n = 0; n < 11; n++) slot(0, 1);
    // random traffic
    for (int n = 0; n < 600; n++) slot($urandom_range(0, 99) < 55, $urandom_range(0, 99) < 50);
    // lose more than 16 events: error
    for (int n = 0; n < 30; n++) slot(1, 0);
    `CHECK(error, "error not set after 16 lost events")
    `CHECK(n_ovf_reads > 0 && n_drops > 16, "overflow cases not exercised")
    clrB <= 0; @(posedge clk); clrB <= 1; @(posedge clk); #1;
    held.delete(); lost = 0; err = 0;
    `CHECK(!data_avail && !overflow && !error, "flags after second reset")
    for (int n = 0; n < 3; n++) slot(1, 0);
    for (int n = 0; n < 3; n++) slot(0, 1);
    `FINISH
  end
endmodule
