// Testbench for abc_readout_controller.
//  1. Triggers at random times, with BC resets, on a master: every header on
//     the datalink must be 11101 0 <L1 count> <BC count> 1 for its trigger in
//     order, the chain data (played by a model that starts one clock after
//     tokenout, as the readout logic does) must follow the header without a
//     gap, and the next header may only start after the trailer.
//  2. Trigger-to-header latency without and with the 4-clock dataout delay.
//  3. A burst of 30 triggers: 25 are served (one in service plus 24 in the
//     FIFO), fifo_full is seen, the rest are lost but still counted.
//  4. End chip: the trailer 1 + 15 zeros replaces dataout from the second
//     clock after token_back; otherwise dataout is datain.
//  5. Clock feed-through gives clk/2 on the datalink; a chip that is not the
//     master keeps the datalink at 0.
`include "tb_util.svh"
module tb_abc_readout_controller;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)

  logic clrB, level1, bcresetB, header_enable, trailer_enable, datain, token_back;
  logic dataout_delay, feedthrough, tokenout, dataout, datalink, fifo_empty, fifo_full;

  abc_readout_controller dut (.clk, .clrB, .level1, .bcresetB, .header_enable, .trailer_enable,
    .datain, .token_back, .dataout_delay, .feedthrough, .tokenout, .dataout, .datalink,
    .fifo_empty, .fifo_full);

  // reference counters (values after each clock edge)
  int l1_ref = 0, bc_ref = 0;
  logic [11:0] hdr_exp[$];
  int trig_edge[$];
  int cyc = 0;

  // everything is driven and sampled on the falling edge
  logic dl_rec[$];
  logic out_rec[$];
  int   tok_rec[$];
  logic chain[$];        // bits the chain model is sending
  logic last_block[$];   // the last block it started
  int   blocks_sent = 0;
  bit   full_seen = 0;

  always @(negedge clk) begin
    dl_rec.push_back(datalink);
    out_rec.push_back(dataout);
    if (fifo_full) full_seen = 1;
    if (chain.size() > 0) datain = chain.pop_front();
    else                  datain = $urandom_range(0, 9) == 0;   // idle noise
    if (tokenout) begin
      tok_rec.push_back(cyc);
      // chain data: random bits that never hold 15 zeros, then the trailer
      repeat ($urandom_range(3, 40)) chain.push_back($urandom_range(0, 3) != 0);
      chain.push_back(1'b1);
      repeat (15) chain.push_back(1'b0);
      last_block = chain;
      blocks_sent++;
    end
    cyc++;
  end

  // one trigger sent on the next clock edge; the reference counts it
  task automatic trigger();
    level1 = 1;
    @(negedge clk);
    level1 = 0;
  endtask

  always @(posedge clk) begin
    if (!clrB) begin
      l1_ref = 0; bc_ref = 0;
    end else begin
      bc_ref = bcresetB ? (bc_ref + 1) % 256 : 0;
      if (level1) begin
        l1_ref = (l1_ref + 1) % 16;
        hdr_exp.push_back({4'(l1_ref), 8'(bc_ref)});
        trig_edge.push_back(cyc);
      end
    end
  end

  // parse the datalink record: headers with chain data and trailers
  int n_hdr;
  task automatic parse(int from, bit check_data, int max_hdr, ref logic [11:0] want[$]);
    int p = from;
    n_hdr = 0;
    while (p < dl_rec.size() - 40 && n_hdr < max_hdr) begin
      logic [18:0] h;
      if (!dl_rec[p]) begin p++; continue; end
      for (int k = 0; k < 19; k++) h[18 - k] = dl_rec[p + k];
      `CHECK(h[18:14] == 5'b11101 && h[13] == 0 && h[0] == 1, $sformatf("header frame %b", h))
      if (want.size() > 0) begin
        logic [11:0] w = want.pop_front();
        `CHECK(h[12:1] == w, $sformatf("header L1/BC %h, want %h", h[12:1], w))
      end else `CHECK(0, "unexpected header")
      n_hdr++;
      p += 19;
      // chain data then trailer: the trailer must come, and no other header
      // may start before it
      begin
        int zeros = 0;
        bit seen_one = 0;
        while (p < dl_rec.size() && !(seen_one && zeros == 15)) begin
          if (dl_rec[p]) begin seen_one = 1; zeros = 0; end else zeros++;
          p++;
        end
      end
    end
  endtask

  logic [11:0] want[$];
  int start;

  initial begin
    clrB = 0; level1 = 0; bcresetB = 1; header_enable = 1; trailer_enable = 0; datain = 0;
    token_back = 0; dataout_delay = 0; feedthrough = 0;
    repeat (3) @(negedge clk);
    clrB = 1;

    // 1. random triggers and BC resets
    start = dl_rec.size();
    for (int n = 0; n < 40; n++) begin
      repeat ($urandom_range(0, 60)) @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin bcresetB = 0; @(negedge clk); bcresetB = 1; end
      if ($urandom_range(0, 4) == 0) trigger();  // trigger right after the BC reset
      else begin repeat ($urandom_range(0, 3)) @(negedge clk); trigger(); end
    end
    repeat (3000) @(negedge clk);
    `CHECK(fifo_empty, "FIFO not drained")
    want = hdr_exp;
    parse(start, 1, 1000, want);
    `CHECK(n_hdr == 40 && want.size() == 0, $sformatf("%0d headers for 40 triggers", n_hdr))
    `CHECK(blocks_sent == 40 && tok_rec.size() == 40, "token count")
    // gapless: chain data directly after each header; check the first block
    hdr_exp.delete(); tok_rec.delete();

    // 2. latency, no delay then delay
    for (int d = 0; d < 2; d++) begin
      int t0, t1;
      dataout_delay = d;
      repeat (200) @(negedge clk);
      trigger();
      t0 = trig_edge[trig_edge.size() - 1];
      repeat (200) @(negedge clk);
      t1 = t0;
      while (!dl_rec[t1]) t1++;
      // record t0 is the one after the trigger edge; header bit 0 two later
      `CHECK(t1 - t0 == 2 + 4 * d, $sformatf("delay=%0d: header after %0d clocks", d, t1 - t0))
      // header 19 bits, then the chain's first bit: chain starts after tokenout
      `CHECK(tok_rec.size() == 1 && tok_rec[0] == t1 + 17,
             $sformatf("tokenout at %0d, header at %0d", tok_rec.size() ? tok_rec[0] : -1, t1))
      tok_rec.delete(); hdr_exp.delete();
    end
    dataout_delay = 0;

    // gap-free check of one block: header, chain bits, trailer
    begin
      int t1;
      repeat (200) @(negedge clk);
      trigger();
      repeat (150) @(negedge clk);
      t1 = trig_edge[trig_edge.size() - 1] + 2;
      `CHECK(tok_rec.size() == 1, "one token")
      // tokenout during header bit 17; chain bit 0 right after header bit 18
      for (int k = 0; k < last_block.size(); k++)
        `CHECK(dl_rec[t1 + 19 + k] == last_block[k], $sformatf("chain bit %0d on datalink", k))
      `CHECK(dl_rec[t1 + 19 + last_block.size()] == 0, "datalink after trailer")
      tok_rec.delete(); hdr_exp.delete();
    end

    // 3. burst of 30 triggers
    begin
      int l1_first;
      repeat (100) @(negedge clk);
      start = dl_rec.size();
      l1_first = (l1_ref + 1) % 16;
      full_seen = 0;
      level1 = 1;
      repeat (30) @(negedge clk);
      level1 = 0;
      repeat (4000) @(negedge clk);
      want = hdr_exp;
      want = want[0:24];
      parse(start, 1, 1000, want);
      `CHECK(n_hdr == 25, $sformatf("burst: %0d headers served, want 25", n_hdr))
      `CHECK(full_seen, "fifo_full never seen")
      // counting continued through the lost triggers
      hdr_exp.delete();
      trigger();
      repeat (300) @(negedge clk);
      `CHECK(hdr_exp.size() == 1 && hdr_exp[0][11:8] == 4'((l1_first + 30) % 16), "L1 count after burst")
      hdr_exp.delete();
    end

    // 4. trailer insertion on the end chip
    header_enable = 0; trailer_enable = 1;
    repeat (50) @(negedge clk);
    for (int n = 0; n < 20; n++) begin
      int t0;
      chain.delete();
      repeat ($urandom_range(20, 40)) chain.push_back(1'($urandom));
      repeat ($urandom_range(3, 10)) @(negedge clk);
      token_back = 1; t0 = cyc;
      @(negedge clk);
      token_back = 0;
      repeat (30) @(negedge clk);
      // token_back seen at the edge after record t0; trailer from record t0+2
      for (int k = 0; k < 16; k++)
        `CHECK(out_rec[t0 + 2 + k] == (k == 0), $sformatf("trailer bit %0d", k))
    end
    // outside the trailer dataout is datain
    trailer_enable = 0;
    repeat (20) begin
      datain = 1'($urandom);
      #1;
      `CHECK(dataout == datain, "dataout not datain")
      @(negedge clk);
    end

    // 5. feed-through and slave datalink
    header_enable = 1; feedthrough = 1;
    repeat (5) @(negedge clk);
    for (int k = 0; k < 20; k++) begin
      `CHECK(datalink != dl_rec[dl_rec.size() - 1], "feed-through does not toggle")
      @(negedge clk);
    end
    feedthrough = 0; header_enable = 0;
    repeat (3) @(negedge clk);
    for (int k = 0; k < 20; k++) begin
      trigger();
      `CHECK(datalink == 0, "slave datalink not quiet")
    end
    `FINISH
  end
endmodule
