// Testbench for abc_data_compression. A model of the readout buffer hands
// out events of three 128-bit words, one clock after each read strobe, with
// random lost-event, error and send-id conditions. A consumer retires the
// offered channels with next pulses at random times. For every event the
// sequence of offered (channel, hit pattern, adj, end) items is compared with
// one worked out from the words and the readout mode, for all four modes and
// hit densities from sparse to dense.
`include "tb_util.svh"
module tb_abc_data_compression;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 400000)

  localparam int NCH = 128;
  typedef struct packed {
    logic [NCH-1:0] w0, w1, w2;
    logic ovf, err, sid;
  } ev_t;
  typedef struct packed {
    logic [6:0] ch;
    logic [2:0] hit;
    logic adj, fin, dv, ovf;
  } item_t;

  logic clrB, dataavail, next, overflowout, adj, datavalid, end_o, buffrd, busy;
  logic [NCH-1:0] i;
  logic [1:0] mode;
  logic [6:0] ch;
  logic [2:0] hit;
  logic ovf_in, err_in, sid_in;

  abc_data_compression #(.NCH(NCH)) dut (
    .clk, .clrB, .i, .overflow(ovf_in), .error(err_in), .sendid(sid_in), .dataavail, .mode,
    .next, .overflowout, .adj, .ch, .hit, .datavalid, .end_o, .buffrd, .busy);

  ev_t pending[$];     // events not yet started
  ev_t cur;            // event being read
  int  word;           // words handed out of cur
  item_t exp_q[$];
  int n_items, n_adj, n_ovf, n_skip, n_empty, mode_seen[4];

  function automatic bit crit(logic [2:0] p, logic [1:0] m);
    case (m)
      2'd0: return p != 3'b000;
      2'd1: return p[1];
      2'd2: return !p[2] && p[1];
      default: return 1'b1;
    endcase
  endfunction

  // expected items of one event
  function automatic void expect_event(ev_t e);
    int hits[$];
    item_t it;
    if (e.sid || e.err) begin
      it = '0; it.fin = 1; exp_q.push_back(it); n_skip++; return;
    end
    if (e.ovf) begin
      it = '0; it.ovf = 1; exp_q.push_back(it); n_ovf++; return;
    end
    for (int c = 0; c < NCH; c++)
      if (crit({e.w0[c], e.w1[c], e.w2[c]}, mode)) hits.push_back(c);
    if (hits.size() == 0) begin
      it = '0; it.fin = 1; exp_q.push_back(it); n_empty++; return;
    end
    foreach (hits[k]) begin
      it = '0;
      it.ch  = 7'(hits[k]);
      it.hit = {e.w0[hits[k]], e.w1[hits[k]], e.w2[hits[k]]};
      it.adj = (k + 1 < hits.size()) && (hits[k + 1] == hits[k] + 1);
      it.fin = (k + 1 == hits.size());
      it.dv  = 1;
      exp_q.push_back(it);
    end
    // then "all hits read out" until one more next
    it = '0; it.fin = 1; exp_q.push_back(it);
  endfunction

  // buffer model: read strobes answered on the next clock
  assign dataavail = pending.size() != 0;
  assign ovf_in = pending.size() != 0 && pending[0].ovf;
  assign err_in = pending.size() != 0 && pending[0].err;
  assign sid_in = pending.size() != 0 && pending[0].sid;
  logic rd_fire = 0;
  always @(posedge clk) rd_fire <= buffrd;
  always @(negedge clk) begin
    if (rd_fire) begin
      if (word == 3 || word == 0) begin
        cur = pending.pop_front();
        word = 0;
        expect_event(cur);
      end
      i = (word == 0) ? cur.w0 : (word == 1) ? cur.w1 : cur.w2;
      word++;
    end else begin
      i = NCH'({4{$urandom}});  // garbage between reads
    end
  end

  // consumer
  // (works on the falling edge, so the outputs are stable when sampled)
  int wait_n;
  always @(negedge clk) begin
    if (!clrB) begin
      next = 0; wait_n = 0;
    end else if (next) begin
      next = 0;
    end else if (datavalid || end_o || overflowout) begin
      if (wait_n > 0) wait_n--;
      else begin
        item_t got, e;
        got = '0;
        got.ch = datavalid ? ch : 7'd0;
        got.hit = datavalid ? hit : 3'd0;
        got.adj = adj; got.fin = end_o; got.dv = datavalid; got.ovf = overflowout;
        if (exp_q.size() == 0) begin
          `CHECK(0, $sformatf("item offered with none expected: ch%0d dv%b end%b ovf%b st%0d", got.ch, got.dv, got.fin, got.ovf, dut.state_q))
        end else begin
          e = exp_q.pop_front();
          `CHECK(got == e, $sformatf("item: got ch%0d hit%b adj%b end%b dv%b ovf%b, want ch%0d hit%b adj%b end%b dv%b ovf%b",
                 got.ch, got.hit, got.adj, got.fin, got.dv, got.ovf, e.ch, e.hit, e.adj, e.fin, e.dv, e.ovf))
          n_items++;
          if (got.adj) n_adj++;
        end
        next = 1;
        wait_n = $urandom_range(0, 3);
      end
    end
  end

  function automatic logic [NCH-1:0] rnd_word(int dens);
    logic [NCH-1:0] w;
    for (int c = 0; c < NCH; c++) w[c] = $urandom_range(0, 99) < dens;
    return w;
  endfunction

  initial begin
    ev_t e;
    clrB = 0; mode = 0; word = 0; i = '0;
    n_items = 0; n_adj = 0; n_ovf = 0; n_skip = 0; n_empty = 0;
    repeat (3) @(posedge clk);
    clrB = 1;
    for (int b = 0; b < 40; b++) begin
      int dens;
      // change the mode only while the block is idle
      mode = 2'(b % 4);
      mode_seen[b % 4]++;
      dens = (b % 5 == 0) ? 0 : (b % 5 == 1) ? 1 : (b % 5 == 2) ? 4 : (b % 5 == 3) ? 20 : 60;
      if (mode == 2'd3 && dens > 4) dens = 4;  // ReadAll sends every channel anyway
      for (int n = 0; n < 6; n++) begin
        int r;
        e.w0 = rnd_word(dens); e.w1 = rnd_word(dens); e.w2 = rnd_word(dens);
        r = $urandom_range(0, 99);
        e.ovf = r < 10; e.err = r >= 10 && r < 15; e.sid = r >= 15 && r < 22;
        if (r >= 95) e.ovf = 1;
        if (r >= 97) e.err = 1;
        pending.push_back(e);
        repeat ($urandom_range(0, 8)) @(posedge clk);
      end
      while (pending.size() != 0 || exp_q.size() != 0 || busy) @(posedge clk);
      repeat (4) @(posedge clk);
      `CHECK(!datavalid && !end_o && !overflowout, "still presenting after last event")
    end
    `CHECK(n_adj > 0, "no adjacent channels seen")
    `CHECK(n_ovf > 0 && n_skip > 0 && n_empty > 0, "a flush case was never exercised")
    $display("items=%0d adj=%0d ovf=%0d skip=%0d empty=%0d", n_items, n_adj, n_ovf, n_skip, n_empty);
    `FINISH
  end
endmodule
