// Workload testbench: one side of a detector module under random triggers.
//
// Six abc_chip instances at their default size form one readout chain:
// chip 0 is the master, chips 1 to 4 are slaves and chip 5 is the end chip.
// They run in Level readout mode (the channel's bit at the triggered crossing),
// which is the data-taking mode. Two operating points are run. They are the
// ones the specification quotes for dead time and power:
//   A: 1% mean strip occupancy per crossing, 100 kHz mean trigger rate
//      (one trigger per 400 clocks on average);
//   B: 25% mean strip occupancy, 4 kHz mean trigger rate (one per 10000).
// Trigger intervals are drawn from an exponential distribution, with at least
// 4 clocks between triggers because a trigger command is 3 bits long. Only the
// crossings that a trigger will read are filled with random hits; the others
// are empty. In Level mode the others cannot affect the data, and filling
// only these keeps the run short.
// The master's datalink is parsed. Every event is checked against the model:
// trigger number, bunch crossing and each packet of each chip. An event lost
// to a full readout buffer may show lost-event packets instead of hits; such
// events are counted. The specification requires the fraction lost to stay
// below 1% at point A, and this is checked. The datalink load is reported for
// both points: the bits from preamble to trailer, per clock. It must stay
// below 1.
`include "tb_util.svh"
module tb_abc_occupancy;
  import abc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #12.5 clk = ~clk;
  `WATCHDOG(clk, 1500000)

  localparam int NCHIP = 6;
  localparam int DEPTH = 132;

  logic com, resetB;
  logic [127:0] hin [NCHIP];
  logic tokout0 [NCHIP], datout0 [NCHIP], dlink [NCHIP];
  logic tokin0 [NCHIP], datin0 [NCHIP];

  for (genvar g = 0; g < NCHIP; g++) begin : link
    if (g == 0) begin : first
      assign tokin0[g] = 1'b0;
    end else begin : other
      assign tokin0[g] = tokout0[g - 1];
    end
    if (g == NCHIP - 1) begin : last
      assign datin0[g] = 1'b0;
    end else begin : inner
      assign datin0[g] = datout0[g + 1];
    end
  end

  for (genvar g = 0; g < NCHIP; g++) begin : chip
    logic unused_b0, unused_b1, unused_b2, unused_b3, unused_dlb, unused_csn, unused_csp;
    logic unused_t1, unused_d1, unused_ts, unused_to;
    logic [1:0] unused_cald;
    logic [7:0] unused_ith, unused_cali;
    logic [3:0] unused_ivi1;
    logic signed [31:0] unused_ith_na, unused_cali_na, unused_ivi1_na;
    abc_chip u (
      .clk0(clk), .clk1(1'b0), .com0(com), .com1(1'b0),
      .select_pad(1'b0), .resetB(resetB), .masterB(g != 0), .id_pad(5'(g + 1)),
      .hit_in(hin[g]), .cald(unused_cald), .calsp(unused_csp), .calsn(unused_csn),
      .tokenin0(tokin0[g]), .tokenin1(1'b0), .datain0(datin0[g]), .datain1(1'b0),
      .tokenout0(tokout0[g]), .tokenout0B(unused_b0), .tokenout1(unused_t1), .tokenout1B(unused_b1),
      .dataout0(datout0[g]), .dataout0B(unused_b2), .dataout1(unused_d1), .dataout1B(unused_b3),
      .datalink(dlink[g]), .datalinkB(unused_dlb),
      .iref_na(-32'sd300000), .ith_code(unused_ith), .cali_code(unused_cali),
      .ivi1_code(unused_ivi1), .ith_na(unused_ith_na), .cali_na(unused_cali_na),
      .ivi1_na(unused_ivi1_na),
      .test_clk(1'b0), .test_rstB(1'b0), .test_strobe(unused_ts), .test_out(unused_to));
  end

  // ---------------- stimulus ----------------
  int cyc = 0;
  logic [127:0] hits_at [NCHIP][int];
  logic dl[$];

  always @(negedge clk) dl.push_back(dlink[0]);

  task automatic step(logic b);
    com = b;
    for (int k = 0; k < NCHIP; k++) hin[k] = hits_at[k].exists(cyc) ? hits_at[k][cyc] : '0;
    @(negedge clk);
    for (int k = 0; k < NCHIP; k++) if (hits_at[k].exists(cyc - DEPTH - 4)) hits_at[k].delete(cyc - DEPTH - 4);
    cyc++;
  endtask
  task automatic idle(int n);
    repeat (n) step(1'b0);
  endtask
  task automatic send(logic [255:0] v, int n);
    for (int k = n - 1; k >= 0; k--) step(v[k]);
  endtask

  task automatic slow(logic [5:0] addr, logic [2:0] code, logic [15:0] data, bit has_data);
    send({F1_CTRL, F2_SLOW, has_data ? LEN_REG16 : LEN_SHORT, addr, code, 3'b000}, 27);
    if (has_data) send(256'(data), 16);
  endtask

  // ---------------- expected events ----------------
  typedef struct {
    logic [3:0] l1;
    logic [7:0] bc;
    string pk[$];
  } ev_t;
  ev_t exp_ev[$];
  int l1_count, bc_base;

  // Level mode: a channel is read out when its middle (triggered) bit is 1
  string tmp_pk[$];
  function automatic void chip_packets(int k, logic [127:0] w0, w1, w2);
    int prev = -2;
    bit any = 0;
    for (int c = 0; c < 128; c++)
      if (w1[c]) begin
        tmp_pk.push_back($sformatf("%s%0d:%0d:%b", (c == prev + 1) ? "A" : "H", k + 1, c,
                                   {w0[c], w1[c], w2[c]}));
        prev = c; any = 1;
      end
    if (!any) tmp_pk.push_back("N");
  endfunction

  function automatic logic [127:0] word_at(int k, int t);
    return hits_at[k].exists(t) ? hits_at[k][t] : '0;
  endfunction

  // trigger whose last bit is on clock cyc + 2
  task automatic trigger();
    ev_t e;
    int c3 = cyc + 2;
    l1_count++;
    e.l1 = 4'(l1_count);
    e.bc = 8'(3 + cyc - bc_base);
    tmp_pk.delete();
    for (int k = 0; k < NCHIP; k++)
      chip_packets(k, word_at(k, c3 - DEPTH), word_at(k, c3 - DEPTH + 1), word_at(k, c3 - DEPTH + 2));
    foreach (tmp_pk[i]) e.pk.push_back(tmp_pk[i]);
    exp_ev.push_back(e);
    send(F1_L1, 3);
  endtask

  // ---------------- datalink parser ----------------
  ev_t got_ev[$];
  int  pos = 0, busy_bits = 0;
  bit  parse_err = 0;

  function automatic int getb(int n);
    int v = 0;
    for (int k = 0; k < n; k++) begin
      v = (v << 1) | int'(pos < dl.size() ? dl[pos] : 1'b0);
      pos++;
    end
    return v;
  endfunction
  function automatic bit is_trailer();
    if (pos + 16 > dl.size() || !dl[pos]) return 0;
    for (int k = 1; k < 16; k++) if (dl[pos + k]) return 0;
    return 1;
  endfunction

  function automatic void parse_all();
    forever begin
      int save, lim;
      ev_t e;
      while (pos < dl.size() && !dl[pos]) pos++;
      if (pos + 19 > dl.size()) return;
      save = pos;
      if (getb(5) != 5'b11101 || getb(1) != 0) begin parse_err = 1; return; end
      e.l1 = 4'(getb(4)); e.bc = 8'(getb(8));
      if (getb(1) != 1) begin parse_err = 1; return; end
      lim = 0;
      forever begin
        int idv, ch, p, code;
        if (pos + 16 > dl.size()) begin pos = save; return; end
        if (is_trailer()) begin pos += 16; break; end
        if (getb(2) == 2'b01) begin
          idv = getb(4); ch = getb(7); void'(getb(1)); p = getb(3);
          e.pk.push_back($sformatf("H%0d:%0d:%b", idv, ch, 3'(p)));
          while (pos < dl.size() && dl[pos] && !is_trailer()) begin
            void'(getb(1)); ch++; p = getb(3);
            e.pk.push_back($sformatf("A%0d:%0d:%b", idv, ch, 3'(p)));
          end
        end else if (getb(1) == 1) e.pk.push_back("N");
        else begin
          idv = getb(4); code = getb(3); void'(getb(1));
          e.pk.push_back($sformatf("E%0d:%b", idv, 3'(code)));
        end
        if (++lim > 5000) begin parse_err = 1; return; end
      end
      busy_bits += pos - save;
      got_ev.push_back(e);
    end
  endfunction

  // wait until the datalink has been quiet for 100 clocks
  task automatic drain();
    int quiet = 0;
    while (quiet < 100) begin
      idle(1);
      if (!dlink[0]) quiet++; else quiet = 0;
    end
    parse_all();
  endtask

  // ---------------- one operating point ----------------
  // occ: strip occupancy in units of 1/10000; mean: mean clocks between
  // triggers; n: number of triggers; max_lost_pm: allowed lost events per mille
  task automatic run_point(string name, int occ, int mean, int n, int max_lost_pm);
    int sched[$];
    int t_last, t0, lost, hits;
    real load;
    // soft reset, then BC reset: fresh counters for this point
    send({F1_CTRL, F2_SOFTRST}, 7);
    idle(10);
    send({F1_CTRL, F2_BCRST}, 7);
    bc_base = cyc; l1_count = 0;
    dl.delete(); pos = 0; busy_bits = 0;
    exp_ev.delete(); got_ev.delete();
    t0 = cyc;
    t_last = cyc + DEPTH + 10;
    hits = 0;
    // schedule the triggers (last bit clock) and fill the crossings they read
    for (int i = 0; i < n; i++) begin
      real u = (real'($urandom) + 1.0) / 4294967297.0;
      int gap = int'(-real'(mean) * $ln(u));
      if (gap < 4) gap = 4;
      t_last += gap;
      sched.push_back(t_last);
      for (int k = 0; k < NCHIP; k++)
        for (int w = 0; w < 3; w++) begin
          logic [127:0] v = '0;
          for (int c = 0; c < 128; c++) v[c] = $urandom_range(0, 9999) < occ;
          hits_at[k][t_last - DEPTH + w] = v;
          if (w == 1) hits += $countones(v);
        end
    end
    foreach (sched[i]) begin
      idle(sched[i] - 2 - cyc);
      trigger();
      if (i % 50 == 0) parse_all();
    end
    drain();
    `CHECK(!parse_err, {name, ": datalink parse error"})
    `CHECK(got_ev.size() == exp_ev.size(),
           $sformatf("%s: %0d events read out, %0d triggers", name, got_ev.size(), exp_ev.size()))
    lost = 0;
    while (got_ev.size() && exp_ev.size()) begin
      ev_t g = got_ev.pop_front(), e = exp_ev.pop_front();
      bit was_lost = 0;
      foreach (g.pk[i]) if (g.pk[i][0] == "E") begin
        `CHECK(g.pk[i].substr(3, 5) == "010", $sformatf("%s: error packet %s", name, g.pk[i]))
        was_lost = 1;
      end
      `CHECK(g.l1 == e.l1, $sformatf("%s: L1 %0d, want %0d", name, g.l1, e.l1))
      `CHECK(g.bc == e.bc, $sformatf("%s: BC %0d, want %0d", name, g.bc, e.bc))
      if (was_lost) lost++;
      else begin
        `CHECK(g.pk.size() == e.pk.size(),
               $sformatf("%s L1 %0d: %0d packets, want %0d", name, e.l1, g.pk.size(), e.pk.size()))
        foreach (e.pk[i]) if (i < g.pk.size())
          `CHECK(g.pk[i] == e.pk[i], $sformatf("%s L1 %0d packet %0d: %s, want %s", name, e.l1, i, g.pk[i], e.pk[i]))
      end
    end
    load = real'(busy_bits) / real'(cyc - t0);
    $display("%s: %0d triggers in %0d clocks, %0.2f hits per chip per event, %0d lost, datalink load %0.3f",
             name, n, cyc - t0, real'(hits) / real'(n * NCHIP), lost, load);
    `CHECK(lost * 1000 <= max_lost_pm * n, $sformatf("%s: %0d of %0d events lost", name, lost, n))
    `CHECK(load < 1.0, $sformatf("%s: datalink load %0.3f", name, load))
  endtask

  initial begin
    com = 0; resetB = 0;
    for (int k = 0; k < NCHIP; k++) hin[k] = '0;
    l1_count = 0; bc_base = 0;
    repeat (4) @(negedge clk);
    resetB = 1;
    idle(10);
    // master (feed-through off), slaves, end chip; Level mode; all channels on
    slow({1'b1, 5'd1}, 3'b000, 16'h2001, 1);
    for (int k = 1; k < NCHIP - 1; k++) slow({1'b1, 5'(k + 1)}, 3'b000, 16'h0801, 1);
    slow({1'b1, 5'(NCHIP)}, 3'b000, 16'h1801, 1);
    send({F1_CTRL, F2_SLOW, LEN_MASK, 6'b111111, 3'b001, 3'b000}, 27);
    send('1, 128);
    slow(6'b111111, 3'b101, 16'h0, 0);
    idle(20);

    run_point("A: 1% occupancy, 100 kHz", 100, 400, 1000, 10);
    run_point("B: 25% occupancy, 4 kHz", 2500, 10000, 40, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
