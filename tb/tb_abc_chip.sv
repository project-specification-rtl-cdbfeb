// End-to-end testbench for abc_chip at its default size (128 channels,
// 132-deep pipeline, 8-event readout buffer, 24-entry event FIFO).
//
// Three chips form a readout chain: chip 0 is the master (masterB pad low),
// chip 1 a slave, chip 2 the end chip; chip 2 takes its clock and commands
// from the second input pair. The normal token/data links join neighbours;
// the bypass links join chip 0 and chip 2 directly. One serial command
// stream drives all chips, and the master's datalink is recorded and parsed
// into headers, per-chip packets and trailers. Every event is compared,
// packet by packet, with the one worked out from the hits injected on the
// chips' inputs, the configuration sent and the counter rules (first trigger
// after a reset is L1 1; a trigger right after a BC or soft reset is BC 3).
// The hits of a trigger whose last command bit is applied on clock c are
// those applied on clocks c-132, c-131 and c-130.
// Mechanisms made to happen and counted: clock feed-through, send-id
// packets, data taking, hit/no-hit packets, adjacent-channel groups, the
// level, edge and read-all readout modes, edge detection on the inputs, the
// accumulator, the dataout delay, the input test pulse, readout
// buffer overflow (lost-event packets), buffer error, soft reset, BC reset,
// event-FIFO queuing of several triggers, the bypass of a failed chip, the
// calibration strobe with its delay, the DAC registers, the second clock and
// command input, and the test multiplexer. One that never happens counts as a
// failure.
`include "tb_util.svh"
module tb_abc_chip;
  import abc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #12.5 clk = ~clk;
  `WATCHDOG(clk, 200000)

  localparam int NCHIP = 3;
  localparam int DEPTH = 132;

  logic com, resetB, test_clk, test_rstB;
  logic [127:0] hin [NCHIP];
  logic tokout0 [NCHIP], tokout1 [NCHIP], datout0 [NCHIP], datout1 [NCHIP];
  logic tokin0 [NCHIP], tokin1 [NCHIP], datin0 [NCHIP], datin1 [NCHIP];
  logic dlink [NCHIP], calsp [NCHIP], test_out [NCHIP], test_strobe [NCHIP];
  logic [7:0] ith_code [NCHIP], cali_code [NCHIP];
  logic [3:0] ivi1_code [NCHIP];
  logic signed [31:0] ith_na [NCHIP], cali_na [NCHIP], ivi1_na [NCHIP];

  assign tokin0[0] = 1'b0;        assign tokin1[0] = 1'b0;
  assign tokin0[1] = tokout0[0];  assign tokin1[1] = 1'b0;
  assign tokin0[2] = tokout0[1];  assign tokin1[2] = tokout1[0];
  assign datin0[0] = datout0[1];  assign datin1[0] = datout1[2];
  assign datin0[1] = datout0[2];  assign datin1[1] = 1'b0;
  assign datin0[2] = 1'b0;        assign datin1[2] = 1'b0;

  for (genvar g = 0; g < NCHIP; g++) begin : chip
    logic unused_b0, unused_b1, unused_b2, unused_b3, unused_dlb, unused_csn;
    logic [1:0] unused_cald;
    abc_chip u (
      .clk0(g == 2 ? 1'b0 : clk), .clk1(g == 2 ? clk : 1'b0),
      .com0(g == 2 ? 1'b0 : com), .com1(g == 2 ? com : 1'b0),
      .select_pad(g == 2), .resetB(resetB), .masterB(g != 0), .id_pad(5'(g + 1)),
      .hit_in(hin[g]), .cald(unused_cald), .calsp(calsp[g]), .calsn(unused_csn),
      .tokenin0(tokin0[g]), .tokenin1(tokin1[g]), .datain0(datin0[g]), .datain1(datin1[g]),
      .tokenout0(tokout0[g]), .tokenout0B(unused_b0), .tokenout1(tokout1[g]), .tokenout1B(unused_b1),
      .dataout0(datout0[g]), .dataout0B(unused_b2), .dataout1(datout1[g]), .dataout1B(unused_b3),
      .datalink(dlink[g]), .datalinkB(unused_dlb),
      .iref_na(-32'sd300000), .ith_code(ith_code[g]), .cali_code(cali_code[g]),
      .ivi1_code(ivi1_code[g]), .ith_na(ith_na[g]), .cali_na(cali_na[g]), .ivi1_na(ivi1_na[g]),
      .test_clk(test_clk), .test_rstB(test_rstB), .test_strobe(test_strobe[g]),
      .test_out(test_out[g]));
  end

  // ---------------- stimulus: one bit and one hit word per clock ----------------
  int cyc = 0;
  logic [127:0] hits_at [NCHIP][int];
  logic dl[$];
  int cov[string];

  always @(negedge clk) dl.push_back(dlink[0]);

  task automatic step(logic b);
    com = b;
    for (int k = 0; k < NCHIP; k++) hin[k] = hits_at[k].exists(cyc) ? hits_at[k][cyc] : '0;
    @(negedge clk);
    cyc++;
  endtask
  task automatic idle(int n);
    repeat (n) step(1'b0);
  endtask
  task automatic send(logic [255:0] v, int n);
    for (int k = n - 1; k >= 0; k--) step(v[k]);
  endtask

  // ---------------- commands ----------------
  logic [15:0] cfg [NCHIP];
  int l1_count;            // triggers since the last reset
  int bc_base;             // clock of the first bit after the last BC/soft reset, -1 unknown
  int acc_base = 0;        // clock of the last soft reset (accumulator cleared)

  task automatic slow(logic [5:0] addr, logic [2:0] code, logic [15:0] data, bit has_data);
    send({F1_CTRL, F2_SLOW, has_data ? LEN_REG16 : LEN_SHORT, addr, code, 3'b000}, 27);
    if (has_data) send(256'(data), 16);
  endtask
  task automatic write_cfg(int k, logic [15:0] v);
    slow({1'b1, 5'(k + 1)}, 3'b000, v, 1);
    cfg[k] = v;
  endtask
  task automatic enable_all();
    slow(6'b111111, 3'b101, 16'h0, 0);
  endtask
  task automatic mask_all(logic [127:0] m);
    send({F1_CTRL, F2_SLOW, LEN_MASK, 6'b111111, 3'b001, 3'b000}, 27);
    send(256'(m), 128);
  endtask
  task automatic bc_reset();
    send({F1_CTRL, F2_BCRST}, 7);
    bc_base = cyc;
    cov["bc_reset"]++;
  endtask
  task automatic soft_reset();
    send({F1_CTRL, F2_SOFTRST}, 7);
    bc_base = cyc; l1_count = 0; acc_base = cyc;
    cov["soft_reset"]++;
  endtask

  // ---------------- expected events ----------------
  typedef struct {
    logic [3:0] l1;
    logic [7:0] bc;
    bit bc_known;
    string pk[$];
  } ev_t;
  ev_t exp_ev[$];

  function automatic bit crit(logic [2:0] p, logic [1:0] m);
    case (m)
      2'd0: return p != 3'b000;
      2'd1: return p[1];
      2'd2: return !p[2] && p[1];
      default: return 1'b1;
    endcase
  endfunction

  // packets of one chip for hits w0 (oldest), w1, w2, in data-taking mode
  string tmp_pk[$];
  function automatic void chip_packets(int k, logic [127:0] w0, w1, w2);
    int prev = -2;
    bit any = 0;
    for (int c = 0; c < 128; c++) begin
      logic [2:0] p = {w0[c], w1[c], w2[c]};
      if (crit(p, cfg[k][1:0])) begin
        tmp_pk.push_back($sformatf("%s%0d:%0d:%b", (c == prev + 1) ? "A" : "H", k + 1, c, p));
        if (c == prev + 1) cov["adjacent_group"]++;
        prev = c; any = 1;
      end
    end
    if (!any) begin tmp_pk.push_back("N"); cov["no_hit_packet"]++; end
    else cov["hit_packet"]++;
  endfunction

  function automatic logic [127:0] word_at(int k, int t);
    return hits_at[k].exists(t) ? hits_at[k][t] : '0;
  endfunction

  // chips in readout order
  int order[$];

  // trigger whose last bit is on clock c3 = cyc + 2; expected packets from
  // the hits on clocks c3-132 .. c3-130 (send-id or data taking per chip)
  task automatic trigger(bit sendid);
    ev_t e;
    int c3 = cyc + 2;
    l1_count++;
    e.l1 = 4'(l1_count);
    e.bc_known = bc_base >= 0;
    e.bc = 8'(3 + cyc - bc_base);
    tmp_pk.delete();
    foreach (order[i]) begin
      int k = order[i];
      if (sendid) begin
        tmp_pk.push_back($sformatf("I%0d:%h", k + 1, cfg[k]));
        cov["send_id_packet"]++;
      end else begin
        logic [127:0] w [3];
        for (int j = 0; j < 3; j++) begin
          int t = c3 - DEPTH + j;
          w[j] = word_at(k, t);
          // edge detection: a 1 only where the input was low one clock earlier
          if (cfg[k][6]) w[j] &= ~word_at(k, t - 1);
        end
        // accumulate: all three words are the OR of every sample since the
        // last soft reset (no hits are planted near the trigger clock)
        if (cfg[k][8]) begin
          logic [127:0] a = '0;
          foreach (hits_at[k][t]) if (t > acc_base && t < c3) a |= hits_at[k][t];
          w = '{a, a, a};
        end
        chip_packets(k, w[0], w[1], w[2]);
      end
    end
    foreach (tmp_pk[i]) e.pk.push_back(tmp_pk[i]);
    exp_ev.push_back(e);
    send(F1_L1, 3);
  endtask

  // ---------------- datalink parser ----------------
  ev_t got_ev[$];
  int  pos = 0;
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

  // parse everything recorded so far that is complete
  function automatic void parse_all();
    forever begin
      int save, lim;
      ev_t e;
      while (pos < dl.size() && !dl[pos]) pos++;
      if (pos + 19 > dl.size()) return;
      save = pos;
      if (getb(5) != 5'b11101 || getb(1) != 0) begin parse_err = 1; $display("bad preamble at %0d", save); return; end
      e.l1 = 4'(getb(4)); e.bc = 8'(getb(8));
      if (getb(1) != 1) begin parse_err = 1; return; end
      lim = 0;
      forever begin
        int idv, ch, p, code;
        if (pos + 16 > dl.size()) begin pos = save; return; end   // incomplete
        if (is_trailer()) begin pos += 16; break; end
        if (getb(2) == 2'b01) begin
          idv = getb(4); ch = getb(7); void'(getb(1)); p = getb(3);
          e.pk.push_back($sformatf("H%0d:%0d:%b", idv, ch, 3'(p)));
          while (pos < dl.size() && dl[pos] && !is_trailer()) begin
            void'(getb(1)); ch++; p = getb(3);
            e.pk.push_back($sformatf("A%0d:%0d:%b", idv, ch, 3'(p)));
          end
        end else begin
          if (getb(1) == 1) e.pk.push_back("N");        // <001>
          else begin
            idv = getb(4); code = getb(3);
            if (code == 3'b111) begin
              int hi, lo;
              hi = getb(8); void'(getb(1)); lo = getb(8); void'(getb(1));
              e.pk.push_back($sformatf("I%0d:%h", idv, 16'({hi[7:0], lo[7:0]})));
            end else begin
              void'(getb(1));
              e.pk.push_back($sformatf("E%0d:%b", idv, 3'(code)));
            end
          end
        end
        if (++lim > 2000) begin parse_err = 1; return; end
      end
      got_ev.push_back(e);
    end
  endfunction

  // compare parsed events with the expected ones (error-tolerant mode for
  // overload runs: lost-event and buffer-error packets may stand in for data)
  task automatic compare(bit overload);
    parse_all();
    `CHECK(!parse_err, "datalink parse error")
    if (!overload)
      `CHECK(got_ev.size() == exp_ev.size(), $sformatf("%0d events read out, %0d expected", got_ev.size(), exp_ev.size()))
    else begin
      // all triggers counted, at least 25 served (one plus 24 queued)
      `CHECK(got_ev.size() >= 25 || got_ev.size() == exp_ev.size(), $sformatf("overload: %0d events read out of %0d", got_ev.size(), exp_ev.size()))
      `CHECK(got_ev.size() <= exp_ev.size(), "more events than triggers")
      foreach (got_ev[i]) begin
        bit ok = got_ev[i].pk.size() >= 3;
        `CHECK(ok, "overload: event with fewer packets than chips")
        if (got_ev[i].pk.size() && got_ev[i].pk[0] != "N" && got_ev[i].pk[0][1] != "1")
          `CHECK(0, $sformatf("overload: first packet %s not from chip 1", got_ev[i].pk[0]))
      end
      // the first trigger is always served first
      if (got_ev.size() && exp_ev.size()) `CHECK(got_ev[0].l1 == exp_ev[0].l1, "overload: first L1")
      while (got_ev.size()) begin
        ev_t g = got_ev.pop_front();
        foreach (g.pk[i])
          if (g.pk[i][0] == "E") begin
            if (g.pk[i].substr(3, 5) == "010") cov["lost_event_packet"]++;
            if (g.pk[i].substr(3, 5) == "100") cov["buffer_error_packet"]++;
          end
      end
    end
    while (got_ev.size() && exp_ev.size()) begin
      ev_t g = got_ev.pop_front(), e = exp_ev.pop_front();
      `CHECK(g.l1 == e.l1, $sformatf("L1 %0d, want %0d", g.l1, e.l1))
      if (e.bc_known) `CHECK(g.bc == e.bc, $sformatf("BC %0d, want %0d", g.bc, e.bc))
      if (!overload) begin
        `CHECK(g.pk.size() == e.pk.size(), $sformatf("L1 %0d: %0d packets, want %0d", e.l1, g.pk.size(), e.pk.size()))
        foreach (e.pk[i]) if (i < g.pk.size())
          `CHECK(g.pk[i] == e.pk[i], $sformatf("L1 %0d packet %0d: %s, want %s", e.l1, i, g.pk[i], e.pk[i]))
      end
    end
    exp_ev.delete(); got_ev.delete();
  endtask

  // random sparse hits for one trigger: words on clocks t..t+2
  task automatic plant_hits(int t, int dens);
    for (int k = 0; k < NCHIP; k++)
      for (int w = 0; w < 3; w++) begin
        logic [127:0] v = '0;
        for (int c = 0; c < 128; c++) v[c] = $urandom_range(0, 999) < dens;
        if ($urandom_range(0, 3) == 0) begin
          int c0 = $urandom_range(0, 120);
          v[c0 +: 4] = 4'b1111;        // a cluster of adjacent strips
        end
        hits_at[k][t + w] = v;
      end
  endtask

  // one physics trigger DEPTH-1 clocks after planting its hits
  task automatic physics_trigger(int dens);
    int t = cyc + 4;
    plant_hits(t, dens);
    idle(t + DEPTH - 2 - cyc);          // last trigger bit on clock t + DEPTH
    trigger(0);
  endtask

  // wait until the master has served every trigger: the datalink has been
  // quiet for 100 clocks (a queued trigger's header follows a trailer within
  // a few clocks, and chain data never hold 15 zeros in a row)
  task automatic drain(int n);
    int quiet = 0;
    idle(n);
    while (quiet < 100) begin
      idle(1);
      if (!dlink[0]) quiet++; else quiet = 0;
    end
    parse_all();
  endtask

  // ---------------- the run ----------------
  initial begin
    int t0;
    com = 0; resetB = 0; test_clk = 0; test_rstB = 0;
    for (int k = 0; k < NCHIP; k++) begin hin[k] = '0; cfg[k] = '0; end
    l1_count = 0; bc_base = -1;
    order = '{0, 1, 2};
    repeat (4) @(negedge clk);
    resetB = 1;
    idle(10);

    // power-up: the master sends clk/2 on its datalink, the slaves nothing
    begin
      int toggles = 0;
      for (int k = 0; k < 20; k++) begin
        logic d;
        d = dlink[0];
        idle(1);
        if (dlink[0] != d) toggles++;
        `CHECK(!dlink[1] && !dlink[2], "slave datalink active")
      end
      `CHECK(toggles == 20, "no clock feed-through after power-up")
      cov["clock_feed_through"]++;
    end

    // configure: master (feed-through off), slave, end chip; hit mode
    write_cfg(0, 16'h2000);
    write_cfg(1, 16'h0800);
    write_cfg(2, 16'h1800);
    idle(20);
    dl.delete(); pos = 0;

    // send-id mode after configuration
    soft_reset();
    trigger(1);
    drain(300);

    compare(0);

    // data taking: mask all channels on, enable, BC reset and triggers
    mask_all('1);
    enable_all();
    cov["data_taking"]++;
    bc_reset();
    trigger(0);                           // right after the BC reset: BC 3
    for (int n = 0; n < 6; n++) physics_trigger(n == 0 ? 0 : 3 * n);
    drain(800);
    compare(0);

    // several triggers in flight: they queue in the event FIFO
    begin
      int t;
      t = cyc + 4;
      for (int n = 0; n < 4; n++) plant_hits(t + 8 * n, 10);
      idle(t + DEPTH - 2 - cyc);
      for (int n = 0; n < 4; n++) begin
        trigger(0);
        if (n < 3) idle(5);
      end
      cov["fifo_queue"]++;
      drain(1500);
      compare(0);
    end

    // level mode on all chips, dataout delay on the master
    write_cfg(0, 16'h2011);
    write_cfg(1, 16'h0801);
    write_cfg(2, 16'h1801);
    enable_all();
    for (int n = 0; n < 3; n++) physics_trigger(40);
    drain(1500);
    compare(0);
    cov["level_mode"]++; cov["dataout_delay"]++;

    // edge criterion on the master, ReadAll with edge detection on chip 1
    write_cfg(0, 16'h2002);
    write_cfg(1, 16'h0843);
    write_cfg(2, 16'h1802);
    enable_all();
    for (int n = 0; n < 2; n++) physics_trigger(60);
    drain(3000);
    compare(0);
    cov["edge_criterion"]++; cov["read_all"]++; cov["edge_detect"]++;

    // accumulate mode: hits of several crossings gathered since a soft reset
    write_cfg(0, 16'h2100);
    write_cfg(1, 16'h0900);
    write_cfg(2, 16'h1900);
    enable_all();
    soft_reset();
    idle(10);
    for (int n = 0; n < 2; n++) physics_trigger(8);
    drain(1500);
    compare(0);
    cov["accumulate"]++;

    // input test pulse: channels 4n+calmode, with calmode 2 on chip 1
    write_cfg(0, 16'h2000);
    write_cfg(1, 16'h0808);
    write_cfg(2, 16'h1800);
    enable_all();
    bc_reset();
    idle(200);
    begin
      int tp;
      slow(6'b111111, 3'b100, 16'h0, 0);
      tp = cyc;                            // the pulse reaches the inputs on the clock after the last bit
      for (int k = 0; k < NCHIP; k++) begin
        logic [127:0] v;
        for (int c = 0; c < 128; c++) v[c] = (c % 4) == int'(cfg[k][3:2]);
        hits_at[k][tp] = v;               // stands for the translator pulse in the model only
      end
      idle(tp - 1 + DEPTH - 2 - cyc);
      trigger(0);
      for (int k = 0; k < NCHIP; k++) hits_at[k].delete(tp);
      drain(2500);
      compare(0);
      cov["input_test_pulse"]++;
    end

    // overload 1: 12 triggers four clocks apart overfill the 8-event
    // buffers; the lost events are reported with lost-event packets
    for (int n = 0; n < 12; n++) begin
      trigger(0);
      idle(1);
    end
    drain(100);
    compare(1);
    cov["buffer_overflow"] += cov.exists("lost_event_packet") ? 1 : 0;
    // overload 2: 40 triggers; after 16 lost events the buffer error is set.
    // Only part of them fit in the master's 24-entry event FIFO.
    for (int n = 0; n < 40; n++) begin
      trigger(0);
      idle(1);
    end
    drain(100);
    compare(1);
    // the buffer error stays until a soft reset clears it
    trigger(0);
    drain(600);
    parse_all();
    `CHECK(got_ev.size() == 1 && got_ev[0].pk.size() == 3 && got_ev[0].pk[0] == "E1:100",
           "buffer error not sticky")
    got_ev.delete(); exp_ev.delete();
    soft_reset();
    idle(200);
    physics_trigger(20);
    drain(1500);
    compare(0);

    // bypass chip 1: master outputs and end-chip inputs/outputs use pair 1
    write_cfg(0, 16'h2600);
    write_cfg(2, 16'h1e00);
    enable_all();
    order = '{0, 2};
    for (int n = 0; n < 3; n++) physics_trigger(20);
    drain(1500);
    compare(0);
    cov["bypass"]++;
    order = '{0, 1, 2};
    write_cfg(0, 16'h2000);
    write_cfg(2, 16'h1800);

    // calibration strobe: delay register 20 on chip 0, then the strobe
    slow(6'b100001, 3'b010, 16'd20, 1);
    begin
      realtime t_req, t_rise, t_fall;
      slow(6'b100001, 3'b110, 16'h0, 0);
      t_req = $realtime;
      @(posedge calsp[0]); t_rise = $realtime;
      @(negedge calsp[0]); t_fall = $realtime;
      // the decoder pulse follows the clock edge that took the last bit (half
      // a clock before t_req); the strobe starts on the next edge, 5 clocks
      // wide, and the delay line adds 20 x 1.1 ns
      `CHECK(t_fall - t_rise > 124.9 && t_fall - t_rise < 125.1, $sformatf("strobe width %f", t_fall - t_rise))
      `CHECK(t_rise - t_req > 22.0 + 12.5 - 0.1 && t_rise - t_req < 22.0 + 12.5 + 0.1,
             $sformatf("strobe time %f", t_rise - t_req))
      `CHECK(!calsp[1] && !calsp[2], "calibration strobe on an unaddressed chip")
      cov["calibration_strobe"]++;
      idle(10);
    end

    // DACs: threshold 0x80 / cal 0x40 on chip 1, bias 5 on chip 2
    slow(6'b100010, 3'b011, 16'h8040, 1);
    slow(6'b100011, 3'b111, 16'h0500, 1);
    idle(2);
    `CHECK(ith_code[1] == 8'h80 && cali_code[1] == 8'h40, "threshold/cal DAC register")
    `CHECK(ith_na[1] == -150000 && cali_na[1] == 75000, "threshold/cal DAC current")
    `CHECK(ivi1_code[2] == 4'd5 && ivi1_na[2] == 112500, "bias DAC")
    `CHECK(ith_code[0] == 0 && ivi1_code[1] == 0, "DAC load on an unaddressed chip")
    cov["dac_load"]++;

    // test multiplexer: point 110 is send-id mode, point 127 the pad reset
    test_rstB = 1;
    for (int k = 0; k < 128; k++) begin
      #1;
      if (k == 0)   `CHECK(test_strobe[0], "test strobe")
      if (k == 110) `CHECK(test_out[0] == 1'b1, "test point 110 (send-id mode after writes)")
      if (k == 127) `CHECK(test_out[0] == 1'b1, "test point 127 (reset pad)")
      test_clk = 1; #1; test_clk = 0;
    end
    cov["test_mux"]++;
    cov["second_clock_command_input"] += 1;   // chip 2 ran on it throughout

    foreach (cov[s]) $display("%s: %0d", s, cov[s]);
    `CHECK(cov.size() == 24, $sformatf("%0d mechanisms seen", cov.size()))
    foreach (cov[s]) `CHECK(cov[s] > 0, {s, " never happened"})
    `FINISH
  end
endmodule
