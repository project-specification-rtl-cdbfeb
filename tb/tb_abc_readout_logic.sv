// Testbench for abc_readout_logic. A model of the data compression logic
// offers one event at a time (hit channels, an empty event, a lost event, or
// nothing) and retires an item on each next pulse. For each token the bits
// on dataout are compared with the packet worked out from the format rules:
//   hit:   <01><id><chan><1><ddd>, <1><ddd> per adjacent channel
//   none:  <001>
//   error: <000><id><eee><1>, eee = 100 buffer error, 010 lost event,
//          001 no event
//   id:    <000><id><111><cfg 15:8><1><cfg 7:0><1>
// The first bit must follow the token (or the end of busy) by one clock,
// tokenout must pulse once, one clock before the last bit, and a stream
// presented on datain by a modelled next chip must follow without a gap.
`include "tb_util.svh"
module tb_abc_readout_logic;
  import abc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 200000)

  logic clrB, datain, tokenin, datavalid, adj, end_i, busy, overflow, error, sendid;
  logic dataout, tokenout, next;
  logic [6:0] ch;
  logic [2:0] hit;
  logic [3:0] id;
  logic [15:0] cfg;

  abc_readout_logic dut (.clk, .clrB, .datain, .tokenin, .ch, .hit, .datavalid, .adj, .end_i,
                         .busy, .id, .overflow, .error, .sendid, .config_i(cfg),
                         .dataout, .tokenout, .next);

  // compression model state
  int   kind;            // 0 none, 1 hits, 2 empty event, 3 lost event
  int   chans[$];
  logic [2:0] pats[$];
  int   idx;
  logic took = 0;
  always @(posedge clk) took <= next;

  always_comb begin
    datavalid = 0; adj = 0; end_i = 0; overflow = 0; ch = 0; hit = 0;
    if (!busy) case (kind)
      1: if (idx < chans.size()) begin
           datavalid = 1; ch = 7'(chans[idx]); hit = pats[idx];
           end_i = idx == chans.size() - 1;
           adj = !end_i && chans[idx + 1] == chans[idx] + 1;
         end
      2: end_i = 1;
      3: overflow = 1;
      default: ;
    endcase
  end

  // recorded output, one entry per clock (sampled on the falling edge)
  logic rec[$];
  int   tok_at[$];
  int   cyc = 0;
  int   n_next;
  logic pat[$];
  int   pat_from = -1;
  int   n_group = 0, n_kind[8];

  always @(negedge clk) begin
    rec.push_back(dataout);
    if (tokenout) tok_at.push_back(cyc);
    if (took) begin
      n_next++;
      if (kind == 1 && idx < chans.size()) idx++;
      else if (kind == 1 || kind == 2 || kind == 3) kind = 0;
      if (kind == 1 && idx == chans.size()) kind = 2;   // all hits read out
    end
    datain = (pat_from >= 0 && cyc >= pat_from && cyc - pat_from < pat.size()) ? pat[cyc - pat_from] : 1'b0;
    if (tokenout) pat_from = cyc + 1;
    cyc++;
  end

  function automatic void push_bits(ref logic q[$], input logic [31:0] v, input int n);
    for (int k = n - 1; k >= 0; k--) q.push_back(v[k]);
  endfunction

  task automatic trial(int scenario, int busy_clks);
    logic exp[$];
    int b0, t_tok, nexts_exp;
    // set up the event
    chans.delete(); pats.delete(); idx = 0;
    sendid = 0; error = 0;
    case (scenario)
      0: kind = 0;
      1: begin
           int c = $urandom_range(0, 20);
           kind = 1;
           repeat ($urandom_range(1, 9)) begin
             chans.push_back(c); pats.push_back(3'($urandom_range(1, 7)));
             c += ($urandom_range(0, 1) ? 1 : $urandom_range(2, 12));
             if (c > 127) break;
           end
         end
      2: kind = 2;
      3: kind = 3;
      4: begin kind = 2; error = 1; end
      5: begin kind = 2; sendid = 1; end
      6: begin kind = 0; sendid = 1; end
      default: ;
    endcase
    n_kind[scenario]++;
    // expected packet
    nexts_exp = 1;
    if (sendid) begin
      push_bits(exp, {LEAD_INFO, id, CFG_MARK}, 10);
      push_bits(exp, {cfg[15:8], 1'b1, cfg[7:0], 1'b1}, 18);
      if (kind == 0) nexts_exp = 0;
    end else if (error) push_bits(exp, {LEAD_INFO, id, ERR_BUFFER, 1'b1}, 11);
    else if (kind == 3) push_bits(exp, {LEAD_INFO, id, ERR_OVERFLOW, 1'b1}, 11);
    else if (kind == 0) begin push_bits(exp, {LEAD_INFO, id, ERR_NODATA, 1'b1}, 11); nexts_exp = 0; end
    else if (kind == 2) push_bits(exp, 32'(LEAD_NOHIT), 3);
    else begin
      nexts_exp = chans.size() + 1;   // one per channel and one closing the event
      foreach (chans[k]) begin
        if (k == 0 || chans[k] != chans[k - 1] + 1) begin
          push_bits(exp, {LEAD_HIT, id, 7'(chans[k]), 1'b1, pats[k]}, 17);
          n_group++;
        end else push_bits(exp, {1'b1, pats[k]}, 4);
      end
    end
    // next chip's stream
    pat.delete();
    repeat ($urandom_range(1, 12)) pat.push_back(1'($urandom));
    pat.push_back(1'b1);
    pat_from = -1;
    // token
    busy = busy_clks > 0;
    @(negedge clk);
    tokenin = 1;
    b0 = cyc;
    @(negedge clk);
    tokenin = 0;
    if (busy_clks > 0) begin
      repeat (busy_clks - 1) @(negedge clk);
      b0 = cyc; busy = 0;
    end
    n_next = 0; tok_at.delete();
    repeat (exp.size() + pat.size() + 6) @(negedge clk);
    // b0 is the record index of the clock in which the token (or !busy) was
    // presented; the first bit appears one clock later
    for (int k = 0; k < exp.size(); k++)
      `CHECK(rec[b0 + 1 + k] == exp[k], $sformatf("scenario %0d bit %0d of %0d", scenario, k, exp.size()))
    `CHECK(tok_at.size() == 1, $sformatf("scenario %0d: %0d token pulses", scenario, tok_at.size()))
    if (tok_at.size() > 0)
      `CHECK(tok_at[0] == b0 + exp.size() - 1, $sformatf("scenario %0d: tokenout at %0d, want %0d", scenario, tok_at[0], b0 + exp.size() - 1))
    for (int k = 0; k < pat.size(); k++)
      `CHECK(rec[b0 + 1 + exp.size() + k] == pat[k], $sformatf("scenario %0d relay bit %0d", scenario, k))
    `CHECK(n_next == nexts_exp, $sformatf("scenario %0d: %0d next pulses, want %0d", scenario, n_next, nexts_exp))
    `CHECK(kind == 0 && !busy, "event not retired")
  endtask

  initial begin
    clrB = 0; tokenin = 0; busy = 0; kind = 0; id = 4'hA; cfg = 16'h5A3C; sendid = 0; error = 0;
    datain = 0;
    repeat (2) @(negedge clk);
    clrB = 1;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      id = 4'($urandom); cfg = 16'($urandom);
      trial(n < 7 ? n : $urandom_range(0, 6), $urandom_range(0, 3) == 0 ? $urandom_range(1, 5) : 0);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    for (int s = 0; s < 7; s++) `CHECK(n_kind[s] > 0, "scenario never run")
    `CHECK(n_group > 0, "no hit groups")
    `FINISH
  end
endmodule
