// Testbench for abc_command_decoder. A random stream of commands is sent,
// one bit per clock: level-1 triggers, soft and BC resets, slow commands to
// this chip, to all chips and to other chips, and faulty ones (bad field 1,
// bad field 2, a wrong or unknown length, an unknown field-5 code). From the
// fields it builds, the testbench works out for every clock what each output
// must be (a response is due on the clock after the bit that completes it)
// and compares all outputs on every clock. Commands follow each other with
// 0 to 4 idle bits, so a decoder that loses step shows up at once.
`include "tb_util.svh"
module tb_abc_command_decoder;
  import abc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 400000)

  localparam logic [5:0] MY_ID = 6'b101101;
  logic clrB, command;
  logic sendidmode, softresetB, calstrobe, loadmaskreg, level1, level3, loadshiftreg;
  logic strobeconfigreg, loaddelayreg, loadthresholdreg, loadbiasreg, bcresetB, pulseinputreg, sdata;

  abc_command_decoder dut (.clk, .clrB, .id(MY_ID), .command, .sendidmode, .softresetB, .calstrobe,
    .loadmaskreg, .level1, .level3, .loadshiftreg, .strobeconfigreg, .loaddelayreg,
    .loadthresholdreg, .loadbiasreg, .bcresetB, .pulseinputreg, .sdata);

  typedef struct packed {
    logic l1, l3, srst, bcrst, cal, pulse, shift, mask, scfg, sdly, sthr, sbias, sid, sd;
  } obs_t;

  logic  stream[$];
  obs_t  exp_o[$];      // expected outputs, per clock, from index 1
  bit    sd_care[$];
  int    cov[string];

  function automatic void bits(logic [255:0] v, int n);
    for (int k = n - 1; k >= 0; k--) stream.push_back(v[k]);
  endfunction
  function automatic void grow(int n);
    while (exp_o.size() < n) begin
      obs_t o = '0;
      o.sid = exp_o.size() ? exp_o[exp_o.size() - 1].sid : 1'b1;
      exp_o.push_back(o); sd_care.push_back(0);
    end
  endfunction
  // record that, from the clock after stream bit c, something is due
  function automatic int at(int c);
    grow(c + 8);
    return c + 1;
  endfunction
  function automatic void set_sid(int c, logic v);
    grow(c + 8);
    for (int k = c + 1; k < exp_o.size(); k++) exp_o[k].sid = v;
  endfunction

  task automatic gen_command();
    int r = $urandom_range(0, 99);
    int c;
    if (r < 30) begin                                     // level 1
      bits(F1_L1, 3); c = stream.size() - 1;
      exp_o[at(c)].l1 = 1; for (int k = 0; k < 3; k++) exp_o[at(c) + k].l3 = 1;
      cov["level1"]++;
    end else if (r < 36) begin                            // soft reset
      bits({F1_CTRL, F2_SOFTRST}, 7); exp_o[at(stream.size() - 1)].srst = 1; cov["softreset"]++;
    end else if (r < 42) begin                            // BC reset
      bits({F1_CTRL, F2_BCRST}, 7); exp_o[at(stream.size() - 1)].bcrst = 1; cov["bcreset"]++;
    end else if (r < 46) begin                            // bad field 1
      bits($urandom_range(0, 1) ? 3'b100 : 3'b111, 3); grow(stream.size() + 2); cov["bad_f1"]++;
    end else if (r < 50) begin                            // bad field 2
      logic [3:0] f2;
      do f2 = 4'($urandom); while (f2 == F2_SOFTRST || f2 == F2_BCRST || f2 == F2_SLOW);
      bits({F1_CTRL, f2}, 7); grow(stream.size() + 2); cov["bad_f2"]++;
    end else begin                                        // slow command
      logic [2:0] code = 3'($urandom);
      logic [5:0] addr;
      logic [2:0] low = ($urandom_range(0, 9) == 0) ? 3'($urandom_range(1, 7)) : 3'b000;
      logic [7:0] len, need;
      bit mine, good;
      int a = $urandom_range(0, 9);
      addr = a < 5 ? MY_ID : a < 7 ? 6'b111111 : a < 8 ? {1'b0, MY_ID[4:0]} : (MY_ID ^ 6'b000100);
      mine = (addr == MY_ID) || (addr == 6'b111111);
      need = (code == 3'b001) ? LEN_MASK : (code == 3'b000 || code == 3'b010 || code == 3'b011 || code == 3'b111) ? LEN_REG16 : LEN_SHORT;
      len = need;
      if ($urandom_range(0, 9) == 0) len = $urandom_range(0, 2) == 0 ? 8'($urandom_range(12, 60)) :
                                            (need == LEN_SHORT ? LEN_REG16 : LEN_SHORT);
      good = mine && low == 3'b000 && len == need;
      bits({F1_CTRL, F2_SLOW, len}, 15);
      c = stream.size() - 1;
      if (len == 0) begin grow(c + 3); return; end
      bits({addr, code, low}, len < 12 ? len : 12);
      if (len >= 12) begin
        c = stream.size() - 1;   // last bit of field 5
        if (mine && !code[2]) set_sid(c, 1);
        if (good && code == 3'b101) begin set_sid(c, 0); cov["enable"]++; end
        if (good && code == 3'b100) begin exp_o[at(c)].pulse = 1; cov["pulse"]++; end
        if (good && code == 3'b110) begin exp_o[at(c)].cal = 1; cov["cal"]++; end
        for (int k = 12; k < len; k++) begin
          logic d = 1'($urandom);
          stream.push_back(d);
          c = stream.size() - 1;
          if (good && (code == 3'b001)) begin
            exp_o[at(c)].mask = 1; exp_o[at(c)].sd = d; sd_care[at(c)] = 1;
          end else if (good && need == LEN_REG16) begin
            exp_o[at(c)].shift = 1; exp_o[at(c)].sd = d; sd_care[at(c)] = 1;
          end
        end
        if (good && need == LEN_REG16) begin
          c = stream.size();      // strobe one clock after the last shift
          case (code)
            3'b000: exp_o[at(c)].scfg = 1;
            3'b010: exp_o[at(c)].sdly = 1;
            3'b011: exp_o[at(c)].sthr = 1;
            default: exp_o[at(c)].sbias = 1;
          endcase
          cov["reg_write"]++;
        end
        if (good && code == 3'b001) cov["mask_write"]++;
        if (!good) cov["ignored_slow"]++;
        if (!mine) cov["other_chip"]++;
        if (addr == 6'b111111) cov["broadcast"]++;
      end
      grow(stream.size() + 2);
    end
  endtask

  initial begin
    obs_t got;
    clrB = 0; command = 0;
    grow(1);
    for (int n = 0; n < 600; n++) begin
      gen_command();
      repeat ($urandom_range(0, 4)) stream.push_back(1'b0);
      grow(stream.size() + 1);
    end
    repeat (8) stream.push_back(1'b0);
    grow(stream.size() + 8);
    repeat (2) @(negedge clk);
    clrB = 1;
    for (int c = 0; c < stream.size() + 2; c++) begin
      @(negedge clk);
      // outputs now show the response to the bits up to c-1
      got = '{l1: level1, l3: level3, srst: !softresetB, bcrst: !bcresetB, cal: calstrobe,
              pulse: pulseinputreg, shift: loadshiftreg, mask: loadmaskreg, scfg: strobeconfigreg,
              sdly: loaddelayreg, sthr: loadthresholdreg, sbias: loadbiasreg, sid: sendidmode,
              sd: sdata};
      if (!sd_care[c]) got.sd = exp_o[c].sd;
      `CHECK(got == exp_o[c], $sformatf("clock %0d: got %b want %b", c, got, exp_o[c]))
      command = (c < stream.size()) ? stream[c] : 1'b0;
    end
    foreach (cov[s]) $display("%s: %0d", s, cov[s]);
    `CHECK(cov.size() == 13, "a command kind was never sent")
    `FINISH
  end
endmodule
