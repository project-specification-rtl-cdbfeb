// abc_chip: one ABC binary readout chip for 128 silicon strips.
//
// Every 25 ns bunch crossing the chip samples the 128 discriminated strip
// signals of its front-end chip (hit_in) through the input register, with
// optional edge detection and a per-channel mask, and writes them into a
// 132-deep pipeline. A level-1 trigger command copies three crossings
// (previous, triggered, next) of that pipeline, or three copies of the hit
// accumulator, into the 8-event readout buffer. The data compression logic
// keeps only channels whose 3-bit pattern meets the selected criterion, and
// the readout logic sends them as hit packets when the token reaches the
// chip. Chips are read out in a token chain: the master chip (masterB pad
// low, configuration bit 11 clear) tags each trigger with its L1 and
// bunch-crossing counts, sends preamble and header on the datalink, hands
// the token to its own readout logic and forwards all chain data to the
// datalink until the end chip's trailer has passed. Slaves return their data
// to the chip on their left through the data outputs; normal/bypass input
// and output pairs let the chain route around a dead chip.
// Control arrives as a serial command stream (clock/command pair chosen by
// select_pad): triggers, soft and BC resets, and addressed slow commands that
// load the configuration, mask, strobe delay and DAC registers, pulse the
// input test circuit, fire the calibration strobe and enable data taking.
// Resets: resetB (pad/power-up reset, asynchronous, active low) clears
// everything; the soft reset command clears pipeline pointer, accumulator,
// readout buffer, compression, readout and controller state and the
// counters, but no register.
// Interface notes: only the positive legs of differential inputs are
// modelled; analogue front-end inputs arrive as logic levels; the DAC outputs
// are numeric models in nanoamps; the strobe delay is a behavioural delay.
// Clock feed-through (master with configuration bit 13 clear, the power-up
// state of a master) puts clk/2 on the datalink.
// Test multiplexer points follow the specification's test-point table where
// this design has the signal; the other points read 0.
module abc_chip
  import abc_pkg::*;
#(
  parameter int unsigned NCH        = 128,
  parameter int unsigned PIPE_DEPTH = 132,
  parameter int unsigned RB_DEPTH   = 24
) (
  // clock and command inputs
  input  logic               clk0,
  input  logic               clk1,
  input  logic               com0,
  input  logic               com1,
  input  logic               select_pad,
  input  logic               resetB,
  input  logic               masterB,
  input  logic [4:0]         id_pad,
  // front-end
  input  logic [NCH-1:0]     hit_in,
  output logic [1:0]         cald,
  output logic               calsp,
  output logic               calsn,
  // token and data chain
  input  logic               tokenin0,
  input  logic               tokenin1,
  input  logic               datain0,
  input  logic               datain1,
  output logic               tokenout0,
  output logic               tokenout0B,
  output logic               tokenout1,
  output logic               tokenout1B,
  output logic               dataout0,
  output logic               dataout0B,
  output logic               dataout1,
  output logic               dataout1B,
  output logic               datalink,
  output logic               datalinkB,
  // DACs
  input  logic signed [31:0] iref_na,
  output logic [7:0]         ith_code,
  output logic [7:0]         cali_code,
  output logic [3:0]         ivi1_code,
  output logic signed [31:0] ith_na,
  output logic signed [31:0] cali_na,
  output logic signed [31:0] ivi1_na,
  // test multiplexer pads
  input  logic               test_clk,
  input  logic               test_rstB,
  output logic               test_strobe,
  output logic               test_out
);
  logic clk, command;
  logic [5:0] id;
  assign id = {1'b1, id_pad};

  abc_clk_cmd_select u_clksel (
    .clk0(clk0), .clk1(clk1), .com0(com0), .com1(com1),
    .select_i(select_pad), .clk(clk), .command(command)
  );

  // ---------------- command decoder and registers ----------------
  logic sendidmode, softresetB, calstrobe, loadmaskreg, level1, level3;
  logic loadshiftreg, strobeconfigreg, loaddelayreg, loadthresholdreg;
  logic loadbiasreg, bcresetB, pulseinputreg, sdata;

  abc_command_decoder u_dec (
    .clk(clk), .clrB(resetB), .id(id), .command(command),
    .sendidmode(sendidmode), .softresetB(softresetB), .calstrobe(calstrobe),
    .loadmaskreg(loadmaskreg), .level1(level1), .level3(level3),
    .loadshiftreg(loadshiftreg), .strobeconfigreg(strobeconfigreg),
    .loaddelayreg(loaddelayreg), .loadthresholdreg(loadthresholdreg),
    .loadbiasreg(loadbiasreg), .bcresetB(bcresetB),
    .pulseinputreg(pulseinputreg), .sdata(sdata)
  );

  // buffer reset: power-up/pad reset or soft reset
  logic clrB_buf;
  assign clrB_buf = resetB && softresetB;

  logic [15:0] cfg, shiftreg;
  abc_config_register u_cfg (
    .clk(clk), .clrB(resetB), .shift(loadshiftreg), .load(strobeconfigreg),
    .in(sdata), .dataout(cfg), .shiftreg(shiftreg)
  );

  logic master, feedthrough;
  assign master      = !(cfg[CFG_MASTER_N] || masterB);
  assign feedthrough = master && !cfg[CFG_FEED_N];

  // ---------------- front end: translators, input register, pipeline ----------------
  logic [NCH-1:0] ilt_o, ireg_o, pipe_o, rb_o;
  logic [3:0]     ilt_en;
  logic           pipe_v;

  abc_input_translator #(.NCH(NCH)) u_ilt (
    .i(hit_in), .test_inputs(cfg[CFG_TEST_MODE]), .pulseinputreg(pulseinputreg),
    .calmode(cfg[CFG_CALMODE_LO +: 2]), .o(ilt_o), .en(ilt_en)
  );

  abc_input_register #(.NCH(NCH)) u_ireg (
    .clk(clk), .clrB(resetB), .i(ilt_o), .edgemode(cfg[CFG_EDGE]),
    .load(loadmaskreg), .sin(sdata), .mode(cfg[CFG_MASK]), .o(ireg_o)
  );

  abc_pipeline #(.NCH(NCH), .DEPTH(PIPE_DEPTH)) u_pipe (
    .clk(clk), .clrB(clrB_buf), .i(ireg_o), .acen(cfg[CFG_ACCUM]),
    .level1(level3), .o(pipe_o), .ovalid(pipe_v)
  );

  // ---------------- readout buffer and data compression ----------------
  logic rb_avail, rb_overflow, rb_error, buffrd;
  abc_readout_buffer #(.NCH(NCH), .DEPTH(RB_DEPTH)) u_rb (
    .clk(clk), .clrB(clrB_buf), .i(pipe_o), .write(pipe_v), .read(buffrd),
    .o(rb_o), .data_avail(rb_avail), .overflow(rb_overflow), .error(rb_error)
  );

  logic       dcl_ovf, dcl_adj, dcl_valid, dcl_end, dcl_busy, rol_next;
  logic [6:0] dcl_ch;
  logic [2:0] dcl_hit;
  abc_data_compression #(.NCH(NCH)) u_dcl (
    .clk(clk), .clrB(clrB_buf), .i(rb_o), .overflow(rb_overflow), .error(rb_error),
    .sendid(sendidmode), .dataavail(rb_avail), .mode(cfg[CFG_MODE_LO +: 2]),
    .next(rol_next), .overflowout(dcl_ovf), .adj(dcl_adj), .ch(dcl_ch),
    .hit(dcl_hit), .datavalid(dcl_valid), .end_o(dcl_end), .buffrd(buffrd),
    .busy(dcl_busy)
  );

  // ---------------- token / data chain ----------------
  logic tok_in_sel, dat_in_sel, rol_tokenin, rol_dataout, rol_tokenout;
  logic roc_tokenout, roc_dataout, roc_fifo_empty, roc_fifo_full;

  abc_token_data_in u_tokin (
    .in0(tokenin0), .in1(tokenin1), .bypassin(cfg[CFG_IN_BYPASS]), .out(tok_in_sel)
  );
  abc_token_data_in u_datin (
    .in0(datain0), .in1(datain1), .bypassin(cfg[CFG_IN_BYPASS]), .out(dat_in_sel)
  );

  // the master's readout logic takes its token from its own controller
  assign rol_tokenin = master ? roc_tokenout : tok_in_sel;

  abc_readout_logic u_rol (
    .clk(clk), .clrB(clrB_buf), .datain(dat_in_sel), .tokenin(rol_tokenin),
    .ch(dcl_ch), .hit(dcl_hit), .datavalid(dcl_valid), .adj(dcl_adj),
    .end_i(dcl_end), .busy(dcl_busy), .id(id[3:0]), .overflow(dcl_ovf),
    .error(rb_error), .sendid(sendidmode), .config_i(cfg),
    .dataout(rol_dataout), .tokenout(rol_tokenout), .next(rol_next)
  );

  abc_readout_controller u_roc (
    .clk(clk), .clrB(clrB_buf), .level1(level1), .bcresetB(bcresetB),
    .header_enable(master), .trailer_enable(cfg[CFG_END]),
    .datain(rol_dataout), .token_back(rol_tokenout),
    .dataout_delay(cfg[CFG_DOUT_DELAY]), .feedthrough(feedthrough),
    .tokenout(roc_tokenout), .dataout(roc_dataout), .datalink(datalink),
    .fifo_empty(roc_fifo_empty), .fifo_full(roc_fifo_full)
  );
  assign datalinkB = !datalink;

  abc_token_data_out u_tokout (
    .in(rol_tokenout), .bypassout(cfg[CFG_OUT_BYPASS]),
    .out0(tokenout0), .out0B(tokenout0B), .out1(tokenout1), .out1B(tokenout1B)
  );
  abc_token_data_out u_datout (
    .in(roc_dataout), .bypassout(cfg[CFG_OUT_BYPASS]),
    .out0(dataout0), .out0B(dataout0B), .out1(dataout1), .out1B(dataout1B)
  );

  // ---------------- calibration ----------------
  logic       cal_strobe;
  logic [5:0] strobe_delay;
  abc_calibration_logic u_cal (
    .clk(clk), .clrB(resetB), .calstrobe(calstrobe),
    .calmode(cfg[CFG_CALMODE_LO +: 2]), .strobe(cal_strobe), .calcode(cald)
  );
  abc_strobe_delay_register u_sdr (
    .clk(clk), .clrB(resetB), .load(loaddelayreg), .data(shiftreg[7:0]),
    .delay(strobe_delay)
  );
  abc_strobe_delay_line u_sdl (
    .strobein(cal_strobe), .delay(strobe_delay), .strobeout(calsp)
  );
  assign calsn = !calsp;

  // ---------------- DACs ----------------
  abc_dac_register u_dacr (
    .clk(clk), .clrB(resetB), .loadthresholdreg(loadthresholdreg),
    .loadbiasreg(loadbiasreg), .data(shiftreg), .threshold(ith_code),
    .calamp(cali_code), .biasamp(ivi1_code)
  );
  abc_dacs u_dacs (
    .threshold(ith_code), .calamp(cali_code), .biasamp(ivi1_code),
    .iref_na(iref_na), .ith_na(ith_na), .cali_na(cali_na), .ivi1_na(ivi1_na)
  );

  // ---------------- test multiplexer ----------------
  logic [127:0] tp;
  always_comb begin
    tp        = '0;
    tp[3:0]   = ilt_en;
    tp[4]     = rol_dataout;
    tp[5]     = rb_avail;
    tp[6]     = rb_error;
    tp[7]     = rb_overflow;
    tp[13]    = buffrd;
    tp[14]    = dcl_valid;
    tp[21:15] = dcl_ch;
    tp[22]    = dcl_adj;
    tp[25:23] = dcl_hit;
    tp[26]    = dcl_end;
    tp[27]    = dcl_ovf;
    tp[74]    = dat_in_sel;
    tp[75]    = rol_tokenout;
    tp[76]    = roc_dataout;
    tp[77]    = datalink;
    tp[78]    = roc_tokenout;
    tp[79]    = rol_tokenout;
    tp[80]    = roc_fifo_full;
    tp[86]    = roc_fifo_empty;
    tp[96]    = cal_strobe;
    tp[97]    = level1;
    tp[98]    = level3;
    tp[99]    = bcresetB;
    tp[100]   = calstrobe;
    tp[103]   = loadshiftreg;
    tp[104]   = loaddelayreg;
    tp[105]   = loadmaskreg;
    tp[106]   = loadthresholdreg;
    tp[107]   = pulseinputreg;
    tp[110]   = sendidmode;
    tp[111]   = softresetB;
    tp[112]   = !strobeconfigreg;
    tp[114]   = loadbiasreg;
    tp[115]   = clk0;
    tp[116]   = clk1;
    tp[117]   = com0;
    tp[118]   = com1;
    tp[119]   = tok_in_sel;
    tp[120]   = dat_in_sel;
    tp[121]   = tokenout0;
    tp[122]   = tokenout1;
    tp[123]   = dataout0;
    tp[124]   = dataout1;
    tp[125]   = datalink;
    tp[126]   = clrB_buf;
    tp[127]   = resetB;
  end

  abc_test_mux #(.N(128)) u_tmux (
    .test_clk(test_clk), .test_rstB(test_rstB), .testpoint(tp),
    .test_strobe(test_strobe), .test_out(test_out)
  );
endmodule
