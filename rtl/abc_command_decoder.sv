// abc_command_decoder: serial command decoder.
//
// One command bit is sampled per clock. A command starts with the first 1
// seen while idle. Field 1 (3 bits): 110 is a level-1 trigger, 101 a control
// command, anything else is dropped at once. Field 2 (4 bits): 0100 soft
// reset, 0010 BC reset, 0111 slow command; other values are dropped after
// these 4 bits. A slow command carries field 3 (8-bit length N of the rest),
// field 4 (6-bit address), field 5 (6-bit code) and, for register writes,
// field 6 (data, MS bit first). The decoder always consumes exactly N bits
// after field 3, so chips that are not addressed or that meet an unknown or
// malformed command stay in step. A command is executed only if the address
// equals the chip address id(5:0) (whose MS bit is 1) or 111111, field 5 is
// one of the eight codes (low 3 bits 000) and N is the length that code needs
// (28 for 16-bit registers, 140 for the mask, 12 without data).
// Outputs (all registered):
//   level1 one-clock pulse after the third trigger bit; level3 high for the
//   three clocks starting with it.
//   softresetB / bcresetB one-clock low pulses.
//   loadshiftreg with sdata: one clock per field-6 bit of a 16-bit register
//   write, shifting the bit into the shared shift register; the matching
//   strobeconfigreg / loaddelayreg / loadthresholdreg / loadbiasreg pulse
//   follows one clock after the last shift.
//   loadmaskreg with sdata: one clock per mask bit (channel 127 first).
//   pulseinputreg, calstrobe: one-clock pulses.
//   sendidmode: set by reset and by every addressed command whose field-5 MS
//   bit is 0, cleared by the enable-data-taking command.
// clrB (power-up reset, async, active low) clears the decoder; soft reset,
// which this block generates, does not reach it. The start-bit rule, the
// address match and the exact output timing are this design's choices.
module abc_command_decoder
  import abc_pkg::*;
(
  input  logic       clk,
  input  logic       clrB,
  input  logic [5:0] id,
  input  logic       command,
  output logic       sendidmode,
  output logic       softresetB,
  output logic       calstrobe,
  output logic       loadmaskreg,
  output logic       level1,
  output logic       level3,
  output logic       loadshiftreg,
  output logic       strobeconfigreg,
  output logic       loaddelayreg,
  output logic       loadthresholdreg,
  output logic       loadbiasreg,
  output logic       bcresetB,
  output logic       pulseinputreg,
  output logic       sdata
);
  typedef enum logic [2:0] {D_IDLE, D_F1, D_F2, D_F3, D_BODY} dstate_e;

  dstate_e    st_q;
  logic [6:0] sr_q;       // field being collected
  logic [7:0] cnt_q;      // bits collected in the current field / body
  logic [7:0] len_q;      // field 3
  logic [5:0] addr_q;     // field 4
  logic       ok_q;       // command addressed and well formed (valid after field 5)
  slow_cmd_e  code_q;
  logic [1:0] l3_q;
  logic       fin_q;      // last data bit of a 16-bit register write taken

  logic [7:0] sr_n;
  assign sr_n = {sr_q[6:0], command};

  // required length for each slow code
  function automatic logic [7:0] need_len(input slow_cmd_e c);
    case (c)
      SC_CONFIG, SC_DELAY, SC_THRCAL, SC_BIAS: return LEN_REG16;
      SC_MASK:                                  return LEN_MASK;
      default:                                  return LEN_SHORT;
    endcase
  endfunction

  logic addr_match;
  assign addr_match = (addr_q == id) || (addr_q == 6'b111111);

  always_ff @(posedge clk or negedge clrB) begin
    if (!clrB) begin
      st_q             <= D_IDLE;
      sr_q             <= '0;
      cnt_q            <= '0;
      len_q            <= '0;
      addr_q           <= '0;
      ok_q             <= 1'b0;
      code_q           <= SC_CONFIG;
      l3_q             <= '0;
      fin_q            <= 1'b0;
      sendidmode       <= 1'b1;
      softresetB       <= 1'b1;
      bcresetB         <= 1'b1;
      calstrobe        <= 1'b0;
      loadmaskreg      <= 1'b0;
      level1           <= 1'b0;
      level3           <= 1'b0;
      loadshiftreg     <= 1'b0;
      strobeconfigreg  <= 1'b0;
      loaddelayreg     <= 1'b0;
      loadthresholdreg <= 1'b0;
      loadbiasreg      <= 1'b0;
      pulseinputreg    <= 1'b0;
      sdata            <= 1'b0;
    end else begin
      // default pulse values
      softresetB       <= 1'b1;
      bcresetB         <= 1'b1;
      calstrobe        <= 1'b0;
      loadmaskreg      <= 1'b0;
      level1           <= 1'b0;
      loadshiftreg     <= 1'b0;
      strobeconfigreg  <= 1'b0;
      loaddelayreg     <= 1'b0;
      loadthresholdreg <= 1'b0;
      loadbiasreg      <= 1'b0;
      pulseinputreg    <= 1'b0;
      sdata            <= command;
      fin_q            <= 1'b0;

      // level3: three clocks starting with level1
      if (l3_q != '0) l3_q <= l3_q - 1'b1;
      level3 <= (l3_q != '0);

      // register strobe one clock after the last shift
      if (fin_q) begin
        strobeconfigreg  <= (code_q == SC_CONFIG);
        loaddelayreg     <= (code_q == SC_DELAY);
        loadthresholdreg <= (code_q == SC_THRCAL);
        loadbiasreg      <= (code_q == SC_BIAS);
      end

      sr_q  <= sr_n[6:0];
      cnt_q <= cnt_q + 1'b1;
      case (st_q)
        D_IDLE: begin
          cnt_q <= 8'd1;
          if (command) st_q <= D_F1;
        end
        D_F1:
          if (cnt_q == 8'd2) begin
            cnt_q <= '0;
            if (sr_n[2:0] == F1_L1) begin
              level1 <= 1'b1;
              level3 <= 1'b1;
              l3_q   <= 2'd2;
              st_q   <= D_IDLE;
            end else if (sr_n[2:0] == F1_CTRL) begin
              st_q <= D_F2;
            end else begin
              st_q <= D_IDLE;
            end
          end
        D_F2:
          if (cnt_q == 8'd3) begin
            cnt_q <= '0;
            st_q  <= D_IDLE;
            if (sr_n[3:0] == F2_SOFTRST) softresetB <= 1'b0;
            if (sr_n[3:0] == F2_BCRST)   bcresetB   <= 1'b0;
            if (sr_n[3:0] == F2_SLOW)    st_q       <= D_F3;
          end
        D_F3:
          if (cnt_q == 8'd7) begin
            cnt_q <= '0;
            len_q <= sr_n;
            ok_q  <= 1'b0;
            st_q  <= (sr_n == 8'd0) ? D_IDLE : D_BODY;
          end
        D_BODY: begin
          if (cnt_q == 8'd5) addr_q <= sr_n[5:0];
          if (cnt_q == 8'd11) begin
            code_q <= slow_cmd_e'(sr_n[5:3]);
            ok_q   <= addr_match && (sr_n[2:0] == 3'b000) &&
                      (len_q == need_len(slow_cmd_e'(sr_n[5:3])));
            if (addr_match && !sr_n[5]) sendidmode <= 1'b1;
            if (addr_match && (sr_n[2:0] == 3'b000) && (len_q == LEN_SHORT))
              case (slow_cmd_e'(sr_n[5:3]))
                SC_PULSE:  pulseinputreg <= 1'b1;
                SC_ENABLE: sendidmode    <= 1'b0;
                SC_CAL:    calstrobe     <= 1'b1;
                default: ;
              endcase
          end
          if (cnt_q >= 8'd12 && ok_q) begin
            if (code_q == SC_MASK) loadmaskreg  <= 1'b1;
            else                   loadshiftreg <= 1'b1;
            if (cnt_q == len_q - 8'd1 && code_q != SC_MASK) fin_q <= 1'b1;
          end
          if (cnt_q == len_q - 8'd1) begin
            st_q  <= D_IDLE;
            cnt_q <= '0;
          end
        end
        default: st_q <= D_IDLE;
      endcase
    end
  end
endmodule
