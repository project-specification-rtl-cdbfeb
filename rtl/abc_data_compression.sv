// abc_data_compression: sparsification of one event into hit channels.
//
// When the readout buffer reports data (dataavail) and no event is in hand,
// the block reads the event's three words (buffrd high for three clocks) and
// transposes them into NCH 3-bit hit patterns, bit 2 being the oldest sample.
// Each pattern is tested against the criterion chosen by mode:
//   00 Hit 1XX/X1X/XX1, 01 Level X1X, 10 Edge 01X, 11 ReadAll XXX.
// The matching channels are then offered one at a time, lowest channel first:
// ch and hit hold the channel and its pattern, datavalid is high, end is high
// with the last matching channel, and adj is high when the next matching
// channel is the adjacent one (ch+1). A pulse on next retires the offered
// channel; the following one is offered on the next clock. After the last
// matching channel (or at once if there is none) the block shows datavalid=0,
// end=1 ("all hits read out or no hits found"); one more next ends the event.
// Events are read but not scanned in send-id mode, after a buffer error (both
// present datavalid=0, end=1) and for a lost event (overflowout=1); the state
// of overflow, error and sendid is taken when the read starts, error and
// send-id taking priority over overflow as the specification orders them.
// busy (an output this design adds) is high while an event is due or being
// loaded, so the readout logic can wait for it instead of reporting that no
// data is available. The whole-vector priority search stands in for the
// channel-by-channel scan of the original chip. clrB: async, active low.
module abc_data_compression
  import abc_pkg::*;
#(
  parameter int unsigned NCH = 128
) (
  input  logic           clk,
  input  logic           clrB,
  input  logic [NCH-1:0] i,
  input  logic           overflow,
  input  logic           error,
  input  logic           sendid,
  input  logic           dataavail,
  input  logic [1:0]     mode,
  input  logic           next,
  output logic           overflowout,
  output logic           adj,
  output logic [6:0]     ch,
  output logic [2:0]     hit,
  output logic           datavalid,
  output logic           end_o,
  output logic           buffrd,
  output logic           busy
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_SCAN, S_FLUSH} state_e;
  localparam int unsigned CHW = (NCH > 1) ? $clog2(NCH) : 1;

  state_e         state_q;
  logic [2:0]     rd_q;        // read strobes issued / words captured
  logic [NCH-1:0] w_q [3];     // w_q[0] = oldest sample
  logic [NCH-1:0] rem_q;       // matching channels not yet offered
  logic           ovf_ev_q, skip_ev_q;

  // criterion per channel from the captured words
  function automatic logic match(input logic [2:0] p, input logic [1:0] m);
    case (ro_mode_e'(m))
      RO_HIT:   return |p;
      RO_LEVEL: return p[1];
      RO_EDGE:  return !p[2] && p[1];
      default:  return 1'b1;
    endcase
  endfunction

  logic [NCH-1:0] match_vec;
  always_comb
    for (int unsigned k = 0; k < NCH; k++)
      match_vec[k] = match({w_q[0][k], w_q[1][k], i[k]}, mode);

  // lowest remaining channel
  logic [CHW-1:0] first;
  logic           any;
  always_comb begin
    first = '0;
    any   = 1'b0;
    for (int k = NCH - 1; k >= 0; k--)
      if (rem_q[k]) begin
        first = CHW'(k);
        any   = 1'b1;
      end
  end

  logic [NCH-1:0] rest;
  assign rest = rem_q & ~(NCH'(1) << first);

  always_ff @(posedge clk or negedge clrB) begin
    if (!clrB) begin
      state_q   <= S_IDLE;
      rd_q      <= '0;
      rem_q     <= '0;
      ovf_ev_q  <= 1'b0;
      skip_ev_q <= 1'b0;
      w_q[0]    <= '0;
      w_q[1]    <= '0;
    end else begin
      case (state_q)
        S_IDLE:
          if (dataavail) begin
            state_q   <= S_LOAD;
            rd_q      <= 3'd1;
            skip_ev_q <= sendid || error;
            ovf_ev_q  <= overflow && !(sendid || error);
          end
        S_LOAD: begin
          // buffer words arrive one clock after each read strobe
          rd_q <= rd_q + 1'b1;
          if (rd_q == 3'd1) w_q[0] <= i;
          if (rd_q == 3'd2) w_q[1] <= i;
          if (rd_q == 3'd3) begin
            // third word is on i now
            rem_q   <= (skip_ev_q || ovf_ev_q) ? '0 : match_vec;
            state_q <= (skip_ev_q || ovf_ev_q) ? S_FLUSH : S_SCAN;
          end
        end
        S_SCAN:
          if (next) begin
            if (any) rem_q <= rest;
            else     state_q <= S_IDLE;
          end
        S_FLUSH:
          if (next) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // third sample of every channel, kept after the load
  logic [NCH-1:0] w2_q;
  always_ff @(posedge clk or negedge clrB)
    if (!clrB)                                  w2_q <= '0;
    else if (state_q == S_LOAD && rd_q == 3'd3) w2_q <= i;

  assign buffrd      = (state_q == S_IDLE && dataavail) || (state_q == S_LOAD && rd_q < 3'd3);
  assign busy        = buffrd || (state_q == S_LOAD);
  assign datavalid   = (state_q == S_SCAN) && any;
  assign end_o       = ((state_q == S_SCAN) && (rest == '0)) ||
                       ((state_q == S_FLUSH) && !ovf_ev_q);
  assign overflowout = (state_q == S_FLUSH) && ovf_ev_q;
  assign ch          = 7'(first);
  assign hit         = {w_q[0][first], w_q[1][first], w2_q[first]};
  assign adj         = datavalid && (int'(first) < NCH - 1) && rem_q[(int'(first) + 1) % NCH];
endmodule
