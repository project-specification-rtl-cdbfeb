// abc_readout_logic: token-driven serialiser of the chip's data block.
//
// The block waits for the token. When it arrives it chooses one data block
// and shifts it out on dataout, MS bit first, one bit per clock:
//   send-id mode       <000><aaaa><111><config 15:8><1><config 7:0><1>
//   buffer error       <000><aaaa><100><1>
//   lost event         <000><aaaa><010><1>
//   no event at all    <000><aaaa><001><1>   (error packets only in data taking)
//   no hit channel     <001>
//   hit channels       <01><aaaa><ccccccc><1><ddd> for the first channel of a
//                      group and <1><ddd> for each further adjacent channel
// (aaaa = id(3:0), ccccccc = channel, ddd = hit pattern oldest bit first).
// Hit packets are built one segment at a time from the data compression
// outputs; next is pulsed when a segment is taken, once more when the last
// segment of a hit packet ends (closing the event, whose compression logic
// then shows "all hits read out"), and when a send-id, error, lost-event or
// no-hit event is answered, so the compression logic retires it.
// A token arriving while the compression logic is still loading an event
// (busy) is held until the event is ready.
// Timing: dataout is registered; the first bit leaves the clock after the
// token is seen. tokenout is a one-clock pulse one clock before the last own
// bit, so the next chip's first bit, relayed back through datain, follows the
// last own bit without a gap. Whenever the block is not sending it relays
// datain to dataout through one register. clrB: async, active low.
// Packet formats follow the specification's format figures; the segment
// scheme, the error priority and the token timing are this design's choices.
module abc_readout_logic
  import abc_pkg::*;
(
  input  logic        clk,
  input  logic        clrB,
  input  logic        datain,
  input  logic        tokenin,
  input  logic [6:0]  ch,
  input  logic [2:0]  hit,
  input  logic        datavalid,
  input  logic        adj,
  input  logic        end_i,
  input  logic        busy,
  input  logic [3:0]  id,
  input  logic        overflow,
  input  logic        error,
  input  logic        sendid,
  input  logic [15:0] config_i,
  output logic        dataout,
  output logic        tokenout,
  output logic        next
);
  localparam int unsigned SEGW = 28;
  typedef logic [SEGW-1:0] seg_t;

  logic       sending_q, physics_q, in_group_q, tok_pend_q;
  seg_t       sh_q;
  logic [4:0] n_q;          // bits of the current segment still to send

  logic token_now, start, have_event;
  assign token_now  = tokenin || tok_pend_q;
  assign start      = !sending_q && token_now && !busy;
  assign have_event = datavalid || end_i || overflow;

  // first segment of a new data block
  seg_t       first_seg;
  logic [4:0] first_len;
  logic       first_physics;
  always_comb begin
    first_seg     = '0;
    first_len     = 5'd3;
    first_physics = 1'b0;
    if (sendid) begin
      first_seg = {LEAD_INFO, id, CFG_MARK, config_i[15:8], 1'b1, config_i[7:0], 1'b1};
      first_len = 5'd28;
    end else if (error || overflow || !have_event) begin
      first_seg = {LEAD_INFO, id, error ? ERR_BUFFER : overflow ? ERR_OVERFLOW : ERR_NODATA,
                   1'b1, 17'b0};
      first_len = 5'd11;
    end else if (datavalid) begin
      first_seg     = {LEAD_HIT, id, ch, 1'b1, hit, 11'b0};
      first_len     = 5'd17;
      first_physics = 1'b1;
    end else begin
      first_seg = {LEAD_NOHIT, 25'b0};
      first_len = 5'd3;
    end
  end

  // following hit segment
  seg_t       cont_seg;
  logic [4:0] cont_len;
  always_comb begin
    if (in_group_q) begin
      cont_seg = {1'b1, hit, 24'b0};
      cont_len = 5'd4;
    end else begin
      cont_seg = {LEAD_HIT, id, ch, 1'b1, hit, 11'b0};
      cont_len = 5'd17;
    end
  end

  logic more;   // another hit segment follows the current one
  assign more = physics_q && datavalid;

  logic take_cont;
  assign take_cont = sending_q && (n_q == 5'd1) && more;
  logic close_ev;
  assign close_ev  = sending_q && (n_q == 5'd1) && physics_q && !more;
  assign next      = (start && have_event) || take_cont || close_ev;

  always_ff @(posedge clk or negedge clrB) begin
    if (!clrB) begin
      sending_q  <= 1'b0;
      physics_q  <= 1'b0;
      in_group_q <= 1'b0;
      tok_pend_q <= 1'b0;
      sh_q       <= '0;
      n_q        <= '0;
      dataout    <= 1'b0;
      tokenout   <= 1'b0;
    end else begin
      tokenout <= 1'b0;
      if (!sending_q) begin
        tok_pend_q <= token_now && busy;
        if (start) begin
          dataout    <= first_seg[SEGW-1];
          sh_q       <= first_seg << 1;
          n_q        <= first_len - 1'b1;
          physics_q  <= first_physics;
          in_group_q <= first_physics && adj;
          sending_q  <= 1'b1;
        end else begin
          dataout <= datain;
        end
      end else begin
        dataout <= sh_q[SEGW-1];
        sh_q    <= sh_q << 1;
        n_q     <= n_q - 1'b1;
        if (n_q == 5'd2 && !more) tokenout <= 1'b1;
        if (n_q == 5'd1) begin
          if (more) begin
            sh_q       <= cont_seg;
            n_q        <= cont_len;
            in_group_q <= adj;
          end else begin
            sending_q <= 1'b0;
          end
        end
      end
    end
  end
endmodule
