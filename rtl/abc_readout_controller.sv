// abc_readout_controller: master readout control and chain trailer.
//
// Master side (header_enable): a 4-bit L1 counter and an 8-bit bunch-crossing
// counter tag each trigger; on every level1 their values are pushed into the
// 24 x 12 event FIFO. The token generator waits until the FIFO is not empty,
// takes the oldest entry, optionally waits 4 clocks (dataout_delay, the
// Dataout Delay configuration bit), and sends on the datalink the 5-bit
// preamble 11101 and the 14-bit header <0><nnnn><bbbbbbbb><1>, MS bits
// first. It hands the token to the chip's own readout logic so that the first
// data bit follows the header without a gap, then forwards the chain data to
// the datalink and watches it for the trailer (a 1 followed by 15 zeros).
// After the trailer the next FIFO entry is served.
// End chip (trailer_enable): after the readout logic passes its token
// (token_back), the trailer is inserted in dataout right after the last
// data bit. Otherwise dataout is datain.
// Clock feed-through (feedthrough): the datalink toggles every clock, giving
// clk/2.
// Counters: the L1 counter counts triggers, the BC counter counts clocks and
// is zeroed by bcresetB; both are zeroed by clrB (power-up or soft reset).
// The values pushed are those the counters take at the trigger clock, which
// gives trigger number 1 for the first trigger after a reset and bunch
// crossing 3 for a trigger command sent right after a BC or soft reset, as the
// specification states. Timing: datalink is registered; tokenout is high for
// one clock while header bit 17 (of 0..18) is on the datalink, so the first
// readout bit follows the header without a gap. clrB: asynchronous, active low.
module abc_readout_controller
  import abc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 24,
  parameter int unsigned DELAY_CLKS = 4
) (
  input  logic clk,
  input  logic clrB,
  input  logic level1,
  input  logic bcresetB,
  input  logic header_enable,
  input  logic trailer_enable,
  input  logic datain,
  input  logic token_back,
  input  logic dataout_delay,
  input  logic feedthrough,
  output logic tokenout,
  output logic dataout,
  output logic datalink,
  output logic fifo_empty,
  output logic fifo_full
);
  typedef enum logic [1:0] {R_IDLE, R_DELAY, R_HEADER, R_DATA} rstate_e;

  logic [3:0]  l1_q;
  logic [7:0]  bc_q;
  logic [11:0] fifo_rdata;
  logic        fifo_pop;

  // counters
  always_ff @(posedge clk or negedge clrB) begin
    if (!clrB) begin
      l1_q <= '0;
      bc_q <= '0;
    end else begin
      bc_q <= bcresetB ? bc_q + 1'b1 : '0;
      if (level1) l1_q <= l1_q + 1'b1;
    end
  end

  abc_event_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(12)) u_fifo (
    .clk   (clk),
    .clrB  (clrB),
    .push  (level1 && header_enable),
    .wdata ({l1_q + 4'd1, bc_q + 8'd1}),
    .pop   (fifo_pop),
    .rdata (fifo_rdata),
    .empty (fifo_empty),
    .full  (fifo_full)
  );

  // trailer insertion on the end chip
  logic       tb_d_q;
  logic [4:0] tcnt_q;
  always_ff @(posedge clk or negedge clrB) begin
    if (!clrB) begin
      tb_d_q <= 1'b0;
      tcnt_q <= '0;
    end else begin
      tb_d_q <= token_back && trailer_enable;
      if (tb_d_q)               tcnt_q <= 5'd16;
      else if (tcnt_q != '0)    tcnt_q <= tcnt_q - 1'b1;
    end
  end
  assign dataout = (tcnt_q != '0) ? (tcnt_q == 5'd16) : datain;

  // token generation and header formatting
  rstate_e     st_q;
  logic [18:0] hdr_q;
  logic [4:0]  cnt_q;
  logic [14:0] mon_q;
  logic        dl_q, ft_q;

  assign fifo_pop = (st_q == R_IDLE) && header_enable && !fifo_empty;

  always_ff @(posedge clk or negedge clrB) begin
    if (!clrB) begin
      st_q     <= R_IDLE;
      hdr_q    <= '0;
      cnt_q    <= '0;
      mon_q    <= '0;
      dl_q     <= 1'b0;
      tokenout <= 1'b0;
    end else begin
      tokenout <= 1'b0;
      dl_q     <= 1'b0;
      case (st_q)
        R_IDLE:
          if (fifo_pop) begin
            hdr_q <= {PREAMBLE, 1'b0, fifo_rdata, 1'b1};
            cnt_q <= dataout_delay ? 5'(DELAY_CLKS) : 5'd0;
            st_q  <= dataout_delay ? R_DELAY : R_HEADER;
          end
        R_DELAY: begin
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == 5'd1) st_q <= R_HEADER;
        end
        R_HEADER: begin
          dl_q  <= hdr_q[18];
          hdr_q <= hdr_q << 1;
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == 5'd17) tokenout <= 1'b1;
          if (cnt_q == 5'd18) begin
            st_q  <= R_DATA;
            mon_q <= '0;
          end
        end
        R_DATA: begin
          dl_q  <= dataout;
          mon_q <= {mon_q[13:0], dataout};
          if ({mon_q[14:0], dataout} == TRAILER) st_q <= R_IDLE;
        end
        default: st_q <= R_IDLE;
      endcase
      if (st_q == R_IDLE && !fifo_pop) cnt_q <= '0;
    end
  end

  // clock feed-through: clk/2 on the datalink
  always_ff @(posedge clk or negedge clrB)
    if (!clrB) ft_q <= 1'b0;
    else       ft_q <= !ft_q;

  assign datalink = !header_enable ? 1'b0 : feedthrough ? ft_q : dl_q;
endmodule
