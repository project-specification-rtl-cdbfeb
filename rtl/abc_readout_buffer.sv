// abc_readout_buffer: de-randomising readout buffer ("barrel store").
//
// DEPTH x NCH RAM holding DEPTH/WORDS_PER_EVENT events (24 words = 8 events
// of 3 words in the specification), addressed by cyclic write and read
// pointers. Event bookkeeping is done per event slot: the write pointer is
// slot*3 + word. An event is counted as held once its last word is written
// and is taken out of the count when its first word is read.
// Overflow: when an event starts to be written while all slots are held, the
// writer overwrites the oldest held event; that event is counted in the
// overflow counter (OVF_BITS wide) and OVERFLOW is high while the counter is
// non-zero. Because lost events are always the oldest outstanding ones, every
// event read while the counter is non-zero is a lost one: such a read only
// decrements the counter and leaves the stored data, so no later event is read
// for the wrong trigger. When the counter would pass its maximum (16 lost
// events with 4 bits) ERROR is set and stays set until clrB.
// DATA_AVAIL is high while held or lost events are outstanding.
// Interface: write and read are each high for WORDS_PER_EVENT consecutive
// clocks per event. o is registered, valid the clock after each read clock;
// a read of a word returns the data before any write in the same clock.
// clrB is an asynchronous active-low reset of pointers, counters and flags.
// The lost-event accounting and the slot-based pointers are this design's
// reading of the specification's overflow counter description.
module abc_readout_buffer #(
  parameter int unsigned NCH             = 128,
  parameter int unsigned DEPTH           = 24,
  parameter int unsigned WORDS_PER_EVENT = 3,
  parameter int unsigned OVF_BITS        = 4
) (
  input  logic           clk,
  input  logic           clrB,
  input  logic [NCH-1:0] i,
  input  logic           write,
  input  logic           read,
  output logic [NCH-1:0] o,
  output logic           data_avail,
  output logic           overflow,
  output logic           error
);
  localparam int unsigned NEV = DEPTH / WORDS_PER_EVENT;
  localparam int unsigned SW  = (NEV > 1) ? $clog2(NEV) : 1;
  localparam int unsigned WW  = (WORDS_PER_EVENT > 1) ? $clog2(WORDS_PER_EVENT) : 1;
  localparam int unsigned AW  = $clog2(DEPTH);
  localparam int unsigned CW  = $clog2(NEV + 1);

  logic [NCH-1:0] mem [DEPTH];

  logic [SW-1:0]       wslot_q, rslot_q, cur_slot_q;
  logic [WW-1:0]       wcnt_q, rcnt_q;
  logic [CW-1:0]       nev_q;
  logic [OVF_BITS-1:0] ovf_q;
  logic                err_q;

  logic rd_start, wr_start, wr_last, rd_held, full_at_write;
  logic [SW-1:0] rd_slot;
  logic [AW-1:0] waddr, raddr;

  function automatic logic [SW-1:0] slot_inc(input logic [SW-1:0] s);
    return (s == SW'(NEV - 1)) ? '0 : s + 1'b1;
  endfunction

  assign rd_start = read  && (rcnt_q == '0);
  assign wr_start = write && (wcnt_q == '0);
  assign wr_last  = write && (wcnt_q == WW'(WORDS_PER_EVENT - 1));
  // a read that starts now takes a held event unless lost events come first
  assign rd_held  = rd_start && (ovf_q == '0) && (nev_q != '0);
  // all slots held when a new event starts (after this clock's read start)
  assign full_at_write = wr_start && ((nev_q - CW'(rd_held)) == CW'(NEV));

  assign rd_slot = rd_start ? rslot_q : cur_slot_q;
  assign waddr   = AW'(wslot_q) * AW'(WORDS_PER_EVENT) + AW'(wcnt_q);
  assign raddr   = AW'(rd_slot) * AW'(WORDS_PER_EVENT) + AW'(rcnt_q);

  always_ff @(posedge clk) begin
    if (read)  o <= mem[raddr];
    if (write) mem[waddr] <= i;
  end

  always_ff @(posedge clk or negedge clrB) begin
    if (!clrB) begin
      wslot_q     <= '0;
      rslot_q     <= '0;
      cur_slot_q  <= '0;
      wcnt_q      <= '0;
      rcnt_q      <= '0;
      nev_q       <= '0;
      ovf_q       <= '0;
      err_q       <= 1'b0;
    end else begin
      logic [CW-1:0]       nev_n;
      logic [OVF_BITS-1:0] ovf_n;
      logic [SW-1:0]       rslot_n;
      nev_n   = nev_q;
      ovf_n   = ovf_q;
      rslot_n = rslot_q;

      // read side: the event is claimed on its first word
      if (read) rcnt_q <= (rcnt_q == WW'(WORDS_PER_EVENT - 1)) ? '0 : rcnt_q + 1'b1;
      if (rd_start) begin
        cur_slot_q  <= rslot_q;
        if (ovf_q != '0) begin
          ovf_n = ovf_q - 1'b1;
        end else if (nev_q != '0) begin
          nev_n   = nev_q - 1'b1;
          rslot_n = slot_inc(rslot_q);
        end
      end

      // write side: overwriting the oldest held event when all slots are held
      if (write) wcnt_q <= (wcnt_q == WW'(WORDS_PER_EVENT - 1)) ? '0 : wcnt_q + 1'b1;
      if (full_at_write) begin
        rslot_n = slot_inc(rslot_n);
        nev_n   = nev_n - 1'b1;
        if (ovf_n == '1) err_q <= 1'b1;
        else             ovf_n = ovf_n + 1'b1;
      end
      if (wr_last) begin
        wslot_q <= slot_inc(wslot_q);
        nev_n   = nev_n + 1'b1;
      end

      nev_q   <= nev_n;
      ovf_q   <= ovf_n;
      rslot_q <= rslot_n;
    end
  end

  assign data_avail = (nev_q != '0) || (ovf_q != '0);
  assign overflow   = (ovf_q != '0);
  assign error      = err_q;
endmodule
