// abc_input_register: input register, edge detector and channel mask register.
//
// Every clock the 128 translator outputs are latched. With edgemode (the
// Edge_Detect configuration bit) a channel gives a single one-clock "1" for
// each low-to-high transition, however long the input stays high; it is the
// latched sample AND NOT the previous latched sample. The 128-bit mask
// register then either masks the data (mode=0: a 0 turns a channel off) or,
// in test mode (mode=1, the Mask configuration bit), replaces the data so the
// mask contents are written into the pipeline each clock.
// The mask register is loaded serially: while load is high it shifts one bit
// per clock from sin towards higher channels, so after 128 bits the first bit
// sent sits at channel 127 (the command sends channel 127 first).
// o is combinational from registers, i.e. it changes one clock after the input
// is sampled. clrB (asynchronous, active low) clears all registers; the clear
// value of the mask (all channels off) is this design's choice.
module abc_input_register #(
  parameter int unsigned NCH = 128
) (
  input  logic           clk,
  input  logic           clrB,
  input  logic [NCH-1:0] i,
  input  logic           edgemode,
  input  logic           load,
  input  logic           sin,
  input  logic           mode,
  output logic [NCH-1:0] o
);
  logic [NCH-1:0] sample_q, prev_q, mask_q, data;

  always_ff @(posedge clk or negedge clrB) begin
    if (!clrB) begin
      sample_q <= '0;
      prev_q   <= '0;
      mask_q   <= '0;
    end else begin
      sample_q <= i;
      prev_q   <= sample_q;
      if (load) mask_q <= {mask_q[NCH-2:0], sin};
    end
  end

  assign data = edgemode ? (sample_q & ~prev_q) : sample_q;
  assign o    = mode ? mask_q : (data & mask_q);
endmodule
