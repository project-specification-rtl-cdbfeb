// abc_pipeline: level-1 latency pipeline and accumulator register.
//
// A DEPTH x NCH dual-ported RAM is written every clock at a cyclic address
// pointer that wraps from DEPTH-1 to 0. The read port always reads the
// location that is about to be overwritten, so a read returns the sample taken
// DEPTH clocks earlier: the trigger latency is fixed by DEPTH (132 in the
// specification). An L1 trigger holds level1 high for three clocks and so
// reads three consecutive bunch crossings, oldest first, with the triggered
// crossing in the middle.
// The accumulator register ORs every incoming word, marking each channel hit
// since it was last cleared. With acen (the Accumulate configuration bit) the
// three reads return the accumulator instead of the pipeline, so the readout
// buffer receives three words per trigger in both modes.
// Timing: o is registered and valid (ovalid) the clock after each level1
// clock. clrB (asynchronous, active low; power-up or soft reset) resets the
// pointer and clears the accumulator; the RAM contents are not cleared.
module abc_pipeline #(
  parameter int unsigned NCH   = 128,
  parameter int unsigned DEPTH = 132
) (
  input  logic           clk,
  input  logic           clrB,
  input  logic [NCH-1:0] i,
  input  logic           acen,
  input  logic           level1,
  output logic [NCH-1:0] o,
  output logic           ovalid
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [NCH-1:0] mem [DEPTH];
  logic [AW-1:0]  ptr_q;
  logic [NCH-1:0] acc_q;

  always_ff @(posedge clk) begin
    if (level1) o <= acen ? acc_q : mem[ptr_q];
    mem[ptr_q] <= i;
  end

  always_ff @(posedge clk or negedge clrB) begin
    if (!clrB) begin
      ptr_q  <= '0;
      acc_q  <= '0;
      ovalid <= 1'b0;
    end else begin
      ptr_q  <= (ptr_q == AW'(DEPTH - 1)) ? '0 : ptr_q + 1'b1;
      acc_q  <= acc_q | i;
      ovalid <= level1;
    end
  end
endmodule
