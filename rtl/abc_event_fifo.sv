// abc_event_fifo: event FIFO of the readout controller.
//
// A DEPTH x WIDTH synchronous FIFO (24 x 12 in the specification) that keeps
// the trigger number and bunch-crossing number of every trigger until its
// event is read out. rdata shows the oldest entry whenever empty is low
// (show-ahead); pop removes it. A push into a full FIFO is dropped (the
// specification does not say what happens then). Push and pop may occur in
// the same clock. clrB: asynchronous, active-low clear.
module abc_event_fifo #(
  parameter int unsigned DEPTH = 24,
  parameter int unsigned WIDTH = 12
) (
  input  logic             clk,
  input  logic             clrB,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp_q, rp_q;
  logic [CW-1:0]    cnt_q;
  logic             do_push, do_pop;

  assign empty   = (cnt_q == '0);
  assign full    = (cnt_q == CW'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign rdata   = mem[rp_q];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk)
    if (do_push) mem[wp_q] <= wdata;

  always_ff @(posedge clk or negedge clrB) begin
    if (!clrB) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wp_q <= inc(wp_q);
      if (do_pop)  rp_q <= inc(rp_q);
      cnt_q <= cnt_q + CW'(do_push) - CW'(do_pop);
    end
  end
endmodule
