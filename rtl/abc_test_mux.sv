// abc_test_mux: debug multiplexer for internal test points.
//
// A 7-bit counter, cleared by the test_rstB pad (asynchronous, active low;
// the pad has a pull-down so an unused multiplexer rests at test point 0) and
// advanced by each rising edge of the test_clk pad, selects one of 128
// internal test points for the test_out pad. test_strobe is high while the
// counter is 0, so a tester can find the start of the sequence.
module abc_test_mux #(
  parameter int unsigned N = 128
) (
  input  logic         test_clk,
  input  logic         test_rstB,
  input  logic [N-1:0] testpoint,
  output logic         test_strobe,
  output logic         test_out
);
  localparam int unsigned W = $clog2(N);
  logic [W-1:0] sel_q;

  always_ff @(posedge test_clk or negedge test_rstB)
    if (!test_rstB) sel_q <= '0;
    else            sel_q <= (sel_q == W'(N - 1)) ? '0 : sel_q + 1'b1;

  assign test_strobe = (sel_q == '0);
  assign test_out    = testpoint[sel_q];
endmodule
