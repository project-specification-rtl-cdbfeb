// abc_calibration_logic: calibration strobe and code for the front-end chip.
//
// The 2-bit calibration code (CALD1:0) is the Cal_Mode field of the
// configuration register and selects which quarter of the front-end channels
// is pulsed. A calibration command (one-clock calstrobe pulse) starts a strobe
// pulse on the next clock, a fixed number of clocks after the command as the
// specification requires, WIDTH clocks long: 5 clocks of 25 ns give the
// specified minimum width of 125 ns. The pulse then passes through the strobe
// delay line to the CALSP/CALSN outputs. A calstrobe arriving during a
// pulse restarts the count. clrB: async, active low.
// The strobe feeds the behavioural delay line, which reacts to its edges, so
// a lint tool may see the counter both as clocked logic and as an event
// source; that is intended.
module abc_calibration_logic #(
  parameter int unsigned WIDTH = 5
) (
  input  logic       clk,
  input  logic       clrB,
  input  logic       calstrobe,
  input  logic [1:0] calmode,
  output logic       strobe,
  output logic [1:0] calcode
);
  localparam int unsigned CW = $clog2(WIDTH + 1);
  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge clrB)
    if (!clrB)              cnt_q <= '0;
    else if (calstrobe)     cnt_q <= CW'(WIDTH);
    else if (cnt_q != '0)   cnt_q <= cnt_q - 1'b1;

  assign strobe  = (cnt_q != '0);
  assign calcode = calmode;
endmodule
