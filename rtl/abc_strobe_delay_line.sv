// abc_strobe_delay_line: behavioural model of the analogue strobe delay.
//
// Not synthesizable logic: on the chip this is an adjustable analogue delay
// element. The model delays strobein by MIN_PS + delay * STEP_PS picoseconds
// (specification: delay = min_delay + register_value * step_value, 64 steps
// of typically 1.1 ns, minimum 0 ns) with a transport delay, so every edge of
// the strobe is reproduced. The delay setting is sampled at each edge of
// strobein.
module abc_strobe_delay_line #(
  parameter int unsigned STEP_PS = 1100,
  parameter int unsigned MIN_PS  = 0
) (
  input  logic       strobein,
  input  logic [5:0] delay,
  output logic       strobeout
);
  initial strobeout = 1'b0;
  always @(strobein)
    strobeout <= #((MIN_PS + delay * STEP_PS) * 1ps) strobein;
endmodule
