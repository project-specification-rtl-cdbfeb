// abc_strobe_delay_register: calibration strobe delay setting.
//
// The specification's 8-bit register of which only the low 6 bits are used;
// the two unused MS bits are not stored here. The 6 bits set the delay of the
// calibration strobe in 64 steps. It is loaded from the low byte of the
// shared command shift register on the clock of the one-clock load pulse (the
// specification latches on the falling edge of load). clrB (async, active
// low) clears it; the specification does not say what resets it.
module abc_strobe_delay_register (
  input  logic       clk,
  input  logic       clrB,
  input  logic       load,
  input  logic [7:0] data,
  output logic [5:0] delay
);
  logic [5:0] reg_q;

  always_ff @(posedge clk or negedge clrB)
    if (!clrB)     reg_q <= '0;
    else if (load) reg_q <= data[5:0];

  assign delay = reg_q;
endmodule
