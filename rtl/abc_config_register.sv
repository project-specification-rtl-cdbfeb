// abc_config_register: command shift register and configuration register.
//
// A 16-bit shift register takes the serial data of register-write commands,
// MS bit first, one bit per clock while shift is high. Its parallel value
// (shiftreg) feeds the strobe delay and DAC registers as well. On a load
// pulse the 16-bit configuration register (dataout) takes the shift register
// contents. The specification latches on the falling edge of load; here the
// capture is synchronous, on the clock where the one-clock load pulse is high,
// which lands at the same point of the command. clrB (power-up reset, async,
// active low) clears both registers; soft reset does not reach this block.
module abc_config_register (
  input  logic        clk,
  input  logic        clrB,
  input  logic        shift,
  input  logic        load,
  input  logic        in,
  output logic [15:0] dataout,
  output logic [15:0] shiftreg
);
  always_ff @(posedge clk or negedge clrB) begin
    if (!clrB) begin
      shiftreg <= '0;
      dataout  <= '0;
    end else begin
      if (shift) shiftreg <= {shiftreg[14:0], in};
      if (load)  dataout  <= shiftreg;
    end
  end
endmodule
