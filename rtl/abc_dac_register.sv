// abc_dac_register: DAC setting registers.
//
// Two 16-bit registers loaded in parallel from the shared command shift
// register: the first (loadthresholdreg) holds the threshold in its MS byte
// and the calibration amplitude in its LS byte, the second (loadbiasreg)
// holds the 4-bit front-end bias value in bits 11:8; the other bits of the
// second register are stored but unused. Capture is synchronous on the clock
// of the one-clock load pulse (the specification latches on the falling edge
// of the load signal). clrB (power-up reset, async, active low) clears both.
module abc_dac_register (
  input  logic        clk,
  input  logic        clrB,
  input  logic        loadthresholdreg,
  input  logic        loadbiasreg,
  input  logic [15:0] data,
  output logic [7:0]  threshold,
  output logic [7:0]  calamp,
  output logic [3:0]  biasamp
);
  logic [15:0] thr_cal_q;
  logic [3:0]  bias_q;

  always_ff @(posedge clk or negedge clrB) begin
    if (!clrB) begin
      thr_cal_q <= '0;
      bias_q    <= '0;
    end else begin
      if (loadthresholdreg) thr_cal_q <= data;
      if (loadbiasreg)      bias_q    <= data[11:8];
    end
  end

  assign threshold = thr_cal_q[15:8];
  assign calamp    = thr_cal_q[7:0];
  assign biasamp   = bias_q;
endmodule
