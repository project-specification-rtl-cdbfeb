// abc_token_data_in: normal/bypass selection of a token or data input.
//
// Every chip has two token inputs and two data inputs, wired to different
// neighbours so that a failed neighbour can be bypassed. bypassin (the
// Input_Bypass configuration bit) selects in1, otherwise in0. The differential
// receivers are modelled by the positive legs. Combinational.
module abc_token_data_in (
  input  logic in0,
  input  logic in1,
  input  logic bypassin,
  output logic out
);
  assign out = bypassin ? in1 : in0;
endmodule
