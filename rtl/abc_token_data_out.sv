// abc_token_data_out: normal/bypass routing of a token or data output.
//
// The signal goes to output pair 1 when bypassout (the Output_Bypass
// configuration bit) is high, otherwise to pair 0. Each pair is differential
// (out and its complement). The pair that is not selected idles low (out=0,
// complement=1); the specification does not say how it idles. Combinational.
module abc_token_data_out (
  input  logic in,
  input  logic bypassout,
  output logic out0,
  output logic out0B,
  output logic out1,
  output logic out1B
);
  assign out0  = !bypassout && in;
  assign out1  =  bypassout && in;
  assign out0B = !out0;
  assign out1B = !out1;
endmodule
