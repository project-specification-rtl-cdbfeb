// abc_dacs: behavioural model of the three current DACs.
//
// Not synthesizable logic in the chip: two 8-bit current DACs and one 4-bit
// current DAC scale the reference current IDAR. The model computes the
// typical transfer of the specification's DAC table in integer nanoamps
// (IDAR is given as iref_na, nominally -300000 nA since it flows into the
// chip):
//   ith  =  (IDAR/256) * threshold
//   cali = -(IDAR/256) * calamp
//   ivi1 = -(IDAR*1.2/16) * biasamp
// Results are truncated toward zero to whole nanoamps. Combinational.
module abc_dacs (
  input  logic [7:0]         threshold,
  input  logic [7:0]         calamp,
  input  logic [3:0]         biasamp,
  input  logic signed [31:0] iref_na,
  output logic signed [31:0] ith_na,
  output logic signed [31:0] cali_na,
  output logic signed [31:0] ivi1_na
);
  logic signed [47:0] p_ith, p_cali, p_ivi1;

  always_comb begin
    p_ith   = 48'(iref_na) * $signed({1'b0, threshold});
    p_cali  = 48'(iref_na) * $signed({1'b0, calamp});
    p_ivi1  = 48'(iref_na) * $signed({1'b0, biasamp}) * 48'sd12;
    ith_na  =  32'(p_ith / 48'sd256);
    cali_na = -32'(p_cali / 48'sd256);
    ivi1_na = -32'(p_ivi1 / 48'sd160);
  end
endmodule
