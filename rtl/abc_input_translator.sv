// abc_input_translator: logic model of the 128 input level translators.
//
// On the chip each translator senses the current sunk by one open-collector
// output of the front-end chip and compares it with (inrh+inrl)/2 (+CA). That
// comparison is analogue; here the hit inputs arrive already as logic levels
// and only the digital test feature is built. For testing, one group of 32
// channels (channels k with k mod 4 == calmode) is forced to the hit level:
// continuously while test_inputs (configuration Test_Mode bit) is high, or for
// a single clock while the pulseinputreg command pulse is high. en(3:0) is
// the one-hot group decode, high while a test is active; the specification
// only says these lines go to the test multiplexer, so the decode is this
// design's choice. Purely combinational.
module abc_input_translator #(
  parameter int unsigned NCH = 128
) (
  input  logic [NCH-1:0] i,
  input  logic           test_inputs,
  input  logic           pulseinputreg,
  input  logic [1:0]     calmode,
  output logic [NCH-1:0] o,
  output logic [3:0]     en
);
  logic test_on;
  assign test_on = test_inputs | pulseinputreg;

  always_comb begin
    en = '0;
    if (test_on) en[calmode] = 1'b1;
    for (int unsigned k = 0; k < NCH; k++)
      o[k] = i[k] | en[k % 4];
  end
endmodule
