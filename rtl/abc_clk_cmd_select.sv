// abc_clk_cmd_select: choice between the two clock/command input pairs.
//
// Each chip receives two independent clock and command sources so that the
// loss of one can be survived. select low (its pad has a pull-down, so this
// is the unconnected state) takes clk0/com0, select high takes clk1/com1.
// The LVDS receivers are analogue; their outputs are modelled here by the
// positive legs of the pairs. Combinational; select is a static strap.
module abc_clk_cmd_select (
  input  logic clk0,
  input  logic clk1,
  input  logic com0,
  input  logic com1,
  input  logic select_i,
  output logic clk,
  output logic command
);
  assign clk     = select_i ? clk1 : clk0;
  assign command = select_i ? com1 : com0;
endmodule
