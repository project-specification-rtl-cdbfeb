// abc_pkg: constants shared by the ABC readout chip blocks.
//
// Holds the bit positions of the 16-bit configuration register, the
// data-compression criteria, the command field codes of the serial control
// protocol and the leaders and error codes of the readout packets. All
// values follow the specification tables (configuration register contents,
// compression criteria, command tables and packet format figures); the
// enum type names are this design's own.
package abc_pkg;

  // Configuration register bit positions (configuration register table)
  localparam int unsigned CFG_MODE_LO    = 0;   // readout mode bits 1:0
  localparam int unsigned CFG_CALMODE_LO = 2;   // Cal_Mode bits 3:2
  localparam int unsigned CFG_DOUT_DELAY = 4;   // Dataout Delay
  localparam int unsigned CFG_TEST_MODE  = 5;   // Test_Mode (input translators)
  localparam int unsigned CFG_EDGE       = 6;   // Edge_Detect
  localparam int unsigned CFG_MASK       = 7;   // Mask register drives pipeline
  localparam int unsigned CFG_ACCUM      = 8;   // Accumulate
  localparam int unsigned CFG_IN_BYPASS  = 9;   // token/data input bypass
  localparam int unsigned CFG_OUT_BYPASS = 10;  // token/data output bypass
  localparam int unsigned CFG_MASTER_N   = 11;  // 0 = master (ORed with masterB pad)
  localparam int unsigned CFG_END        = 12;  // end of readout chain
  localparam int unsigned CFG_FEED_N     = 13;  // 0 = clock feed-through when master

  // Data compression criteria (mode bits 1:0)
  typedef enum logic [1:0] {
    RO_HIT     = 2'b00,   // 1XX or X1X or XX1
    RO_LEVEL   = 2'b01,   // X1X
    RO_EDGE    = 2'b10,   // 01X
    RO_READALL = 2'b11    // XXX
  } ro_mode_e;

  // Command field 1
  localparam logic [2:0] F1_L1   = 3'b110;
  localparam logic [2:0] F1_CTRL = 3'b101;
  // Command field 2
  localparam logic [3:0] F2_SOFTRST = 4'b0100;
  localparam logic [3:0] F2_BCRST   = 4'b0010;
  localparam logic [3:0] F2_SLOW    = 4'b0111;
  // Slow command lengths (field 3)
  localparam logic [7:0] LEN_REG16 = 8'd28;
  localparam logic [7:0] LEN_MASK  = 8'd140;
  localparam logic [7:0] LEN_SHORT = 8'd12;
  // Slow command codes: upper 3 bits of field 5 (lower 3 bits are 000)
  typedef enum logic [2:0] {
    SC_CONFIG = 3'b000,
    SC_MASK   = 3'b001,
    SC_DELAY  = 3'b010,
    SC_THRCAL = 3'b011,
    SC_PULSE  = 3'b100,
    SC_ENABLE = 3'b101,
    SC_CAL    = 3'b110,
    SC_BIAS   = 3'b111
  } slow_cmd_e;

  // Readout packets
  localparam logic [4:0]  PREAMBLE    = 5'b11101;
  localparam logic [15:0] TRAILER     = 16'h8000;  // "1" followed by 15 "0"
  localparam logic [1:0]  LEAD_HIT    = 2'b01;
  localparam logic [2:0]  LEAD_NOHIT  = 3'b001;
  localparam logic [2:0]  LEAD_INFO   = 3'b000;    // configuration and error packets
  localparam logic [2:0]  CFG_MARK    = 3'b111;
  localparam logic [2:0]  ERR_NODATA  = 3'b001;
  localparam logic [2:0]  ERR_OVERFLOW= 3'b010;
  localparam logic [2:0]  ERR_BUFFER  = 3'b100;

endpackage
