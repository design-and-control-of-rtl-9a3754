// awm_pkg: constants and types shared by the adaptive wiring manifold cell logic.
//
// The command codes (0x33, 0x44-0x59) and the "not existing" value 0x01 come from
// the cell's command list. The orientation register code 0x5A, the neighbor bus
// address and the module probe address are this design's own choices.
// I2C pins are modelled open-drain: an *_oe bit of 1 pulls the line low, and the
// *_i inputs carry the resolved line level.
package awm_pkg;

  localparam int unsigned NUM_SWITCHES  = 72;  // one relay per FPGA GPIO
  localparam int unsigned NUM_CFG_BYTES = 9;   // module config bytes 1..9
  localparam int unsigned NUM_DIRS      = 4;   // N, E, S, W
  localparam int unsigned NUM_ORIENT    = 4;   // four SDA/SCL pairs on the probe connector

  localparam logic [7:0] NOT_EXISTING = 8'h01;
  localparam logic [7:0] NO_ORIENT    = 8'hFF;

  // CMU read commands (write the code, then read one byte)
  localparam logic [7:0] CMD_CELL_ID   = 8'h44;
  localparam logic [7:0] CMD_NBR_N     = 8'h45;
  localparam logic [7:0] CMD_NBR_E     = 8'h46;
  localparam logic [7:0] CMD_NBR_S     = 8'h47;
  localparam logic [7:0] CMD_NBR_W     = 8'h48;
  localparam logic [7:0] CMD_MOD_ID    = 8'h49;
  localparam logic [7:0] CMD_NET_BYTES = 8'h50;
  localparam logic [7:0] CMD_CFG_FIRST = 8'h51;
  localparam logic [7:0] CMD_CFG_LAST  = 8'h59;
  localparam logic [7:0] CMD_ORIENT    = 8'h5A;
  // CMU write command: count, then that many switch indices
  localparam logic [7:0] CMD_ENABLE_SW = 8'h33;

  localparam logic [6:0] NEIGHBOR_ADDR = 7'h44;  // address used on point-to-point neighbor buses
  localparam logic [6:0] MODULE_ADDR   = 7'h20;  // address of a module's data sheet device

  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} dir_e;

  typedef enum logic [1:0] {
    I2C_START = 2'd0,  // START, or repeated START when the bus is held
    I2C_WRITE = 2'd1,  // 8 data bits out, slave ACK in
    I2C_READ  = 2'd2,  // 8 data bits in, master ACK/NACK out
    I2C_STOP  = 2'd3
  } i2c_op_e;

  typedef struct packed {
    logic scl;
    logic sda;
  } i2c_in_t;    // resolved line levels seen at a pin pair

  typedef struct packed {
    logic scl_oe;
    logic sda_oe;
  } i2c_out_t;   // 1 = pull the line low

  typedef struct packed {
    logic [7:0]                         id;      // module ID, NOT_EXISTING if none
    logic [7:0]                         nbytes;  // number of netlist/config bytes
    logic [NUM_CFG_BYTES-1:0][7:0]      cfg;     // cfg[0] is config byte 1
    logic [7:0]                         orient;  // 0..3, NO_ORIENT if none
  } module_info_t;

endpackage
