// i2c_pkg: constants and types shared by the I2C master, slave and their testbenches.
//
// The host register map of the master (addresses 0..5) and the bit positions of its
// status and control registers follow the register tables of the design. The state
// encodings are this implementation's own.
package i2c_pkg;

  // Host register addresses of the I2C master (3-bit ADDR bus).
  typedef enum logic [2:0] {
    REG_DEVICE = 3'd0,  // W   7-bit device (slave) address
    REG_TARGET = 3'd1,  // W   target register address inside the peripheral
    REG_OP_NUM = 3'd2,  // W   number of data bytes in one transfer
    REG_DATA   = 3'd3,  // W: output (transmit) buffer, R: input (receive) buffer
    REG_STATUS = 3'd4,  // W/R status register
    REG_CTRL   = 3'd5   // W/R control register
  } host_reg_e;

  // Status register bits.
  localparam int unsigned ST_EMPTY  = 0;  // transmit buffer empty, host may write next byte
  localparam int unsigned ST_FULL   = 1;  // receive buffer full, host should read it
  localparam int unsigned ST_ASK_IN = 2;  // peripheral did not acknowledge: repeat the operation
  localparam int unsigned ST_BUSY   = 3;  // a transfer is in progress

  // Control register bits.
  localparam int unsigned CT_REQ = 0;  // start a transfer (auto-cleared)
  localparam int unsigned CT_DIR = 1;  // 1: write to the peripheral, 0: read from it

  // Read/not-write bit of the first byte on the bus.
  localparam logic RNW_WRITE = 1'b0;
  localparam logic RNW_READ  = 1'b1;

endpackage
