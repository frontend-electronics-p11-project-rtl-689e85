// lumi_pkg: serial command format and operating modes of the LumiMulti ADC slow interface.
//
// A command is 16 bits sent MSB first: a fixed 6-bit header 101011, a 2-bit command code and
// an 8-bit data field. The codes and mode fields follow the command tables of the design; the
// bit placement of the fields inside the config data byte (MSB first, trailing bit zero) is
// this implementation's reading of "Mode(2b), Test ADC(3b), Low power(2b)".
package lumi_pkg;

  localparam logic [5:0] HEADER = 6'b101011;
  localparam int unsigned N_ADC = 8;       // ADC channels on the chip
  localparam int unsigned ADC_BITS = 10;   // resolution of each pipelined ADC

  typedef enum logic [1:0] {
    CMD_CONFIG = 2'b00,
    CMD_ACTIVE = 2'b01,
    CMD_DAC0   = 2'b10,
    CMD_DAC1   = 2'b11
  } cmd_e;

  typedef enum logic [1:0] {
    MODE_PARALLEL = 2'b00,
    MODE_TEST     = 2'b01,
    MODE_SERIAL   = 2'b10,
    MODE_RESERVED = 2'b11
  } mode_e;

endpackage
