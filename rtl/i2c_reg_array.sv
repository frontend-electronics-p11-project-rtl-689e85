// i2c_reg_array: the 8-byte register array of the I2C slave chip.
//
// The I2C slave writes bytes into the array and reads them back over the bus through a
// synchronous write port and a combinational read port. Independently, an 8-to-1
// multiplexer lets the outside world read any register asynchronously (no clock involved)
// through a 4-bit port: `upper_lower` chooses the high (1) or low (0) nibble of the byte
// selected by `mux_sel`, halving the pins needed. The array size and the nibble readout
// follow the design; the polarity of `upper_lower` and the reset value 0 are this
// implementation's choices.
module i2c_reg_array #(
  parameter int unsigned N_REG = 8,
  parameter int unsigned AW    = $clog2(N_REG)
) (
  input  logic          clk,
  input  logic          rst_n,
  // port of the I2C slave
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata,
  // asynchronous nibble readout
  input  logic [AW-1:0] mux_sel,
  input  logic          upper_lower,
  output logic [3:0]    nibble
);
  logic [7:0] regs [N_REG];
  logic [7:0] sel_byte;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N_REG; i++) regs[i] <= '0;
    end else if (we) begin
      regs[addr] <= wdata;
    end
  end

  assign rdata    = regs[addr];
  assign sel_byte = regs[mux_sel];
  assign nibble   = upper_lower ? sel_byte[7:4] : sel_byte[3:0];
endmodule
