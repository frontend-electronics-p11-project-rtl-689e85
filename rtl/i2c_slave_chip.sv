// i2c_slave_chip: the I2C slave test chip.
//
// Joins the I2C slave engine to the 8-byte register array. A master writes bytes into the
// array and reads them back over the bus; the array can also be read without the bus
// through the nibble port (mux_sel picks the byte, upper_lower the half, nibble shows it).
// Bus pins: scl and sda are the line levels, sda_pull = 1 pulls SDA low (open drain). The
// slave never drives SCL. The structure (slave, register array, 8-to-1 multiplexer with
// nibble split) follows the design; the slave address is a parameter.
module i2c_slave_chip #(
  parameter logic [6:0] SLAVE_ADDR = 7'h3C
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scl,
  input  logic       sda,
  output logic       sda_pull,
  input  logic [2:0] mux_sel,
  input  logic       upper_lower,
  output logic [3:0] nibble
);
  logic [2:0] reg_addr;
  logic [7:0] reg_wdata, reg_rdata;
  logic       reg_we;

  i2c_slave #(
    .SLAVE_ADDR(SLAVE_ADDR),
    .N_REG     (8)
  ) u_slave (
    .clk      (clk),
    .rst_n    (rst_n),
    .scl      (scl),
    .sda      (sda),
    .sda_pull (sda_pull),
    .reg_addr (reg_addr),
    .reg_wdata(reg_wdata),
    .reg_we   (reg_we),
    .reg_rdata(reg_rdata)
  );

  i2c_reg_array #(
    .N_REG(8)
  ) u_regs (
    .clk        (clk),
    .rst_n      (rst_n),
    .we         (reg_we),
    .addr       (reg_addr),
    .wdata      (reg_wdata),
    .rdata      (reg_rdata),
    .mux_sel    (mux_sel),
    .upper_lower(upper_lower),
    .nibble     (nibble)
  );
endmodule
