// slow_control_top: slow-control electronics of the luminosity-detector ADC front end.
//
// Two independent pieces sit side by side, each with its own ports:
//
// 1. I2C slow control. An I2C master, programmed by a host through its register file,
//    and the I2C slave test chip (slave engine + 8-byte register array + nibble readout)
//    share one two-wire bus. The bus is the wired-AND of the open-drain outputs of both
//    devices and of any external devices (temperature sensor, I/O expander, ...), whose
//    pull-down enables enter through ext_scl_pull / ext_sda_pull; the resolved line
//    levels are brought out as i2c_scl / i2c_sda. Master and slave run on `clk`.
//
// 2. LumiMulti ADC digital part. The SPI-mode-0 command decoder (clocked by spi_sclk)
//    sets the readout mode, test channel, low-power bits, active ADCs and the two DAC
//    codes; the readout (clocked by adc_clk, the chip input clock) serialises the eight
//    10-bit ADC samples onto the LVDS lanes. The pipelined ADCs, DACs and LVDS drivers are
//    analog: the samples enter as `adc_samples`, the DAC codes and low-power bits leave as
//    ports, and `lvds` carries the logic levels to the drivers.
//
// 3. Test-processor bridge. In the FPGA test set-up a soft processor reaches its Wishbone
//    peripherals (UART, I2C controller) through a bridge on its I/O port. The bridge is
//    here, clocked by `clk`; the processor's port signals come in as pb_*, and the
//    Wishbone master signals go out as wb_*, where those peripherals would connect.
//
// The partition into master, slave chip, decoder, readout and bridge follows the design;
// joining them on one top and the external-device bus ports are this implementation's
// choices.
module slow_control_top
  import lumi_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter logic [6:0]  SLAVE_ADDR = 7'h3C
) (
  // ---- I2C part ----
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     host_cs,
  input  logic                     host_wr,
  input  logic                     host_rd,
  input  logic [2:0]               host_addr,
  input  logic [7:0]               host_wdata,
  output logic [7:0]               host_rdata,
  output logic                     host_irq,
  input  logic                     i2c_fast,
  input  logic                     ext_scl_pull,
  input  logic                     ext_sda_pull,
  output logic                     i2c_scl,
  output logic                     i2c_sda,
  input  logic [2:0]               chip_mux_sel,
  input  logic                     chip_upper_lower,
  output logic [3:0]               chip_nibble,
  // ---- LumiMulti ADC part ----
  input  logic                     spi_sclk,
  input  logic                     spi_sdi,
  input  logic                     adc_clk,
  input  logic                     adc_rst_n,
  input  logic [N_ADC-1:0][ADC_BITS-1:0] adc_samples,
  output logic [N_ADC-1:0]         adc_clk_en,
  output logic [ADC_BITS-1:0]      lvds,
  output logic                     lvds_frame,
  output logic                     lvds_lp,
  output logic                     buf_lp,
  output logic [7:0]               dac0,
  output logic [7:0]               dac1,
  output mode_e                    adc_mode,
  output logic                     spi_cmd_done,
  // ---- test-processor I/O port to Wishbone ----
  input  logic [7:0]               pb_port_id,
  input  logic [7:0]               pb_out_port,
  input  logic                     pb_write_strobe,
  input  logic                     pb_read_strobe,
  output logic [7:0]               pb_in_port,
  output logic [6:0]               wb_adr,
  output logic [7:0]               wb_dat_o,
  input  logic [7:0]               wb_dat_i,
  output logic                     wb_we,
  output logic                     wb_cyc,
  output logic                     wb_stb,
  input  logic                     wb_ack
);
  // ---------------- I2C ----------------
  logic m_scl_pull, m_sda_pull, s_sda_pull;

  i2c_master #(
    .CLK_HZ(CLK_HZ)
  ) u_master (
    .clk     (clk),
    .rst_n   (rst_n),
    .cs      (host_cs),
    .wr      (host_wr),
    .rd      (host_rd),
    .addr    (host_addr),
    .data_i  (host_wdata),
    .data_o  (host_rdata),
    .irq     (host_irq),
    .fast    (i2c_fast),
    .scl     (i2c_scl),
    .sda     (i2c_sda),
    .scl_pull(m_scl_pull),
    .sda_pull(m_sda_pull)
  );

  i2c_slave_chip #(
    .SLAVE_ADDR(SLAVE_ADDR)
  ) u_chip (
    .clk        (clk),
    .rst_n      (rst_n),
    .scl        (i2c_scl),
    .sda        (i2c_sda),
    .sda_pull   (s_sda_pull),
    .mux_sel    (chip_mux_sel),
    .upper_lower(chip_upper_lower),
    .nibble     (chip_nibble)
  );

  i2c_bus #(
    .N_DEV(3)
  ) u_bus (
    .scl_pull({ext_scl_pull, 1'b0, m_scl_pull}),
    .sda_pull({ext_sda_pull, s_sda_pull, m_sda_pull}),
    .scl     (i2c_scl),
    .sda     (i2c_sda)
  );

  // ---------------- LumiMulti ----------------
  mode_e         mode;
  logic [2:0]    test_adc;
  logic [N_ADC-1:0] adc_on;

  lumi_cmd_decoder #(
    .DATA_W(8)
  ) u_dec (
    .sclk    (spi_sclk),
    .rst_n   (adc_rst_n),
    .sdi     (spi_sdi),
    .mode    (mode),
    .test_adc(test_adc),
    .lvds_lp (lvds_lp),
    .buf_lp  (buf_lp),
    .adc_on  (adc_on),
    .dac0    (dac0),
    .dac1    (dac1),
    .cmd_done(spi_cmd_done)
  );

  assign adc_mode = mode;

  lumi_readout u_readout (
    .clk        (adc_clk),
    .rst_n      (adc_rst_n),
    .mode       (mode),
    .test_adc   (test_adc),
    .adc_on     (adc_on),
    .samples    (adc_samples),
    .adc_clk_en (adc_clk_en),
    .lvds       (lvds),
    .frame_start(lvds_frame)
  );

  // ---------------- test-processor bridge ----------------
  pb_wb_bridge #(
    .AW(7)
  ) u_bridge (
    .clk         (clk),
    .rst_n       (rst_n),
    .port_id     (pb_port_id),
    .out_port    (pb_out_port),
    .write_strobe(pb_write_strobe),
    .read_strobe (pb_read_strobe),
    .in_port     (pb_in_port),
    .wb_adr_o    (wb_adr),
    .wb_dat_o    (wb_dat_o),
    .wb_dat_i    (wb_dat_i),
    .wb_we_o     (wb_we),
    .wb_cyc_o    (wb_cyc),
    .wb_stb_o    (wb_stb),
    .wb_ack_i    (wb_ack)
  );
endmodule
