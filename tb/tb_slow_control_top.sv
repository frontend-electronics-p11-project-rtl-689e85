// tb_slow_control_top: end-to-end test of the whole design at its default parameters
// (50 MHz system clock, 100/400 kHz I2C).
//
// I2C part: a host model programs the master, which writes the eight example bytes
// (11 22 33 44 56 78 9A BC) into the slave chip in standard mode, reads them back in fast
// mode, and addresses an absent device. The nibble port of the chip is checked against
// the written data. The host is late once in each direction so that the master holds SCL
// low, and an external device on the bus stretches SCL once.
// LumiMulti part: an SPI model sends configuration, active-ADC and DAC commands plus one
// frame with a corrupted header; the LVDS lanes are checked against a reference model in
// parallel, serial and test mode.
// Test-processor bridge: a processor-port model sets up the Wishbone peripherals the way
// the test software does at start-up (I2C prescaler 0x63 at address 0, UART baud limit
// 0x0145 = round(50e6 / (16 * 9600)) - 1 at addresses 2 and 3) into a small Wishbone
// memory model with wait states, and reads the values back through the poll/fetch
// sequence.
// Every mechanism is counted; one that never happened counts as a failure.
// All parameters are at their defaults. The example bytes, the 100/400 kHz rates, the
// command set and the baud-limit formula follow the design; the sequence of operations and
// the wait states are test choices.
module tb_slow_control_top;
  import i2c_pkg::*;
  import lumi_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_cs = 0, host_wr = 0, host_rd = 0, i2c_fast = 0;
  logic [2:0] host_addr = '0;
  logic [7:0] host_wdata = '0, host_rdata;
  logic host_irq, i2c_scl, i2c_sda;
  logic ext_scl_pull = 0, ext_sda_pull = 0;
  logic [2:0] chip_mux_sel = '0;
  logic chip_upper_lower = 0;
  logic [3:0] chip_nibble;
  logic spi_sclk = 0, spi_sdi = 0, adc_clk = 0, adc_rst_n = 1;
  logic [7:0][9:0] adc_samples = '0;
  logic [7:0] adc_clk_en, dac0, dac1;
  logic [9:0] lvds;
  logic lvds_frame, lvds_lp, buf_lp, spi_cmd_done;
  mode_e adc_mode;
  logic [7:0] pb_port_id = '0, pb_out_port = '0, pb_in_port;
  logic pb_write_strobe = 0, pb_read_strobe = 0;
  logic [6:0] wb_adr;
  logic [7:0] wb_dat_o, wb_dat_i = '0;
  logic wb_we, wb_cyc, wb_stb, wb_ack = 0;

  slow_control_top dut (.*);

  int checks = 0, failures = 0;
  always #10 clk = ~clk;      // 50 MHz
  always #4  adc_clk = ~adc_clk;  // 125 MHz ADC input clock

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_start = 0, n_stop = 0, n_nack = 0, n_waittx = 0, n_waitrx = 0, n_stretch = 0;
  int n_std = 0, n_fast = 0, n_par = 0, n_ser = 0, n_test = 0, n_off = 0, n_badhdr = 0, n_cmd = 0;
  always @(negedge i2c_sda) if (i2c_scl && rst_n) n_start++;
  always @(posedge i2c_sda) if (i2c_scl && rst_n) n_stop++;
  always @(posedge clk) begin
    if (dut.u_master.nack_seen) n_nack++;
    if (dut.u_master.mst == dut.u_master.M_WAITTX && dut.u_master.empty_q) n_waittx++;
    if (dut.u_master.mst == dut.u_master.M_WAITRX && dut.u_master.full_q) n_waitrx++;
    if (dut.u_master.stretched && dut.u_master.tick) n_stretch++;
    if (dut.u_master.tick) begin if (i2c_fast) n_fast++; else n_std++; end
  end
  always @(posedge spi_sclk) #1 if (spi_cmd_done) n_cmd++;

  // shortest SCL period seen in each speed mode, in system clocks (holds only lengthen it)
  int scl_cyc = 0, scl_last = -1, min_std = 1 << 30, min_fast = 1 << 30;
  always @(posedge clk) scl_cyc++;
  always @(posedge i2c_scl) if (rst_n) begin
    if (scl_last >= 0) begin
      if (i2c_fast) min_fast = (scl_cyc - scl_last < min_fast) ? scl_cyc - scl_last : min_fast;
      else          min_std  = (scl_cyc - scl_last < min_std)  ? scl_cyc - scl_last : min_std;
    end
    scl_last = scl_cyc;
  end
  // shortest SCL high phase in each mode (nominally half a period)
  int hi_std = 1 << 30, hi_fast = 1 << 30;
  always @(negedge i2c_scl) if (rst_n && scl_last >= 0 && dut.u_master.mst != dut.u_master.M_STOP) begin
    if (i2c_fast) hi_fast = (scl_cyc - scl_last < hi_fast) ? scl_cyc - scl_last : hi_fast;
    else          hi_std  = (scl_cyc - scl_last < hi_std)  ? scl_cyc - scl_last : hi_std;
  end

  // ---------------- Wishbone peripheral model (2 wait states) ----------------
  logic [7:0] wb_mem [128];
  int wb_wait = 0, n_wb_wait = 0, n_wb_rd = 0, n_wb_wr = 0;
  initial for (int i = 0; i < 128; i++) wb_mem[i] = '0;
  always @(posedge clk) begin
    wb_ack <= 1'b0;
    if (wb_cyc && wb_stb && !wb_ack) begin
      if (wb_wait < 2) begin
        wb_wait++;
        n_wb_wait++;
      end else begin
        wb_wait = 0;
        wb_ack <= 1'b1;
        wb_dat_i <= wb_mem[wb_adr];
        if (wb_we) begin
          wb_mem[wb_adr] <= wb_dat_o;
          n_wb_wr++;
        end else n_wb_rd++;
      end
    end
  end

  task automatic pb_io(input logic [7:0] port, input logic [7:0] val, input bit wr,
                       output logic [7:0] rval);
    @(negedge clk);
    pb_port_id  = port;
    pb_out_port = val;
    @(negedge clk);
    if (wr) pb_write_strobe = 1'b1; else pb_read_strobe = 1'b1;
    rval = pb_in_port;
    @(negedge clk);
    pb_write_strobe = 1'b0;
    pb_read_strobe  = 1'b0;
  endtask

  task automatic pb_poll();
    logic [7:0] st;
    int n = 0;
    do begin
      pb_io(8'h00, 8'h00, 1'b0, st);
      n++;
    end while (!st[0] && n < 50);
    chk(st[0], 1, "bridge done flag");
  endtask

  task automatic wb_wr(input logic [6:0] a, input logic [7:0] d);
    logic [7:0] junk;
    pb_io({1'b1, a}, d, 1'b1, junk);
    pb_poll();
  endtask

  task automatic wb_rd(input logic [6:0] a, output logic [7:0] d);
    logic [7:0] junk;
    pb_io({1'b1, a}, 8'h00, 1'b0, junk);
    pb_poll();
    pb_io(8'h01, 8'h00, 1'b0, d);
  endtask

  task automatic pb_sequence();
    logic [7:0] d;
    int baud_limit;
    baud_limit = (50_000_000 + 8 * 9600) / (16 * 9600) - 1;   // round(50e6/(16*9600)) - 1
    @(posedge rst_n);
    repeat (5) @(negedge clk);
    wb_wr(7'h00, 8'h63);
    wb_wr(7'h02, 8'(baud_limit));
    wb_wr(7'h03, 8'(baud_limit >> 8));
    wb_rd(7'h00, d); chk(d, 8'h63, "Wishbone read-back of prescaler");
    wb_rd(7'h02, d); chk(d, 8'h45, "Wishbone read-back of baud limit low");
    wb_rd(7'h03, d); chk(d, 8'h01, "Wishbone read-back of baud limit high");
  endtask

  // ---------------- host model ----------------
  task automatic hwrite(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk); host_cs = 1; host_wr = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_cs = 0; host_wr = 0;
  endtask
  task automatic hread(input logic [2:0] a, output logic [7:0] d);
    @(negedge clk); host_cs = 1; host_rd = 1; host_addr = a;
    #1 d = host_rdata;
    @(negedge clk); host_cs = 0; host_rd = 0;
  endtask
  task automatic wait_status(input int bitpos, input logic val);
    logic [7:0] s;
    do hread(REG_STATUS, s); while (s[bitpos] != val);
  endtask

  // ---------------- SPI model (mode 0) ----------------
  task automatic spi_bits(input logic [15:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) begin
      spi_sdi = v[i];
      #100 spi_sclk = 1;
      #100 spi_sclk = 0;
    end
  endtask
  task automatic spi_cmd(input logic [1:0] c, input logic [7:0] d);
    spi_bits({HEADER, c, d}, 16);
    spi_bits(0, 2);
  endtask

  // ---------------- LVDS reference model ----------------
  always @(negedge adc_clk) for (int a = 0; a < 8; a++) adc_samples[a] = 10'($urandom);
  bit lv_check = 0;
  mode_e cmode;
  logic [2:0] ctadc;
  logic [7:0] con;
  logic [7:0][9:0] samp_d, frame;
  int k = 0, since = 0, period = -1;
  logic [9:0] expl;
  always @(posedge adc_clk) begin
    since++;
    if (lvds_frame) begin
      period = since; since = 0; k = 0;
      for (int a = 0; a < 8; a++) frame[a] = con[a] ? samp_d[a] : '0;
      if (lv_check) begin
        if (cmode == MODE_PARALLEL) n_par++;
        if (cmode == MODE_SERIAL) n_ser++;
        if (cmode == MODE_TEST) n_test++;
        if (con != 8'hFF) n_off++;
      end
    end
    if (lv_check) begin
      expl = '0;
      unique case (cmode)
        MODE_PARALLEL: for (int a = 0; a < 8; a++) expl[a] = frame[a][9 - k];
        MODE_SERIAL:   expl[0] = frame[7 - (k % 8)][9 - (k / 8)];
        MODE_TEST:     expl = frame[ctadc];
        default:       expl = '0;
      endcase
      checks++;
      if (lvds !== expl) begin
        failures++;
        if (failures < 10) $display("FAIL lvds mode %0d bit %0d: %b expected %b", cmode, k, lvds, expl);
      end
    end
    k++;
    samp_d = adc_samples;
  end

  task automatic lvds_phase(input logic [1:0] m, input logic [2:0] t, input logic [7:0] on, input int exp_period);
    lv_check = 0;
    spi_cmd(CMD_ACTIVE, on);
    spi_cmd(CMD_CONFIG, {m, t, 3'b000});
    cmode = mode_e'(m); ctadc = t; con = on;
    repeat (200) @(negedge adc_clk);
    @(posedge adc_clk iff lvds_frame);
    @(negedge adc_clk);
    lv_check = 1;
    repeat (4 * exp_period + 3) @(negedge adc_clk);
    lv_check = 0;
    chk(period, exp_period, "LVDS frame period");
  endtask

  // ---------------- LumiMulti sequence ----------------
  task automatic lumi_sequence();
    #50 adc_rst_n = 0;
    #50 adc_rst_n = 1;
    #50;
    chk(adc_mode, MODE_PARALLEL, "parallel mode after reset");
    lvds_phase(2'b00, 3'd0, 8'hFF, 10);
    lvds_phase(2'b10, 3'd0, 8'hFF, 80);
    lvds_phase(2'b01, 3'd4, 8'hFF, 1);
    lvds_phase(2'b00, 3'd0, 8'b0101_1100, 10);
    spi_cmd(CMD_CONFIG, {2'b00, 3'd0, 1'b1, 1'b1, 1'b0});
    chk(lvds_lp, 1, "LVDS low power"); chk(buf_lp, 1, "buffers low power");
    spi_cmd(CMD_DAC0, 8'h80 + 8'h21);
    spi_cmd(CMD_DAC1, 8'h3F);
    chk(dac0, 8'hA1, "DAC0 code"); chk(dac1, 8'h3F, "DAC1 code");
    begin
      int n_before = n_cmd;
      spi_bits({6'b111011, 2'b10, 8'h00}, 16);  // corrupted header
      spi_bits(0, 4);
      if (n_cmd == n_before && dac0 == 8'hA1) n_badhdr++;
      chk(n_cmd, n_before, "corrupted frame ignored");
    end
  endtask

  // ---------------- I2C sequence ----------------
  logic [7:0] exp8 [8];
  task automatic i2c_sequence();
    logic [7:0] d;
    exp8 = '{8'h11, 8'h22, 8'h33, 8'h44, 8'h56, 8'h78, 8'h9A, 8'hBC};
    repeat (5) @(posedge clk);
    rst_n = 1;
    // write 8 bytes from register 0, standard mode
    hwrite(REG_DEVICE, 8'h3C);
    hwrite(REG_TARGET, 8'h00);
    hwrite(REG_OP_NUM, 8'd8);
    hwrite(REG_DATA, exp8[0]);
    hwrite(REG_CTRL, 8'h03);
    for (int i = 1; i < 8; i++) begin
      if (i == 3) repeat (20000) @(posedge clk);  // late host: SCL held low
      if (i == 5) begin                         // external device stretches SCL once
        @(negedge i2c_scl);
        repeat (20) @(posedge clk);
        ext_scl_pull = 1;
        repeat (2000) @(posedge clk);
        ext_scl_pull = 0;
      end
      wait (host_irq);
      hwrite(REG_DATA, exp8[i]);
    end
    wait_status(ST_BUSY, 0);
    hread(REG_STATUS, d);
    chk(d[ST_ASK_IN], 0, "write acknowledged");
    for (int i = 0; i < 8; i++) begin
      chip_mux_sel = 3'(i);
      chip_upper_lower = 1;
      #1 chk(chip_nibble, exp8[i][7:4], "chip upper nibble");
      chip_upper_lower = 0;
      #1 chk(chip_nibble, exp8[i][3:0], "chip lower nibble");
    end
    // read back in fast mode
    i2c_fast = 1;
    hwrite(REG_TARGET, 8'h00);
    hwrite(REG_OP_NUM, 8'd8);
    hwrite(REG_CTRL, 8'h01);
    for (int i = 0; i < 8; i++) begin
      wait (host_irq);
      if (i == 2) repeat (4000) @(posedge clk);  // late host: SCL held low
      hread(REG_DATA, d);
      chk(d, exp8[i], "read back over I2C");
    end
    wait_status(ST_BUSY, 0);
    // absent device
    i2c_fast = 0;
    hwrite(REG_DEVICE, 8'h12);
    hwrite(REG_OP_NUM, 8'd1);
    hwrite(REG_CTRL, 8'h01);
    wait_status(ST_BUSY, 0);
    hread(REG_STATUS, d);
    chk(d[ST_ASK_IN], 1, "ASK_IN for absent device");
    hwrite(REG_STATUS, 8'h00);
  endtask

  initial begin
    fork
      i2c_sequence();
      lumi_sequence();
      pb_sequence();
    join
    chk(n_start, 3 + 1, "START conditions (incl. repeated)");
    chk(n_stop, 3, "STOP conditions");
    chk(min_std, 500, "SCL period at 100 kHz (clocks of 20 ns)");
    chk(min_fast, 128, "SCL period at 400 kHz setting (clocks of 20 ns)");
    chk(hi_std, 250, "shortest SCL high time at 100 kHz (clocks)");
    chk(hi_fast, 64, "shortest SCL high time at 400 kHz setting (clocks)");
    if (n_nack == 0)    begin failures++; $display("FAIL never: NACK from peripheral"); end
    if (n_waittx == 0)  begin failures++; $display("FAIL never: hold for transmit data"); end
    if (n_waitrx == 0)  begin failures++; $display("FAIL never: hold for receive buffer"); end
    if (n_stretch == 0) begin failures++; $display("FAIL never: clock stretching"); end
    if (n_std == 0 || n_fast == 0) begin failures++; $display("FAIL never: both I2C speeds"); end
    if (n_par == 0 || n_ser == 0 || n_test == 0) begin failures++; $display("FAIL never: all readout modes"); end
    if (n_off == 0)     begin failures++; $display("FAIL never: ADC switched off"); end
    if (n_badhdr == 0)  begin failures++; $display("FAIL never: corrupted header"); end
    if (n_wb_wait == 0 || n_wb_rd == 0 || n_wb_wr == 0) begin failures++; $display("FAIL never: Wishbone read, write and wait state"); end
    checks += 9;
    $display("mechanisms: start=%0d stop=%0d nack=%0d waittx=%0d waitrx=%0d stretch=%0d std_ticks=%0d fast_ticks=%0d par=%0d ser=%0d test=%0d off=%0d badhdr=%0d cmds=%0d wb_rd=%0d wb_wr=%0d wb_wait=%0d",
             n_start, n_stop, n_nack, n_waittx, n_waitrx, n_stretch, n_std, n_fast, n_par, n_ser, n_test, n_off, n_badhdr, n_cmd, n_wb_rd, n_wb_wr, n_wb_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
