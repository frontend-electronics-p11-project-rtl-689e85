// tb_i2c_master: self-checking test of the I2C master against a behavioural slave.
//
// A host model programs the register file and moves data through the one-byte buffers:
// a 3-byte write, a 3-byte read (repeated START, ACK/ACK/NACK from the master), a transfer
// to an absent device (ASK_IN must rise), the same write with the slave stretching SCL,
// and a fast-mode read. The host is deliberately late with data so that the master must
// hold SCL low (WAITTX/WAITRX). The SCL period is measured in both speed modes.
// CLK_HZ is lowered to keep the simulation short: the divider becomes 16 (standard) and
// 4 (fast) system clocks per quarter SCL period.
// The transfer sequences and the register map follow the design; the data and the lateness
// of the host are test choices.
module tb_i2c_master;
  import i2c_pkg::*;
  localparam int unsigned CLK_HZ = 6_400_000;
  localparam int unsigned Q_STD = 16, Q_FAST = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cs = 0, wr = 0, rd = 0, fast = 0;
  logic [2:0] addr = '0;
  logic [7:0] data_i = '0, data_o;
  logic irq, m_scl_pull, m_sda_pull, s_scl_pull, s_sda_pull;
  wire  scl = !(m_scl_pull | s_scl_pull);
  wire  sda = !(m_sda_pull | s_sda_pull);
  int checks = 0, failures = 0;
  int scl_low_hold = 0;  // longest SCL-low stretch caused by the master waiting for the host

  i2c_master #(.CLK_HZ(CLK_HZ)) dut (
    .clk, .rst_n, .cs, .wr, .rd, .addr, .data_i, .data_o, .irq, .fast,
    .scl, .sda, .scl_pull(m_scl_pull), .sda_pull(m_sda_pull));

  i2c_slave_model #(.ADDR(7'h3C)) slv (.scl, .sda, .scl_pull(s_scl_pull), .sda_pull(s_sda_pull));

  always #5 clk = ~clk;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic hwrite(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk); cs = 1; wr = 1; addr = a; data_i = d;
    @(negedge clk); cs = 0; wr = 0;
  endtask

  task automatic hread(input logic [2:0] a, output logic [7:0] d);
    @(negedge clk); cs = 1; rd = 1; addr = a;
    #1 d = data_o;
    @(negedge clk); cs = 0; rd = 0;
  endtask

  task automatic wait_status(input int bitpos, input logic val);
    logic [7:0] s;
    do hread(REG_STATUS, s); while (s[bitpos] != val);
  endtask

  // SCL period measurement
  int last_rise = 0, period = 0, cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge scl) begin
    period = cyc - last_rise;
    last_rise = cyc;
  end
  // longest SCL low time while the master holds the line for the host
  int low_start = 0;
  always @(negedge scl) low_start = cyc;
  always @(posedge scl) if (cyc - low_start > scl_low_hold) scl_low_hold = cyc - low_start;

  logic [7:0] d;
  int p_std, p_fast, hold_w, hold_r;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    hread(REG_STATUS, d);
    chk(d, 8'h01, "status after reset (EMPTY)");

    // ---- write 3 bytes to register 0x10 ----
    hwrite(REG_DEVICE, 8'h3C);
    hwrite(REG_TARGET, 8'h10);
    hwrite(REG_OP_NUM, 8'd3);
    hwrite(REG_DATA, 8'hA1);
    hwrite(REG_CTRL, 8'h03);  // DIR=write, REQ
    hread(REG_STATUS, d);
    chk(d[ST_BUSY], 1, "busy during write");
    wait_status(ST_EMPTY, 1);
    hwrite(REG_DATA, 8'hB2);
    wait_status(ST_EMPTY, 1);
    scl_low_hold = 0;
    repeat (200 * Q_STD) @(posedge clk);  // host late: master must hold SCL low
    hwrite(REG_DATA, 8'hC3);
    wait_status(ST_BUSY, 0);
    hold_w = scl_low_hold;
    p_std = period;
    chk(slv.mem[8'h10], 8'hA1, "write byte 0");
    chk(slv.mem[8'h11], 8'hB2, "write byte 1");
    chk(slv.mem[8'h12], 8'hC3, "write byte 2");
    chk(slv.n_start, 1, "one START");
    chk(slv.n_stop, 1, "one STOP");
    chk(p_std, 4 * Q_STD, "SCL period standard mode");
    checks++; if (hold_w < 100 * Q_STD) begin failures++; $display("FAIL no SCL hold for late host (%0d)", hold_w); end

    // ---- read 3 bytes from register 0x10 ----
    hwrite(REG_OP_NUM, 8'd3);
    hwrite(REG_CTRL, 8'h01);  // DIR=read, REQ
    wait_status(ST_FULL, 1);
    chk(irq, 1, "irq on FULL");
    hread(REG_DATA, d);
    chk(d, 8'hA1, "read byte 0");
    wait_status(ST_FULL, 1);
    scl_low_hold = 0;
    repeat (200 * Q_STD) @(posedge clk);  // host late reading
    hread(REG_DATA, d);
    chk(d, 8'hB2, "read byte 1");
    wait_status(ST_FULL, 1);
    hread(REG_DATA, d);
    chk(d, 8'hC3, "read byte 2");
    wait_status(ST_BUSY, 0);
    hold_r = scl_low_hold;
    chk(slv.n_rstart, 1, "repeated START in read");
    chk(slv.n_ack_seen, 2, "master ACKs all but last");
    chk(slv.n_nack_seen, 1, "master NACKs last byte");
    chk(slv.n_stop, 2, "STOP after read");
    checks++; if (hold_r < 100 * Q_STD) begin failures++; $display("FAIL no SCL hold on full buffer (%0d)", hold_r); end
    hread(REG_STATUS, d);
    chk(d, 8'h01, "status idle after read");

    // ---- absent device: NACK -> ASK_IN ----
    hwrite(REG_DEVICE, 8'h55);
    hwrite(REG_OP_NUM, 8'd1);
    hwrite(REG_DATA, 8'h77);
    hwrite(REG_CTRL, 8'h03);
    wait_status(ST_BUSY, 0);
    hread(REG_STATUS, d);
    chk(d[ST_ASK_IN], 1, "ASK_IN after NACK");
    chk(slv.n_stop, 3, "STOP after NACK");
    hwrite(REG_STATUS, 8'h00);
    hread(REG_STATUS, d);
    chk(d[ST_ASK_IN], 0, "ASK_IN cleared by host");
    hread(REG_STATUS, d);
    if (!d[ST_EMPTY]) begin  // byte left in the buffer from the failed write
      hwrite(REG_DATA, 8'h00);
    end

    // ---- write with clock stretching by the slave ----
    slv.stretch = 1;
    hwrite(REG_DEVICE, 8'h3C);
    hwrite(REG_TARGET, 8'h40);
    hwrite(REG_OP_NUM, 8'd2);
    hwrite(REG_DATA, 8'h5A);
    hwrite(REG_CTRL, 8'h03);
    wait_status(ST_EMPTY, 1);
    hwrite(REG_DATA, 8'h6B);
    wait_status(ST_BUSY, 0);
    slv.stretch = 0;
    chk(slv.mem[8'h40], 8'h5A, "stretched write byte 0");
    chk(slv.mem[8'h41], 8'h6B, "stretched write byte 1");
    checks++; if (slv.n_stretch == 0) begin failures++; $display("FAIL no stretch happened"); end

    // ---- fast mode read of 2 bytes ----
    fast = 1;
    hwrite(REG_TARGET, 8'h41);
    hwrite(REG_OP_NUM, 8'd2);
    hwrite(REG_CTRL, 8'h01);
    wait_status(ST_FULL, 1);
    hread(REG_DATA, d);
    chk(d, 8'h6B, "fast read byte 0");
    wait_status(ST_FULL, 1);
    hread(REG_DATA, d);
    chk(d, 8'(8'h42 * 7 + 3), "fast read byte 1 (preset memory)");
    p_fast = period;
    wait_status(ST_BUSY, 0);
    chk(p_fast, 4 * Q_FAST, "SCL period fast mode");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
