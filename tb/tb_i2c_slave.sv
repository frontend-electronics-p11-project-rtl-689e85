// tb_i2c_slave: self-checking test of the I2C slave engine with a bit-banging master and a
// plain register array model in the testbench. Checks address match (ACK) and mismatch
// (no ACK, no write), pointer load, sequential write with pointer wrap-around, random and
// sequential read with a repeated START, and recovery after a transfer cut short by STOP.
// A 100 MHz clock runs the slave and the bit-banging master drives SCL at 1.25 MHz (80x
// oversampling, faster than the bus modes to keep the run short); the slave address and
// the byte values are test choices.
module tb_i2c_slave;
  logic clk = 1'b0, rst_n = 1'b0;
  logic m_scl_pull, m_sda_pull, s_sda_pull;
  wire  scl = !m_scl_pull;
  wire  sda = !(m_sda_pull | s_sda_pull);
  logic [2:0] reg_addr;
  logic [7:0] reg_wdata;
  logic       reg_we;
  logic [7:0] regs [8];
  int checks = 0, failures = 0, nacks, writes = 0;
  logic [7:0] rd[];
  logic [7:0] wdat[];

  i2c_slave #(.SLAVE_ADDR(7'h3C)) dut (
    .clk, .rst_n, .scl, .sda, .sda_pull(s_sda_pull),
    .reg_addr, .reg_wdata, .reg_we, .reg_rdata(regs[reg_addr]));

  i2c_bitbang_master #(.HALF_NS(400)) bfm (.scl, .sda, .scl_pull(m_scl_pull), .sda_pull(m_sda_pull));

  always #5 clk = ~clk;  // 100 MHz, SCL 1.25 MHz: 80x oversampling

  always @(posedge clk) if (reg_we) begin
    regs[reg_addr] <= reg_wdata;
    writes++;
  end

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    foreach (regs[i]) regs[i] = 8'h00;
    #100 rst_n = 1;
    #1000;
    // sequential write of the example data from register 0
    wdat = '{8'h11, 8'h22, 8'h33, 8'h44, 8'h56, 8'h78, 8'h9A, 8'hBC};
    bfm.write_regs(7'h3C, 8'h00, wdat, nacks);
    chk(nacks, 0, "write acknowledged");
    foreach (wdat[i]) chk(regs[i], wdat[i], $sformatf("reg %0d written", i));
    // random read of 3 registers from 5
    bfm.read_regs(7'h3C, 8'h05, 3, rd, nacks);
    chk(nacks, 0, "read acknowledged");
    chk(rd[0], 8'h78, "read reg5"); chk(rd[1], 8'h9A, "read reg6"); chk(rd[2], 8'hBC, "read reg7");
    // wrong address: no ACK, nothing written
    writes = 0;
    wdat = '{8'hFF};
    bfm.write_regs(7'h3D, 8'h00, wdat, nacks);
    chk(nacks, 1, "foreign address not acknowledged");
    chk(writes, 0, "no write for foreign address");
    chk(regs[0], 8'h11, "reg0 unchanged");
    // sequential write wrapping around the end of the array
    wdat = '{8'hEF, 8'hFC, 8'h01};
    bfm.write_regs(7'h3C, 8'h06, wdat, nacks);
    chk(nacks, 0, "wrap write acknowledged");
    chk(regs[6], 8'hEF, "reg6"); chk(regs[7], 8'hFC, "reg7"); chk(regs[0], 8'h01, "reg0 after wrap");
    // read all eight, wrapping
    bfm.read_regs(7'h3C, 8'h07, 8, rd, nacks);
    chk(rd[0], 8'hFC, "seq read 7");
    chk(rd[1], 8'h01, "seq read 0 after wrap");
    chk(rd[2], 8'h22, "seq read 1");
    chk(rd[7], 8'hEF, "seq read 6");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
