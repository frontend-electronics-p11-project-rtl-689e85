// tb_i2c_slave_chip: the slave test chip driven by a bit-banging master, following the
// functional-simulation scenario of the design: eight bytes (11 22 33 44 56 78 9A BC) are
// written over I2C, read back over I2C, and every register is read through the
// asynchronous nibble port (upper and lower half). A second write overwrites part of
// the array and is checked the same way.
// The eight example bytes come from the design's own functional simulation; the
// second write's data, the bus rate and the clock are test choices.
module tb_i2c_slave_chip;
  logic clk = 1'b0, rst_n = 1'b0;
  logic m_scl_pull, m_sda_pull, s_sda_pull;
  wire  scl = !m_scl_pull;
  wire  sda = !(m_sda_pull | s_sda_pull);
  logic [2:0] mux_sel = '0;
  logic upper_lower = 1'b0;
  logic [3:0] nibble;
  logic [7:0] expv [8];
  logic [7:0] rd[];
  logic [7:0] wdat[];
  int checks = 0, failures = 0, nacks;

  i2c_slave_chip #(.SLAVE_ADDR(7'h3C)) dut (
    .clk, .rst_n, .scl, .sda, .sda_pull(s_sda_pull), .mux_sel, .upper_lower, .nibble);

  i2c_bitbang_master #(.HALF_NS(400)) bfm (.scl, .sda, .scl_pull(m_scl_pull), .sda_pull(m_sda_pull));

  always #5 clk = ~clk;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic check_nibbles();
    for (int i = 0; i < 8; i++) begin
      mux_sel = 3'(i);
      upper_lower = 1'b1;
      #1 chk(nibble, expv[i][7:4], $sformatf("upper nibble %0d", i));
      upper_lower = 1'b0;
      #1 chk(nibble, expv[i][3:0], $sformatf("lower nibble %0d", i));
    end
  endtask

  initial begin
    #100 rst_n = 1'b1;
    #1000;
    expv = '{8'h11, 8'h22, 8'h33, 8'h44, 8'h56, 8'h78, 8'h9A, 8'hBC};
    wdat = new[8];
    foreach (wdat[i]) wdat[i] = expv[i];
    bfm.write_regs(7'h3C, 8'h00, wdat, nacks);
    chk(nacks, 0, "write acknowledged");
    check_nibbles();
    bfm.read_regs(7'h3C, 8'h00, 8, rd, nacks);
    chk(nacks, 0, "read acknowledged");
    foreach (rd[i]) chk(rd[i], expv[i], $sformatf("read back %0d", i));
    wdat = '{8'hFF, 8'hEF, 8'hFC};
    bfm.write_regs(7'h3C, 8'h04, wdat, nacks);
    expv[4] = 8'hFF; expv[5] = 8'hEF; expv[6] = 8'hFC;
    check_nibbles();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
