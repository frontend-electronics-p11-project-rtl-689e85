// tb_i2c_reg_array: writes the eight bytes of the functional-simulation example into the
// register array, then checks the synchronous read port and every nibble of the
// asynchronous readout against a reference copy; also checks the reset value 0.
// The example bytes follow the design's own slave simulation; the register array is
// clocked by a 10 ns testbench clock and the nibble port is checked combinationally.
module tb_i2c_reg_array;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, upper_lower = 1'b0;
  logic [2:0] addr = '0, mux_sel = '0;
  logic [7:0] wdata = '0, rdata;
  logic [3:0] nibble;
  logic [7:0] ref_mem [8];
  int checks = 0, failures = 0;

  i2c_reg_array dut (.clk, .rst_n, .we, .addr, .wdata, .rdata, .mux_sel, .upper_lower, .nibble);

  always #5 clk = ~clk;

  task automatic chk(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    ref_mem = '{8'h11, 8'h22, 8'h33, 8'h44, 8'h56, 8'h78, 8'h9A, 8'hBC};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 8; i++) begin
      addr = 3'(i);
      #1 chk(rdata, 8'h00, "reset value");
    end
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      we = 1'b1; addr = 3'(i); wdata = ref_mem[i];
    end
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < 8; i++) begin
      addr = 3'(i);
      #1 chk(rdata, ref_mem[i], "read port");
      mux_sel = 3'(i);
      upper_lower = 1'b1;
      #1 chk({4'h0, nibble}, {4'h0, ref_mem[i][7:4]}, "upper nibble");
      upper_lower = 1'b0;
      #1 chk({4'h0, nibble}, {4'h0, ref_mem[i][3:0]}, "lower nibble");
    end
    // overwrite one register and read it back
    @(negedge clk); we = 1'b1; addr = 3'd5; wdata = 8'hEF;
    @(negedge clk); we = 1'b0;
    mux_sel = 3'd5; upper_lower = 1'b1;
    #1 chk({4'h0, nibble}, 8'h0E, "overwrite upper");
    addr = 3'd4;
    #1 chk(rdata, 8'h56, "neighbour untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
