// tb_i2c_clkgen: checks the tick period of the I2C bit-clock generator in standard and fast
// mode against the expected divider (rounded up so SCL never exceeds the nominal rate),
// and that no tick appears while the generator is stopped.
// The 100/400 kHz rates and the four ticks per SCL period follow the design; the divider
// values expected here (125 and 32 at 50 MHz) are worked out from those numbers.
module tb_i2c_clkgen;
  localparam int unsigned CLK_HZ = 50_000_000;
  localparam int unsigned EXP_STD  = 125;  // 50 MHz / (4 * 100 kHz)
  localparam int unsigned EXP_FAST = 32;   // ceil(50 MHz / (4 * 400 kHz))

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, fast = 1'b0, tick;
  int checks = 0, failures = 0;

  i2c_clkgen #(.CLK_HZ(CLK_HZ)) dut (.clk, .rst_n, .run, .fast, .tick);

  always #10 clk = ~clk;

  task automatic measure(input int exp, input string name);
    int t0, t1, n;
    n = 0;
    @(posedge clk iff tick);
    t0 = 0;
    for (int k = 0; k < 3; k++) begin
      n = 0;
      do begin
        @(posedge clk);
        n++;
      end while (!tick);
      checks++;
      if (n != exp) begin
        failures++;
        $display("FAIL %s: tick period %0d, expected %0d", name, n, exp);
      end
    end
    t1 = t0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // stopped: no tick
    repeat (300) begin
      @(posedge clk);
      checks++;
      if (tick) failures++;
    end
    run = 1'b1;
    measure(EXP_STD, "standard");
    fast = 1'b1;
    @(posedge clk iff tick);
    measure(EXP_FAST, "fast");
    run = 1'b0;
    repeat (2) @(posedge clk);
    repeat (200) begin
      @(posedge clk);
      checks++;
      if (tick) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
