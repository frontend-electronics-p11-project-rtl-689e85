// tb_i2c_bus: exhaustive check of the wired-AND bus resolution for three devices: a line
// is high only when no device pulls it low.
// Expected values are computed in the testbench as the AND of the released lines; all 64
// combinations of three devices' pull enables are applied, one every 1 ns.
module tb_i2c_bus;
  logic [2:0] scl_pull, sda_pull;
  logic scl, sda;
  int checks = 0, failures = 0;

  i2c_bus #(.N_DEV(3)) dut (.scl_pull, .sda_pull, .scl, .sda);

  initial begin
    for (int i = 0; i < 64; i++) begin
      {scl_pull, sda_pull} = 6'(i);
      #1;
      checks += 2;
      if (scl !== (scl_pull == 3'b000)) begin failures++; $display("FAIL scl pull=%b", scl_pull); end
      if (sda !== (sda_pull == 3'b000)) begin failures++; $display("FAIL sda pull=%b", sda_pull); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
