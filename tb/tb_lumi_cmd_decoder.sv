// tb_lumi_cmd_decoder: self-checking test of the LumiMulti serial command decoder.
//
// An SPI mode-0 controller model shifts commands MSB first (SDI changes on the falling
// SCLK edge, the decoder samples on the rising edge). Checks: parallel mode after reset,
// each config mode, test-ADC and low-power fields, the reserved mode code leaving the mode
// alone, active-ADC bit order (first bit = ADC7), DAC0/DAC1 codes, a wrong header being
// ignored, garbage bits before a header, and that cmd_done rises exactly on the 16th bit.
// Frame format, codes and field order follow the design; expected register values are
// computed from the frames sent, independently of the decoder.
module tb_lumi_cmd_decoder;
  import lumi_pkg::*;
  logic sclk = 1'b0, rst_n = 1'b1, sdi = 1'b0;
  mode_e mode;
  logic [2:0] test_adc;
  logic lvds_lp, buf_lp, cmd_done;
  logic [7:0] adc_on, dac0, dac1;
  int checks = 0, failures = 0, done_count = 0, done_bit = -1, bitpos = 0;

  lumi_cmd_decoder dut (.sclk, .rst_n, .sdi, .mode, .test_adc, .lvds_lp, .buf_lp,
                        .adc_on, .dac0, .dac1, .cmd_done);

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  always @(posedge sclk) begin
    bitpos++;
    #1 if (cmd_done) begin done_count++; done_bit = bitpos; end
  end

  task automatic send_bits(input logic [31:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) begin
      sdi = v[i];
      #50 sclk = 1'b1;
      #50 sclk = 1'b0;
    end
  endtask

  task automatic send_cmd(input logic [1:0] c, input logic [7:0] d);
    bitpos = 0;
    done_bit = -1;
    send_bits({16'h0, HEADER, c, d}, 16);
    send_bits(0, 1);  // one idle clock so cmd_done is seen
    chk(done_bit, 16, "cmd_done on the 16th bit");
  endtask

  initial begin
    #5 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    #20;
    chk(mode, MODE_PARALLEL, "parallel after reset");
    chk(adc_on, 8'hFF, "all ADCs on after reset");

    send_cmd(CMD_CONFIG, {2'b10, 3'd5, 1'b1, 1'b0, 1'b0});
    chk(mode, MODE_SERIAL, "serial mode");
    chk(test_adc, 5, "test adc 5");
    chk(lvds_lp, 1, "lvds low power");
    chk(buf_lp, 0, "buffer full power");

    send_cmd(CMD_CONFIG, {2'b01, 3'd2, 1'b0, 1'b1, 1'b0});
    chk(mode, MODE_TEST, "test mode");
    chk(test_adc, 2, "test adc 2");
    chk(lvds_lp, 0, "lvds full power");
    chk(buf_lp, 1, "buffer low power");

    send_cmd(CMD_CONFIG, {2'b11, 3'd7, 1'b0, 1'b0, 1'b0});
    chk(mode, MODE_TEST, "reserved mode code ignored");
    chk(test_adc, 7, "test adc still updated");

    send_cmd(CMD_CONFIG, {2'b00, 3'd0, 1'b0, 1'b0, 1'b0});
    chk(mode, MODE_PARALLEL, "back to parallel");

    send_cmd(CMD_ACTIVE, 8'b1000_0001);
    chk(adc_on, 8'h81, "ADC7 and ADC0 on");
    send_cmd(CMD_DAC0, 8'h5C);
    chk(dac0, 8'h5C, "dac0");
    send_cmd(CMD_DAC1, 8'hA7);
    chk(dac1, 8'hA7, "dac1");
    chk(dac0, 8'h5C, "dac0 kept");

    // wrong header (101010): must be ignored
    done_count = 0;
    send_bits({6'b101010, 2'b10, 8'h00}, 16);
    send_bits(0, 8);
    chk(done_count, 0, "bad header ignored");
    chk(dac0, 8'h5C, "dac0 unchanged by bad frame");

    // garbage before the header: the decoder finds the header anyway
    bitpos = 0;
    send_bits({3'b110, HEADER, CMD_DAC0, 8'h3E}, 19);
    send_bits(0, 1);
    chk(dac0, 8'h3E, "dac0 after resync");

    // hard reset returns to parallel mode
    send_cmd(CMD_CONFIG, {2'b10, 6'b0});
    rst_n = 1'b0; #10 rst_n = 1'b1; #10;
    chk(mode, MODE_PARALLEL, "parallel after hard reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
