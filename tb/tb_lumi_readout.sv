// tb_lumi_readout: self-checking test of the LVDS readout in its three modes.
//
// Random 10-bit samples are applied to the eight ADC inputs and changed every cycle. A
// reference model in the testbench remembers the samples present at the capture edge
// (the edge where frame_start rises) and predicts every lane bit of the frame:
// parallel (lane a = ADC a, MSB first, 10-cycle frame), serial (lane 0, bit 9 of ADC7..ADC0,
// then bit 8 ..., 80-cycle frame) and test (lanes 9..0 = selected ADC each cycle). It also
// checks the frame period (internal ADC clock = input clock / 10, / 80, / 1), that
// switched-off ADCs read as zero and get no clock enable, and the reserved mode.
// Lane order, frame lengths and the test-mode layout follow the design; the sample data are
// random and the lane choice for serial mode is this design's own.
module tb_lumi_readout;
  import lumi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  mode_e mode = MODE_PARALLEL;
  logic [2:0] test_adc = '0;
  logic [7:0] adc_on = '1;
  logic [7:0][9:0] samples = '0;
  logic [7:0] adc_clk_en;
  logic [9:0] lvds;
  logic frame_start;
  int checks = 0, failures = 0;

  lumi_readout dut (.clk, .rst_n, .mode, .test_adc, .adc_on, .samples, .adc_clk_en, .lvds, .frame_start);

  always #5 clk = ~clk;

  // new random samples after every edge
  always @(negedge clk) for (int a = 0; a < 8; a++) samples[a] = 10'($urandom);

  // reference model
  bit checking = 0;
  mode_e cmode;
  logic [2:0] ctadc;
  logic [7:0] con;
  logic [7:0][9:0] samp_d, frame;
  int k = 0, since = 0, period = -1, frames = 0;
  logic [9:0] expl;

  always @(posedge clk) begin
    since++;
    if (frame_start) begin
      period = since;
      since = 0;
      frames++;
      k = 0;
      for (int a = 0; a < 8; a++) frame[a] = con[a] ? samp_d[a] : '0;
      if (checking) begin
        checks++;
        if (adc_clk_en !== con) begin failures++; $display("FAIL adc_clk_en %b expected %b", adc_clk_en, con); end
      end
    end
    if (checking) begin
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
        if (failures < 10) $display("FAIL mode %0d bit %0d: lvds %b expected %b", cmode, k, lvds, expl);
      end
    end
    k++;
    samp_d = samples;
  end

  task automatic run_mode(input mode_e m, input logic [2:0] t, input logic [7:0] on, input int exp_period);
    checking = 0;
    mode = m; test_adc = t; adc_on = on;
    cmode = m; ctadc = t; con = on;
    repeat (200) @(negedge clk);  // settle: synchroniser and one full frame
    @(posedge clk iff frame_start);
    @(negedge clk);
    checking = 1;
    frames = 0;
    repeat (8 * exp_period + 5) @(negedge clk);
    checks++;
    if (period != exp_period) begin failures++; $display("FAIL frame period %0d expected %0d", period, exp_period); end
    checks++;
    if (frames < 8) begin failures++; $display("FAIL only %0d frames", frames); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_mode(MODE_PARALLEL, 3'd0, 8'hFF, 10);
    run_mode(MODE_SERIAL,   3'd0, 8'hFF, 80);
    run_mode(MODE_TEST,     3'd6, 8'hFF, 1);
    run_mode(MODE_TEST,     3'd1, 8'hFF, 1);
    run_mode(MODE_PARALLEL, 3'd0, 8'b1010_0110, 10);
    run_mode(MODE_SERIAL,   3'd0, 8'b0111_1110, 80);
    // reserved mode: lanes low, no frames
    checking = 0;
    mode = MODE_RESERVED;
    repeat (20) @(negedge clk);
    frames = 0;
    repeat (100) begin
      @(negedge clk);
      checks++;
      if (lvds !== '0 || frame_start) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
