// lumi_readout: LVDS readout of the eight ADC channels of the LumiMulti chip.
//
// Three readout modes, chosen by the command decoder:
//   parallel: every ADC has its own LVDS lane (lane i = ADC i) and sends its 10-bit sample
//             serially, MSB first. A new sample is taken every 10 input clocks, so the
//             internal ADC clock is the input clock / 10.
//   serial:   all ADCs share lane 0. The lane sends bit 9 of ADC7, ADC6, ..., ADC0, then
//             bit 8 of ADC7 ... ADC0, and so on down to bit 0: 80 bits per frame, so the
//             internal ADC clock is the input clock / 80.
//   test:     only the ADC selected by `test_adc` is read; each input clock its sample is
//             presented in parallel on lanes 9..0 (lane 9 = MSB), so the ADC runs at the
//             input clock.
// The frame counter restarts whenever the mode changes. `adc_clk_en[i]` is the internal
// ADC clock of channel i as a one-cycle enable at the start of each frame (the point where
// the samples are captured); it stays low for ADCs switched off, whose clock is stopped,
// and those ADCs send zeros. Mode 11 (not defined) drives all lanes low.
//
// Interface: clk is the chip input clock; mode/test_adc/adc_on come from the command
// decoder, which runs on the SPI clock, and are passed through two-flop synchronisers
// (they are static settings). samples[i] is the current output word of ADC i.
// Lane and bit order, divide ratios and the test-mode lane use follow the design; lanes
// unused in a mode are driven low, which is this implementation's choice.
module lumi_readout
  import lumi_pkg::*;
#(
  parameter int unsigned NA = N_ADC,     // number of ADCs
  parameter int unsigned NB = ADC_BITS,  // bits per sample
  parameter int unsigned NL = ADC_BITS   // LVDS lanes (test mode uses all of them)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  mode_e                mode,
  input  logic [2:0]           test_adc,
  input  logic [NA-1:0]        adc_on,
  input  logic [NA-1:0][NB-1:0] samples,
  output logic [NA-1:0]        adc_clk_en,
  output logic [NL-1:0]        lvds,
  output logic                 frame_start
);
  localparam int unsigned FRAME = NA * NB;  // serial frame length
  localparam int unsigned CW    = $clog2(FRAME);

  initial assert (NL >= NA && NL >= NB) else $error("lumi_readout: too few LVDS lanes");

  // synchronise the static settings into the readout clock domain
  mode_e         mode_m, mode_s, mode_prev;
  logic [2:0]    tadc_m, tadc_s;
  logic [NA-1:0] on_m, on_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_m <= MODE_PARALLEL;
      mode_s <= MODE_PARALLEL;
      tadc_m <= '0;
      tadc_s <= '0;
      on_m   <= '1;
      on_s   <= '1;
    end else begin
      mode_m <= mode;
      mode_s <= mode_m;
      tadc_m <= test_adc;
      tadc_s <= tadc_m;
      on_m   <= adc_on;
      on_s   <= on_m;
    end
  end

  logic [CW-1:0] cnt;
  logic [CW-1:0] last;
  logic          capture;
  logic          mode_chg;

  always_comb begin
    unique case (mode_s)
      MODE_SERIAL: last = CW'(FRAME - 1);
      MODE_TEST:   last = '0;
      default:     last = CW'(NB - 1);
    endcase
  end

  assign mode_chg = (mode_s != mode_prev);
  assign capture  = (cnt == '0) && !mode_chg && (mode_s != MODE_RESERVED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      mode_prev <= MODE_PARALLEL;
    end else begin
      mode_prev <= mode_s;
      if (mode_chg || cnt >= last) cnt <= '0;
      else cnt <= cnt + 1'b1;
    end
  end

  // samples of switched-off ADCs read as zero
  logic [NA-1:0][NB-1:0] gated;
  always_comb begin
    for (int unsigned a = 0; a < NA; a++) gated[a] = on_s[a] ? samples[a] : '0;
  end

  // serial frame in transmission order: bit b of ADC a sits at (NB-1-b)*NA + (NA-1-a)
  logic [FRAME-1:0] ser_frame;
  always_comb begin
    for (int unsigned b = 0; b < NB; b++)
      for (int unsigned a = 0; a < NA; a++)
        ser_frame[FRAME-1 - ((NB-1-b)*NA + (NA-1-a))] = gated[a][b];
  end

  logic [NA-1:0][NB-1:0] par_sh;  // one shift register per ADC (parallel mode)
  logic [FRAME-1:0]      ser_sh;  // one long shift register (serial mode)
  logic [NB-1:0]         test_q;  // test-mode word

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par_sh <= '0;
      ser_sh <= '0;
      test_q <= '0;
    end else if (capture) begin
      par_sh <= gated;
      ser_sh <= ser_frame;
      test_q <= gated[tadc_s];
    end else begin
      for (int unsigned a = 0; a < NA; a++) par_sh[a] <= {par_sh[a][NB-2:0], 1'b0};
      ser_sh <= {ser_sh[FRAME-2:0], 1'b0};
    end
  end

  // lane outputs, registered one cycle after the shift registers
  logic [NL-1:0] lanes;
  always_comb begin
    lanes = '0;
    unique case (mode_s)
      MODE_PARALLEL: for (int unsigned a = 0; a < NA; a++) lanes[a] = par_sh[a][NB-1];
      MODE_SERIAL:   lanes[0] = ser_sh[FRAME-1];
      MODE_TEST:     lanes[NB-1:0] = test_q;
      default:       lanes = '0;
    endcase
  end

  assign lvds = lanes;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_clk_en  <= '0;
      frame_start <= 1'b0;
    end else begin
      adc_clk_en  <= capture ? on_s : '0;
      frame_start <= capture;
    end
  end
endmodule
