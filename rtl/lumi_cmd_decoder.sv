// lumi_cmd_decoder: serial command decoder of the LumiMulti ADC slow interface.
//
// The chip is an SPI slave in mode 0: the controller changes SDI after the falling edge of
// SCLK and the decoder samples it on the rising edge. A command is 16 bits, MSB first:
// header 101011, 2-bit command code, 8-bit data field. A three-state machine follows the
// bits: HUNT slides a 6-bit window over the incoming bits until it holds the header, CMD
// takes the two command bits, DATA takes the eight data bits and, with the last one,
// updates the addressed setting and raises `cmd_done` for one SCLK cycle. The machine then
// hunts for the next header; bits that do not form a header are ignored, which also
// re-synchronises the decoder after a corrupted command.
//
// Commands (data field bit 7 is the first data bit on the wire):
//   00 config : data[7:6] mode (00 parallel, 01 test, 10 serial; 11 leaves the mode),
//               data[5:3] ADC read out in test mode, data[2] LVDS low power,
//               data[1] internal buffer low power, data[0] unused (sent as 0)
//   01 active : data[7] switches ADC7 on (1) / off (0), ..., data[0] ADC0
//   10 dac0   : code of DAC0 (bias current of the ADC core)
//   11 dac1   : code of DAC1 (sample-and-hold current)
// After the hard reset (rst_n low, asynchronous) the chip is in parallel mode.
//
// The header, codes, field order and reset to parallel mode follow the design. The design
// gives the data field as 8 bits in its format summary but calls the DAC values 9-bit;
// this decoder follows the 8-bit frame (DATA_W parameter). The reset state of the other
// settings (all ADCs on, DACs at mid-scale, full power) and the SPI framing by header
// search instead of a chip select are this implementation's choices.
module lumi_cmd_decoder
  import lumi_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  logic              sclk,
  input  logic              rst_n,
  input  logic              sdi,
  output mode_e             mode,
  output logic [2:0]        test_adc,
  output logic              lvds_lp,
  output logic              buf_lp,
  output logic [N_ADC-1:0]  adc_on,
  output logic [DATA_W-1:0] dac0,
  output logic [DATA_W-1:0] dac1,
  output logic              cmd_done
);
  typedef enum logic [1:0] {
    D_HUNT,
    D_CMD,
    D_DATA
  } dstate_e;

  dstate_e           state;
  logic [4:0]        window;  // last five bits seen
  logic [1:0]        cmd;
  logic [DATA_W-2:0] data;   // data bits received so far
  logic [$clog2(DATA_W)-1:0] cnt;
  logic [DATA_W-1:0] data_full;

  assign data_full = {data[DATA_W-2:0], sdi};

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= D_HUNT;
      window   <= '0;
      cmd      <= '0;
      data     <= '0;
      cnt      <= '0;
      mode     <= MODE_PARALLEL;
      test_adc <= '0;
      lvds_lp  <= 1'b0;
      buf_lp   <= 1'b0;
      adc_on   <= '1;
      dac0     <= DATA_W'(1 << (DATA_W - 1));
      dac1     <= DATA_W'(1 << (DATA_W - 1));
      cmd_done <= 1'b0;
    end else begin
      cmd_done <= 1'b0;
      unique case (state)
        D_HUNT: begin
          window <= {window[3:0], sdi};
          if ({window[4:0], sdi} == HEADER) begin
            state <= D_CMD;
            cnt   <= '0;
          end
        end
        D_CMD: begin
          cmd <= {cmd[0], sdi};
          if (cnt == 1) begin
            state <= D_DATA;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: begin  // D_DATA
          data <= data_full[DATA_W-2:0];
          if (cnt == ($clog2(DATA_W))'(DATA_W - 1)) begin
            unique case (cmd_e'(cmd))
              CMD_CONFIG: begin
                if (data_full[DATA_W-1 -: 2] != MODE_RESERVED) mode <= mode_e'(data_full[DATA_W-1 -: 2]);
                test_adc <= data_full[DATA_W-3 -: 3];
                lvds_lp  <= data_full[DATA_W-6];
                buf_lp   <= data_full[DATA_W-7];
              end
              CMD_ACTIVE: adc_on <= N_ADC'(data_full);
              CMD_DAC0:   dac0   <= data_full;
              default:    dac1   <= data_full;
            endcase
            cmd_done <= 1'b1;
            window   <= '0;
            state    <= D_HUNT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
      endcase
    end
  end

  initial assert (DATA_W >= 8) else $error("lumi_cmd_decoder: config fields need DATA_W >= 8");
endmodule
