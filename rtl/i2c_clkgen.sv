// i2c_clkgen: I2C bit-clock generator.
//
// Divides the system clock down to a one-cycle tick at four times the SCL frequency; the
// master spends one tick on each quarter of an SCL period, so SCL runs at 1/4 of this
// generator's output rate, as the design specifies. `fast` selects fast mode (400 kHz)
// instead of standard mode (100 kHz). The divider rounds up so the bus never runs faster
// than the selected mode. While `run` is low the counter is held at zero, so the first tick
// of a transfer comes one full quarter period after `run` rises.
//
// Interface: clk/rst_n (active-low asynchronous reset), run, fast -> tick.
// Timing: tick is high for one clk every DIV_STD (or DIV_FAST) cycles.
// The 50 MHz default matches the FPGA board clock of the design; the divider itself is
// this implementation's choice.
module i2c_clkgen #(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned SCL_STD_HZ  = 100_000,
  parameter int unsigned SCL_FAST_HZ = 400_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  input  logic fast,
  output logic tick
);
  localparam int unsigned DIV_STD  = (CLK_HZ + 4 * SCL_STD_HZ - 1) / (4 * SCL_STD_HZ);
  localparam int unsigned DIV_FAST = (CLK_HZ + 4 * SCL_FAST_HZ - 1) / (4 * SCL_FAST_HZ);
  localparam int unsigned CW = $clog2(DIV_STD + 1);

  initial begin
    assert (DIV_STD >= 2 && DIV_FAST >= 2)
      else $error("i2c_clkgen: CLK_HZ too low for the selected SCL rates");
  end

  logic [CW-1:0] cnt;
  logic [CW-1:0] last;

  assign last = fast ? CW'(DIV_FAST - 1) : CW'(DIV_STD - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (!run) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt >= last) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
