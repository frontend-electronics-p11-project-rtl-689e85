// i2c_bus: wired-AND resolution of the two I2C lines.
//
// Every device on an I2C bus has open-drain outputs: it either pulls a line low or leaves
// it floating, and an external pull-up resistor holds the line high when nobody pulls.
// Each device here presents a pull-low enable per line (1 = sink current); a line is high
// only when no device pulls it, i.e. the line is the AND of all released outputs.
// Purely combinational; N_DEV devices share the bus.
// The wired-AND bus with pull-up resistors follows the design; modelling each open-drain
// output as a pull-low enable, so the bus needs no tri-state logic, is this implementation's
// choice.
module i2c_bus #(
  parameter int unsigned N_DEV = 2
) (
  input  logic [N_DEV-1:0] scl_pull,  // per device: 1 = drive SCL low
  input  logic [N_DEV-1:0] sda_pull,  // per device: 1 = drive SDA low
  output logic             scl,       // resolved SCL level
  output logic             sda        // resolved SDA level
);
  always_comb begin
    scl = 1'b1;  // pull-up
    sda = 1'b1;
    for (int unsigned i = 0; i < N_DEV; i++) begin
      scl = scl & ~scl_pull[i];
      sda = sda & ~sda_pull[i];
    end
  end
endmodule
