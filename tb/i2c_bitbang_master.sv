// i2c_bitbang_master: behavioural I2C master used only by testbenches.
//
// Drives open-drain pull-low enables with plain delays (HALF_NS per SCL half period) and
// offers tasks for START, repeated START, STOP, sending a byte (returns the ACK) and
// receiving a byte (sends ACK or NACK), plus register-level write and read sequences.
// Timing is set only by HALF_NS; there is no clock. The register-level sequences use the
// same register-pointer protocol as the slave in this design.
module i2c_bitbang_master #(
  parameter int unsigned HALF_NS = 500
) (
  input  logic scl,
  input  logic sda,
  output logic scl_pull,
  output logic sda_pull
);
  initial begin
    scl_pull = 1'b0;
    sda_pull = 1'b0;
  end

  task automatic start();  // also a repeated START when SCL is low
    sda_pull = 1'b0;
    #(HALF_NS / 2);
    scl_pull = 1'b0;
    #(HALF_NS);
    sda_pull = 1'b1;
    #(HALF_NS);
    scl_pull = 1'b1;
    #(HALF_NS / 2);
  endtask

  task automatic stop();
    sda_pull = 1'b1;
    #(HALF_NS / 2);
    scl_pull = 1'b0;
    #(HALF_NS);
    sda_pull = 1'b0;
    #(HALF_NS);
  endtask

  task automatic clock_bit(output logic b);
    #(HALF_NS / 2);
    scl_pull = 1'b0;
    #(HALF_NS / 2);
    b = sda;
    #(HALF_NS / 2);
    scl_pull = 1'b1;
    #(HALF_NS / 2);
  endtask

  task automatic send_byte(input logic [7:0] v, output logic ack);
    logic b;
    for (int i = 7; i >= 0; i--) begin
      sda_pull = !v[i];
      clock_bit(b);
    end
    sda_pull = 1'b0;
    clock_bit(b);
    ack = !b;
  endtask

  task automatic recv_byte(input logic give_ack, output logic [7:0] v);
    logic b;
    sda_pull = 1'b0;
    for (int i = 7; i >= 0; i--) begin
      clock_bit(b);
      v[i] = b;
    end
    sda_pull = give_ack;
    clock_bit(b);
    sda_pull = 1'b0;
  endtask

  // S, addr+W, ptr, data[0..n-1], P ; acks collected into nacks (count of missing ACKs)
  task automatic write_regs(input logic [6:0] dev, input logic [7:0] ptr,
                            input logic [7:0] data[], output int nacks);
    logic ack;
    nacks = 0;
    start();
    send_byte({dev, 1'b0}, ack); if (!ack) nacks++;
    if (ack) begin
      send_byte(ptr, ack); if (!ack) nacks++;
      foreach (data[i]) begin
        send_byte(data[i], ack);
        if (!ack) nacks++;
      end
    end
    stop();
  endtask

  // S, addr+W, ptr, Sr, addr+R, n bytes (ACK all but last), P
  task automatic read_regs(input logic [6:0] dev, input logic [7:0] ptr, input int n,
                           output logic [7:0] data[], output int nacks);
    logic ack;
    nacks = 0;
    data = new[n];
    start();
    send_byte({dev, 1'b0}, ack); if (!ack) nacks++;
    send_byte(ptr, ack); if (!ack) nacks++;
    start();
    send_byte({dev, 1'b1}, ack); if (!ack) nacks++;
    for (int i = 0; i < n; i++) recv_byte(i != n - 1, data[i]);
    stop();
  endtask
endmodule
