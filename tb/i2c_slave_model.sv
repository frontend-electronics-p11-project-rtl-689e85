// i2c_slave_model: behavioural I2C slave used only by testbenches.
//
// Follows the bus lines with event controls (no clock): START/STOP by SDA edges while SCL
// is high, bits on SCL rising edges, its own SDA changes on SCL falling edges. It answers to
// address ADDR with a register-pointer protocol on a 256-byte memory (first byte after the
// address sets the pointer, further bytes are written/read at the pointer, which advances).
// It records what it saw (starts, repeated starts, stops, the master's ACK/NACK on reads)
// so that a testbench can check the master. With `stretch` set it holds SCL low for
// `stretch_ns` after every acknowledge, to exercise clock stretching.
// The 256-byte memory, preset to i*7+3, and the stretch option are test choices; no real
// peripheral is modelled exactly.
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h3C
) (
  input  logic scl,
  input  logic sda,
  output logic scl_pull,
  output logic sda_pull
);
  logic [7:0] mem [256];
  logic [7:0] ptr;
  logic [7:0] sh;
  logic [7:0] txb;
  int  bitn, byten;
  bit  in_ack, reading, selected, master_ack;
  int  n_start, n_rstart, n_stop, n_nack_seen, n_ack_seen, n_stretch;
  bit  busy;
  bit  stretch = 0;
  int  stretch_ns = 2000;

  initial begin
    scl_pull = 1'b0; sda_pull = 1'b0;
    bitn = 0; byten = 0; in_ack = 0; reading = 0; selected = 0; busy = 0; ptr = 0;
    n_start = 0; n_rstart = 0; n_stop = 0; n_nack_seen = 0; n_ack_seen = 0; n_stretch = 0;
    foreach (mem[i]) mem[i] = 8'(i * 7 + 3);
  end

  always @(negedge sda) if (scl) begin
    if (busy) n_rstart++; else n_start++;
    busy = 1; bitn = 0; byten = 0; in_ack = 0; reading = 0; selected = 0;
    sda_pull = 1'b0;
  end

  always @(posedge sda) if (scl) begin
    n_stop++;
    busy = 0; selected = 0; reading = 0; in_ack = 0;
    sda_pull = 1'b0;
  end

  always @(posedge scl) if (busy) begin
    if (!in_ack) begin
      sh = {sh[6:0], sda};
      bitn++;
    end else if (reading && byten > 0) begin
      master_ack = !sda;
      if (master_ack) n_ack_seen++; else n_nack_seen++;
    end
  end

  always @(negedge scl) if (busy) begin
    if (!in_ack && bitn == 8) begin
      in_ack = 1;
      if (!reading) begin
        // a byte from the master
        if (byten == 0) begin
          selected = (sh[7:1] == ADDR);
          sda_pull = selected;
          if (selected && sh[0]) reading = 1;
          master_ack = 1;
        end else if (selected) begin
          if (byten == 1) ptr = sh;
          else begin mem[ptr] = sh; ptr++; end
          sda_pull = 1'b1;
        end
      end else begin
        sda_pull = 1'b0;  // let the master answer
      end
    end else if (in_ack) begin
      in_ack = 0;
      bitn = 0;
      byten++;
      if (reading && selected && master_ack) begin
        txb = mem[ptr]; ptr++;
        sda_pull = !txb[7];
      end else begin
        sda_pull = 1'b0;
        if (reading) selected = 0;
      end
      if (stretch && selected) begin
        n_stretch++;
        scl_pull = 1'b1;
        #(stretch_ns);
        scl_pull = 1'b0;
      end
    end else if (reading && selected) begin
      sda_pull = !txb[3'(7 - bitn)];
    end
  end
endmodule
