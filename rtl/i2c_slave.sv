// i2c_slave: 7-bit-address I2C slave with a register pointer.
//
// Protocol: after START the first byte carries the 7-bit address and the read/not-write bit.
// The slave acknowledges only its own address. In a write the next byte sets the register
// pointer and every further byte is stored at the pointer, which then advances (sequential
// write); each received byte is acknowledged. A read (normally after a write that set the
// pointer and a repeated START) returns the register at the pointer and advances it for as
// long as the master acknowledges; a NACK ends the read. STOP or a new START abandons
// whatever is in progress, so START, repeated START and STOP are recognised in any state.
// The pointer wraps around at the end of the register array.
//
// How it works: SCL and SDA are sampled with the system clock through three-stage shift
// registers (two stages to synchronise, the third to see edges). A START is SDA falling while SCL is high, a STOP is SDA rising while SCL is
// high. Data bits are taken on SCL rising edges; SDA is only changed after SCL falling edges.
// The original slave detects START/STOP with asynchronous logic; this one detects them from the
// oversampled lines instead, which needs a system clock at least about 8x the SCL rate
// (a 50 MHz clock covers fast mode 125x over).
//
// Interface: scl/sda are the resolved bus levels, sda_pull = 1 pulls SDA low (open drain).
// The register port (reg_addr, reg_rdata, reg_we, reg_wdata) connects to i2c_reg_array;
// reg_rdata is read combinationally. reg_we is a one-cycle pulse.
// The slave address is not given by the design; SLAVE_ADDR is a parameter.
module i2c_slave #(
  parameter logic [6:0]  SLAVE_ADDR = 7'h3C,
  parameter int unsigned N_REG      = 8,
  parameter int unsigned AW         = $clog2(N_REG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          scl,
  input  logic          sda,
  output logic          sda_pull,
  output logic [AW-1:0] reg_addr,
  output logic [7:0]    reg_wdata,
  output logic          reg_we,
  input  logic [7:0]    reg_rdata
);
  typedef enum logic [2:0] {
    S_IDLE,     // not addressed: ignore the bus until START
    S_RX,       // receiving a byte from the master
    S_ACK_OUT,  // driving ACK for a received byte
    S_TX,       // sending a byte to the master
    S_ACK_IN    // reading the master's ACK/NACK
  } state_e;

  typedef enum logic [1:0] {
    B_ADDR,  // address + R/W byte
    B_PTR,   // register pointer byte
    B_DATA   // data byte
  } byte_e;

  // synchronisers and edge detection
  logic [2:0] scl_sr, sda_sr;
  logic scl_rise, scl_fall, start_c, stop_c, scl_hi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sr <= '1;
      sda_sr <= '1;
    end else begin
      scl_sr <= {scl_sr[1:0], scl};
      sda_sr <= {sda_sr[1:0], sda};
    end
  end

  assign scl_hi   = scl_sr[2] & scl_sr[1];
  assign scl_rise = scl_sr[1] & ~scl_sr[2];
  assign scl_fall = ~scl_sr[1] & scl_sr[2];
  assign start_c  = scl_hi & sda_sr[2] & ~sda_sr[1];
  assign stop_c   = scl_hi & ~sda_sr[2] & sda_sr[1];

  state_e        state;
  byte_e         kind;
  logic [7:0]    shreg;
  logic [3:0]    bitcnt;
  logic          rnw;
  logic          master_ack;
  logic [AW-1:0] ptr;

  assign reg_addr = ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      kind       <= B_ADDR;
      shreg      <= '0;
      bitcnt     <= '0;
      rnw        <= 1'b0;
      master_ack <= 1'b0;
      ptr        <= '0;
      sda_pull   <= 1'b0;
      reg_we     <= 1'b0;
      reg_wdata  <= '0;
    end else begin
      reg_we <= 1'b0;
      if (start_c) begin
        state    <= S_RX;
        kind     <= B_ADDR;
        bitcnt   <= '0;
        sda_pull <= 1'b0;
      end else if (stop_c) begin
        state    <= S_IDLE;
        sda_pull <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: sda_pull <= 1'b0;

          S_RX: begin
            if (scl_rise && bitcnt < 4'd8) begin
              shreg  <= {shreg[6:0], sda_sr[1]};
              bitcnt <= bitcnt + 1'b1;
            end else if (scl_fall && bitcnt == 4'd8) begin
              // a whole byte is in: act on it and acknowledge if it is ours
              unique case (kind)
                B_ADDR: begin
                  if (shreg[7:1] == SLAVE_ADDR) begin
                    rnw      <= shreg[0];
                    sda_pull <= 1'b1;
                    state    <= S_ACK_OUT;
                  end else begin
                    state <= S_IDLE;
                  end
                end
                B_PTR: begin
                  ptr      <= shreg[AW-1:0];
                  sda_pull <= 1'b1;
                  state    <= S_ACK_OUT;
                end
                default: begin
                  reg_wdata <= shreg;
                  reg_we    <= 1'b1;
                  sda_pull  <= 1'b1;
                  state     <= S_ACK_OUT;
                end
              endcase
            end
          end

          S_ACK_OUT: begin
            if (scl_fall) begin
              bitcnt <= '0;
              if (kind == B_DATA && !rnw) ptr <= ptr + 1'b1;  // advance after a write
              if (kind == B_ADDR && rnw) begin
                // read: put the first bit of the register on the bus
                shreg    <= reg_rdata;
                sda_pull <= ~reg_rdata[7];
                ptr      <= ptr + 1'b1;
                kind     <= B_DATA;
                state    <= S_TX;
              end else begin
                sda_pull <= 1'b0;
                kind     <= (kind == B_ADDR) ? B_PTR : B_DATA;
                state    <= S_RX;
              end
            end
          end

          S_TX: begin
            if (scl_fall) begin
              if (bitcnt == 4'd7) begin
                sda_pull <= 1'b0;  // release for the master's ACK
                state    <= S_ACK_IN;
              end else begin
                shreg    <= {shreg[6:0], 1'b0};
                sda_pull <= ~shreg[6];
                bitcnt   <= bitcnt + 1'b1;
              end
            end
          end

          S_ACK_IN: begin
            if (scl_rise) master_ack <= ~sda_sr[1];
            if (scl_fall) begin
              if (master_ack) begin
                shreg    <= reg_rdata;
                sda_pull <= ~reg_rdata[7];
                ptr      <= ptr + 1'b1;
                bitcnt   <= '0;
                state    <= S_TX;
              end else begin
                state <= S_IDLE;  // NACK: the master will STOP or restart
              end
            end
          end

          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // The slave only ever changes SDA while SCL is low (START/STOP belong to the master).
  property p_sda_changes_with_scl_low;
    @(posedge clk) disable iff (!rst_n) $changed(sda_pull) |-> !scl_hi || $past(start_c) || $past(stop_c);
  endproperty
  assert property (p_sda_changes_with_scl_low);
endmodule
