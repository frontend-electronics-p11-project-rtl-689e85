// i2c_master: single-master I2C controller programmed through a small host register file.
//
// A host (microcontroller, FPGA logic) writes the 7-bit device address (DEVICE), the
// register address inside the peripheral (TARGET), the number of data bytes (OP_NUM) and
// the control register (DIR, REQ). Setting REQ starts one transfer:
//   write (DIR=1): S, DEVICE+W, TARGET, OP_NUM data bytes, P
//   read  (DIR=0): S, DEVICE+W, TARGET, Sr, DEVICE+R, OP_NUM data bytes, P
// Data move through a one-byte output buffer (DATA_IN, written at address 3) and a one-byte
// input buffer (DATA_OUT, read at address 3). Status bits tell the host what to do:
// EMPTY = the output buffer may take the next byte, FULL = a received byte waits in the
// input buffer (cleared when the host reads it), BUSY = transfer in progress, ASK_IN = the
// peripheral did not acknowledge and the operation must be repeated (cleared by the host
// writing 0). IRQ rises when the host is needed (FULL, or EMPTY during a write), so the
// host may work by interrupt or by polling. The master acknowledges every received byte
// except the last, which it NACKs before the STOP.
//
// Flow control: whenever the host is late (next byte not written, last byte not read) the
// master holds SCL low between bytes, so transfers of any length run through the one-byte
// buffers. The master also waits while a slave holds SCL low (clock stretching), and after
// a stretch restarts the quarter timing from the moment SCL is seen high, so the high phase
// keeps its full length.
//
// Bit timing: i2c_clkgen provides a tick every quarter SCL period. A data bit is
// quarter 0: SCL low, SDA set; 1: SCL released; 2: SDA sampled; 3: SCL low.
// START releases SDA and SCL and then pulls SDA low while SCL is high; STOP releases SDA
// while SCL is high. SCL therefore runs at 1/4 of the tick rate.
//
// Host bus: synchronous writes (CS & WR at a clk edge), combinational reads (CS & RD).
// Bus side: scl/sda are the resolved bus levels, *_pull = 1 pulls a line low.
// The register map, status/control bits and reset values (TARGET 0, OP_NUM 1, buffers 0)
// follow the design; the exact meaning of ASK_IN and IRQ, OP_NUM = 0 being treated as 256
// bytes, and the `fast` pin selecting 400 kHz are this implementation's reading.
module i2c_master
  import i2c_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned SCL_STD_HZ  = 100_000,
  parameter int unsigned SCL_FAST_HZ = 400_000
) (
  input  logic       clk,
  input  logic       rst_n,
  // host register interface
  input  logic       cs,
  input  logic       wr,
  input  logic       rd,
  input  logic [2:0] addr,
  input  logic [7:0] data_i,
  output logic [7:0] data_o,
  output logic       irq,
  input  logic       fast,       // 1: fast mode (400 kHz), 0: standard mode (100 kHz)
  // I2C bus
  input  logic       scl,
  input  logic       sda,
  output logic       scl_pull,
  output logic       sda_pull
);
  typedef enum logic [3:0] {
    M_IDLE,
    M_START,    // START or repeated START
    M_SEND,     // shift a byte out
    M_GETACK,   // read the slave's ACK
    M_WAITTX,   // SCL held low until the host fills the output buffer
    M_RECV,     // shift a byte in
    M_WAITRX,   // SCL held low until the host empties the input buffer
    M_PUTACK,   // drive ACK (or NACK on the last byte)
    M_STOP
  } mstate_e;

  typedef enum logic [2:0] {
    K_DEVW,   // device address + W
    K_TGT,    // target register address
    K_DEVR,   // device address + R
    K_WDATA,  // data byte to the peripheral
    K_RDATA   // data byte from the peripheral
  } kind_e;

  // ---------------- protocol engine state ----------------
  mstate_e    mst;
  kind_e      kind;
  logic [1:0] q;        // quarter of the current bit
  logic [2:0] bitcnt;
  logic [7:0] shreg;
  logic [7:0] rx_byte;
  logic [8:0] left;     // data bytes still to move
  logic       last_byte;

  // ---------------- host registers ----------------
  logic [6:0] device_q;
  logic [7:0] target_q;
  logic [7:0] op_num_q;
  logic [7:0] tx_buf_q;
  logic [7:0] rx_buf_q;
  logic       empty_q, full_q, ask_in_q, busy_q;
  logic       dir_q, req_q;

  logic       host_wr, host_rd;
  assign host_wr = cs & wr;
  assign host_rd = cs & rd;

  // engine side handshakes with the buffers
  logic tx_take;    // engine moves the output buffer into its shift register
  logic rx_put;     // engine moves a received byte into the input buffer
  logic nack_seen;  // engine saw a NACK from the peripheral
  logic done;       // engine finished the transfer
  logic launch;     // engine accepts the request

  // status / control as the host sees them
  logic [7:0] status_w, ctrl_w;
  assign status_w = {4'b0, busy_q, ask_in_q, full_q, empty_q};
  assign ctrl_w   = {6'b0, dir_q, req_q};

  always_comb begin
    data_o = '0;
    if (host_rd) begin
      unique case (addr)
        REG_DATA:   data_o = rx_buf_q;
        REG_STATUS: data_o = status_w;
        REG_CTRL:   data_o = ctrl_w;
        default:    data_o = '0;  // DEVICE, TARGET, OP_NUM are write-only
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      device_q <= '0;
      target_q <= '0;
      op_num_q <= 8'd1;
      tx_buf_q <= '0;
      rx_buf_q <= '0;
      empty_q  <= 1'b1;
      full_q   <= 1'b0;
      ask_in_q <= 1'b0;
      busy_q   <= 1'b0;
      dir_q    <= 1'b0;
      req_q    <= 1'b0;
    end else begin
      if (host_wr) begin
        unique case (addr)
          REG_DEVICE: device_q <= data_i[6:0];
          REG_TARGET: target_q <= data_i;
          REG_OP_NUM: op_num_q <= data_i;
          REG_DATA: begin
            tx_buf_q <= data_i;
            empty_q  <= 1'b0;
          end
          REG_STATUS: ask_in_q <= data_i[ST_ASK_IN];
          REG_CTRL: if (!busy_q) begin
            dir_q <= data_i[CT_DIR];
            req_q <= data_i[CT_REQ];
          end
          default: ;
        endcase
      end
      if (host_rd && addr == REG_DATA) full_q <= 1'b0;
      if (tx_take) empty_q <= 1'b1;
      if (rx_put) begin
        rx_buf_q <= rx_byte;
        full_q   <= 1'b1;
      end
      if (nack_seen) ask_in_q <= 1'b1;
      if (launch) begin
        req_q  <= 1'b0;
        busy_q <= 1'b1;
      end
      if (done) busy_q <= 1'b0;
    end
  end

  assign irq = full_q | (empty_q & busy_q & dir_q);

  // ---------------- bit clock ----------------
  logic tick;
  logic run;
  logic held;  // a tick fell inside a clock stretch: divider waits for SCL to go high
  assign run = (mst != M_IDLE) && (mst != M_WAITTX) && (mst != M_WAITRX) && !held;

  i2c_clkgen #(
    .CLK_HZ     (CLK_HZ),
    .SCL_STD_HZ (SCL_STD_HZ),
    .SCL_FAST_HZ(SCL_FAST_HZ)
  ) u_clkgen (
    .clk  (clk),
    .rst_n(rst_n),
    .run  (run),
    .fast (fast),
    .tick (tick)
  );

  // bus input synchronisers
  logic [1:0] scl_s, sda_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= '1;
      sda_s <= '1;
    end else begin
      scl_s <= {scl_s[0], scl};
      sda_s <= {sda_s[0], sda};
    end
  end

  // ---------------- protocol engine ----------------

  assign rx_byte   = shreg;
  assign last_byte = (left == 9'd1);
  assign launch    = (mst == M_IDLE) && req_q && !busy_q;
  assign tx_take   = (mst == M_WAITTX) && !empty_q;
  assign rx_put    = (mst == M_WAITRX) && !full_q;

  // stretched: SCL was released in quarter 1 but some device still holds it low.
  // While stretched the engine ignores ticks; once a tick has been ignored the divider is
  // held at zero, so after SCL is seen high a full quarter passes before SDA is sampled and
  // another before SCL is pulled low again: the high time never drops below two quarters.
  logic stretched;
  assign stretched = (q == 2'd2) && !scl_pull && !scl_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          held <= 1'b0;
    else if (!stretched) held <= 1'b0;
    else if (tick)       held <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst       <= M_IDLE;
      kind      <= K_DEVW;
      q         <= '0;
      bitcnt    <= '0;
      shreg     <= '0;
      left      <= '0;
      scl_pull  <= 1'b0;
      sda_pull  <= 1'b0;
      nack_seen <= 1'b0;
      done      <= 1'b0;
    end else begin
      nack_seen <= 1'b0;
      done      <= 1'b0;
      unique case (mst)
        M_IDLE: begin
          scl_pull <= 1'b0;
          sda_pull <= 1'b0;
          q        <= '0;
          if (launch) begin
            left <= (op_num_q == 8'd0) ? 9'd256 : {1'b0, op_num_q};
            kind <= K_DEVW;
            mst  <= M_START;
          end
        end

        M_WAITTX: begin
          if (tx_take) begin
            shreg  <= tx_buf_q;
            kind   <= K_WDATA;
            bitcnt <= '0;
            q      <= '0;
            mst    <= M_SEND;
          end
        end

        M_WAITRX: begin
          if (rx_put) begin
            q   <= '0;
            mst <= M_PUTACK;
          end
        end

        default: begin
          if (tick && !stretched) begin
            q <= q + 1'b1;
            unique case (mst)
              M_START: begin
                unique case (q)
                  2'd0: sda_pull <= 1'b0;
                  2'd1: scl_pull <= 1'b0;
                  2'd2: sda_pull <= 1'b1;  // SDA falls while SCL is high
                  default: begin
                    scl_pull <= 1'b1;
                    shreg    <= {device_q, (kind == K_DEVR) ? RNW_READ : RNW_WRITE};
                    bitcnt   <= '0;
                    mst      <= M_SEND;
                  end
                endcase
              end

              M_SEND: begin
                unique case (q)
                  2'd0: begin
                    scl_pull <= 1'b1;
                    sda_pull <= ~shreg[7];
                  end
                  2'd1: scl_pull <= 1'b0;
                  2'd2: ;
                  default: begin
                    scl_pull <= 1'b1;
                    shreg    <= {shreg[6:0], 1'b0};
                    bitcnt   <= bitcnt + 1'b1;
                    if (bitcnt == 3'd7) mst <= M_GETACK;
                  end
                endcase
              end

              M_GETACK: begin
                unique case (q)
                  2'd0: begin
                    scl_pull <= 1'b1;
                    sda_pull <= 1'b0;
                  end
                  2'd1: scl_pull <= 1'b0;
                  2'd2: shreg[0] <= sda_s[1];  // 0 = ACK
                  default: begin
                    scl_pull <= 1'b1;
                    bitcnt   <= '0;
                    if (shreg[0]) begin
                      nack_seen <= 1'b1;
                      mst       <= M_STOP;
                    end else begin
                      unique case (kind)
                        K_DEVW: begin
                          shreg <= target_q;
                          kind  <= K_TGT;
                          mst   <= M_SEND;
                        end
                        K_TGT: begin
                          if (dir_q) begin
                            mst <= M_WAITTX;
                          end else begin
                            kind <= K_DEVR;
                            mst  <= M_START;  // repeated START
                          end
                        end
                        K_DEVR: begin
                          kind <= K_RDATA;
                          mst  <= M_RECV;
                        end
                        default: begin  // K_WDATA
                          left <= left - 1'b1;
                          mst  <= last_byte ? M_STOP : M_WAITTX;
                        end
                      endcase
                    end
                  end
                endcase
              end

              M_RECV: begin
                unique case (q)
                  2'd0: begin
                    scl_pull <= 1'b1;
                    sda_pull <= 1'b0;
                  end
                  2'd1: scl_pull <= 1'b0;
                  2'd2: shreg <= {shreg[6:0], sda_s[1]};
                  default: begin
                    scl_pull <= 1'b1;
                    bitcnt   <= bitcnt + 1'b1;
                    if (bitcnt == 3'd7) mst <= M_WAITRX;
                  end
                endcase
              end

              M_PUTACK: begin
                unique case (q)
                  2'd0: begin
                    scl_pull <= 1'b1;
                    sda_pull <= ~last_byte;  // ACK all but the last byte
                  end
                  2'd1: scl_pull <= 1'b0;
                  2'd2: ;
                  default: begin
                    scl_pull <= 1'b1;
                    bitcnt   <= '0;
                    left     <= left - 1'b1;
                    mst      <= last_byte ? M_STOP : M_RECV;
                  end
                endcase
              end

              M_STOP: begin
                unique case (q)
                  2'd0: begin
                    scl_pull <= 1'b1;
                    sda_pull <= 1'b1;
                  end
                  2'd1: scl_pull <= 1'b0;
                  2'd2: sda_pull <= 1'b0;  // SDA rises while SCL is high
                  default: begin
                    done <= 1'b1;
                    mst  <= M_IDLE;
                  end
                endcase
              end

              default: mst <= M_IDLE;
            endcase
          end
        end
      endcase
    end
  end

  // A transfer request is only accepted while idle, and BUSY covers the whole transfer.
  assert property (@(posedge clk) disable iff (!rst_n) launch |=> busy_q);
  assert property (@(posedge clk) disable iff (!rst_n) done |=> !busy_q);
endmodule
