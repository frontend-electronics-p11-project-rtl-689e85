// pb_wb_bridge: turns the I/O port of an 8-bit soft processor (PicoBlaze style) into a
// Wishbone master, so that test software can reach Wishbone peripherals (a UART, an I2C
// controller) with plain INPUT and OUTPUT instructions.
//
// Software view (port numbers are this design's choice):
//   OUTPUT to port 0x80+a   starts a Wishbone write of out_port to address a
//   INPUT  from port 0x80+a starts a Wishbone read of address a (the value read by this
//                           INPUT itself has no meaning)
//   INPUT  from STATUS_PORT returns {6'b0, busy, done}; software polls it until done = 1
//   INPUT  from DATA_PORT   returns the data of the last completed read
// A read therefore takes at least three INPUT cycles (start, poll, fetch) and a write one
// OUTPUT and one INPUT, which is the access sequence of the original test software: set up
// address and control from the port number and strobe, poll the acknowledge, then take the
// data with the next INPUT. A new access started while one is running is ignored.
//
// Wishbone side: classic single read/write cycles. Address, data and WE are set up and CYC
// and STB are raised together; they stay until the slave's ACK is seen at a rising clk edge,
// where read data are captured and CYC/STB drop in the same edge. The slave may hold off ACK
// for any number of wait states. ERR and the tag signals are optional in Wishbone and
// are not used.
//
// Timing: everything is clocked by clk (Wishbone CLK_I), reset asynchronously by rst_n.
// in_port is combinational from port_id, as the processor reads it in the cycle after it
// drives port_id. The bridge adds one clock from strobe to CYC/STB.
// The start / poll / fetch access sequence and the single Wishbone read/write cycle follow
// the design; the port numbers, the ignored second access and leaving out ERR and the tags
// are this implementation's choices.
module pb_wb_bridge #(
  parameter int unsigned AW          = 7,
  parameter logic [7:0]  STATUS_PORT = 8'h00,
  parameter logic [7:0]  DATA_PORT   = 8'h01
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor I/O port
  input  logic [7:0]    port_id,
  input  logic [7:0]    out_port,
  input  logic          write_strobe,
  input  logic          read_strobe,
  output logic [7:0]    in_port,
  // Wishbone master
  output logic [AW-1:0] wb_adr_o,
  output logic [7:0]    wb_dat_o,
  input  logic [7:0]    wb_dat_i,
  output logic          wb_we_o,
  output logic          wb_cyc_o,
  output logic          wb_stb_o,
  input  logic          wb_ack_i
);
  logic       wb_port;   // port number addresses the Wishbone window
  logic       done_q;    // last access acknowledged
  logic [7:0] rdata_q;   // data of the last read

  assign wb_port = port_id[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_adr_o <= '0;
      wb_dat_o <= '0;
      wb_we_o  <= 1'b0;
      wb_cyc_o <= 1'b0;
      wb_stb_o <= 1'b0;
      done_q   <= 1'b0;
      rdata_q  <= '0;
    end else if (wb_cyc_o) begin
      if (wb_ack_i) begin
        if (!wb_we_o) rdata_q <= wb_dat_i;
        wb_cyc_o <= 1'b0;
        wb_stb_o <= 1'b0;
        done_q   <= 1'b1;
      end
    end else if (wb_port && (write_strobe || read_strobe)) begin
      wb_adr_o <= port_id[AW-1:0];
      wb_dat_o <= out_port;
      wb_we_o  <= write_strobe;
      wb_cyc_o <= 1'b1;
      wb_stb_o <= 1'b1;
      done_q   <= 1'b0;
    end
  end

  always_comb begin
    if (port_id == STATUS_PORT)    in_port = {6'b0, wb_cyc_o, done_q};
    else if (port_id == DATA_PORT) in_port = rdata_q;
    else                           in_port = 8'h00;
  end

  // Wishbone rules: STB only inside CYC, and the request holds still until acknowledged.
  property p_stb_in_cyc;
    @(posedge clk) disable iff (!rst_n) wb_stb_o |-> wb_cyc_o;
  endproperty
  assert property (p_stb_in_cyc);

  property p_hold_until_ack;
    @(posedge clk) disable iff (!rst_n)
      wb_stb_o && !wb_ack_i |=> wb_stb_o && $stable(wb_adr_o) && $stable(wb_we_o) && $stable(wb_dat_o);
  endproperty
  assert property (p_hold_until_ack);
endmodule
