// tb_pb_wb_bridge: self-checking test of the processor-port to Wishbone bridge.
//
// A processor model drives port_id/out_port and one-cycle read/write strobes the way an
// 8-bit soft core's INPUT/OUTPUT instructions do (port_id set up one clock before the
// strobe). On the Wishbone side a behavioural slave holds a 128-byte memory and answers
// each cycle after a random number of wait states (0..6). The test writes random data to
// random addresses and reads them back through the start / poll / fetch sequence, and
// compares against a reference copy kept in the testbench. It also checks:
//   - CYC/STB rise exactly one clock after the strobe,
//   - status reports busy while the slave is waiting and done after ACK,
//   - a second access started while one is running is ignored,
//   - ports outside the Wishbone window leave the bus idle.
// A watchdog ends the run with a failure if the bus hangs.
// The port numbers are those of the bridge; the access sequence follows the original test
// software. Wait states and data are random test choices.
module tb_pb_wb_bridge;
  localparam int unsigned AW = 7;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic [7:0]    port_id = 8'h00, out_port = 8'h00, in_port;
  logic          write_strobe = 1'b0, read_strobe = 1'b0;
  logic [AW-1:0] wb_adr;
  logic [7:0]    wb_dat_o, wb_dat_i;
  logic          wb_we, wb_cyc, wb_stb, wb_ack;

  pb_wb_bridge #(.AW(AW)) dut (
    .clk, .rst_n, .port_id, .out_port, .write_strobe, .read_strobe, .in_port,
    .wb_adr_o(wb_adr), .wb_dat_o(wb_dat_o), .wb_dat_i(wb_dat_i), .wb_we_o(wb_we),
    .wb_cyc_o(wb_cyc), .wb_stb_o(wb_stb), .wb_ack_i(wb_ack)
  );

  int checks = 0, failures = 0;
  int n_wait_states = 0, n_busy_polls = 0, n_ignored = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- behavioural Wishbone slave ----------------
  logic [7:0] mem [128];
  int         wait_left = -1;
  int         n_cycles  = 0;
  int         force_wait = -1;  // >= 0: fixed number of wait states

  always @(posedge clk) begin
    wb_ack <= 1'b0;
    if (wb_stb && wb_cyc && !wb_ack) begin
      if (wait_left < 0) wait_left = (force_wait >= 0) ? force_wait : $urandom_range(0, 6);
      if (wait_left == 0) begin
        wb_ack <= 1'b1;
        if (wb_we) mem[wb_adr] <= wb_dat_o;
        wb_dat_i <= mem[wb_adr];
        wait_left = -1;
        n_cycles++;
      end else begin
        wait_left--;
        n_wait_states++;
      end
    end
  end

  // ---------------- processor model ----------------
  task automatic pb_out(input logic [7:0] port, input logic [7:0] val);
    @(negedge clk);
    port_id  = port;
    out_port = val;
    @(negedge clk);
    write_strobe = 1'b1;
    @(negedge clk);
    write_strobe = 1'b0;
  endtask

  task automatic pb_in(input logic [7:0] port, output logic [7:0] val);
    @(negedge clk);
    port_id = port;
    @(negedge clk);
    read_strobe = 1'b1;
    val = in_port;
    @(negedge clk);
    read_strobe = 1'b0;
  endtask

  // poll status until done; returns number of polls
  task automatic pb_wait_done(output int polls);
    logic [7:0] st;
    polls = 0;
    do begin
      pb_in(8'h00, st);
      polls++;
      if (st[1]) n_busy_polls++;
    end while (!st[0] && polls < 100);
    check(st[0] == 1'b1, "status never reported done");
  endtask

  task automatic wb_write(input logic [6:0] a, input logic [7:0] d);
    int polls;
    pb_out({1'b1, a}, d);
    pb_wait_done(polls);
  endtask

  task automatic wb_read(input logic [6:0] a, output logic [7:0] d);
    int polls;
    logic [7:0] junk;
    pb_in({1'b1, a}, junk);
    pb_wait_done(polls);
    pb_in(8'h01, d);
  endtask

  // strobe to CYC/STB latency: exactly one clock
  int strobe_cyc = -1;
  always @(posedge clk) begin
    if ((write_strobe || read_strobe) && port_id[7] && !wb_cyc) strobe_cyc <= 0;
    else if (strobe_cyc >= 0 && !wb_cyc) strobe_cyc <= strobe_cyc + 1;
    else if (strobe_cyc >= 0 && wb_cyc) begin
      check(strobe_cyc == 0, $sformatf("CYC rose %0d clocks late", strobe_cyc));
      strobe_cyc <= -1;
    end
  end

  logic [7:0] ref_mem [128];

  initial begin : main
    logic [7:0] d, st;
    logic [6:0] a;
    int         before_cycles;

    for (int i = 0; i < 128; i++) begin
      mem[i]     = 8'(i * 13 + 5);
      ref_mem[i] = 8'(i * 13 + 5);
    end
    #2 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    repeat (2) @(negedge clk);

    pb_in(8'h00, st);
    check(st == 8'h00, "status after reset");

    // read back the preset contents
    for (int i = 0; i < 8; i++) begin
      a = 7'($urandom_range(0, 127));
      wb_read(a, d);
      check(d == ref_mem[a], $sformatf("preset read %02h: got %02h want %02h", a, d, ref_mem[a]));
    end
    // random writes then read-back
    for (int i = 0; i < 40; i++) begin
      a = 7'($urandom_range(0, 127));
      d = 8'($urandom);
      wb_write(a, d);
      ref_mem[a] = d;
      check(mem[a] == d, $sformatf("write %02h did not land", a));
    end
    for (int i = 0; i < 128; i++) begin
      wb_read(7'(i), d);
      check(d == ref_mem[i], $sformatf("read %02h: got %02h want %02h", i, d, ref_mem[i]));
    end

    // a second strobe while the first access waits for ACK is ignored
    force_wait = 8;
    before_cycles = n_cycles;
    pb_out(8'h85, 8'hAA);
    pb_out(8'h86, 8'h55);    // lands while the first write is still waiting
    repeat (20) @(negedge clk);
    force_wait = -1;
    if (n_cycles == before_cycles + 1) n_ignored++;
    check(n_cycles == before_cycles + 1, "second access during a pending one was not ignored");
    ref_mem[5] = 8'hAA;
    check(mem[5] == 8'hAA, "first of back-to-back writes");
    check(mem[6] == ref_mem[6], "ignored write changed memory");
    check(n_ignored == 1, "ignored access never happened");

    // ports outside the Wishbone window leave the bus alone
    before_cycles = n_cycles;
    pb_out(8'h10, 8'h33);
    pb_in(8'h22, d);
    repeat (5) @(negedge clk);
    check(n_cycles == before_cycles && !wb_cyc, "access outside the window reached the bus");
    check(d == 8'h00, "unmapped input port reads 0");

    check(n_wait_states > 0, "slave wait states never happened");
    check(n_busy_polls > 0, "status never reported busy");
    $display("wait states %0d, busy polls %0d, ignored %0d, bus cycles %0d",
             n_wait_states, n_busy_polls, n_ignored, n_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
