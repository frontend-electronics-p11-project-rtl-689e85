# Slow control for a front-end readout chip: I2C master/slave and LumiMulti command logic

A particle-detector front end needs a cheap, low-pin-count way to configure its chips and to
read back a few status bytes. This RTL provides the digital side of that "slow control"
in three independent parts.

1. **An I2C link.** A single-master I2C controller is programmed by a host (a small
   processor or FPGA logic) through six byte-wide registers. It talks to a slave chip made
   of an I2C slave and an 8-byte register array. Each register can be read back on four
   pins, one nibble at a time, with no clock involved. Standard (100 kHz) and fast
   (400 kHz) mode are supported.
2. **The LumiMulti command path.** LumiMulti is an 8-channel, 10-bit pipelined ADC chip.
   - A serial command decoder takes 16-bit words from an SPI-like line: a 6-bit header
     `101011`, a 2-bit command and 8 data bits.
   - The commands set the readout mode, switch single ADCs on and off, select low-power
     options, and load two 8-bit bias DAC codes.
   - A readout block places the eight ADC words on ten LVDS lanes in one of three modes:
     parallel, serial or test.
3. **A test-processor bridge.** The chips are validated from an FPGA, where a small 8-bit
   soft processor reaches a UART and an I2C controller over Wishbone. The bridge turns
   the processor's I/O-port instructions into Wishbone bus cycles.

The top level, `slow_control_top`, holds all three parts side by side. The analog ADCs, DACs
and LVDS drivers are not part of the RTL: their digital sides are ports.

## Files

| File | Contents |
|------|----------|
| `rtl/i2c_pkg.sv`, `rtl/lumi_pkg.sv` | Register map, bit positions, header, command and mode encodings |
| `rtl/i2c_clkgen.sv` | Quarter-bit tick generator (4 × SCL) for 100 or 400 kHz |
| `rtl/i2c_master.sv` | Host-programmed I2C master |
| `rtl/i2c_bus.sv` | Wired-AND resolution of open-drain SCL/SDA |
| `rtl/i2c_slave.sv` | I2C slave with register pointer |
| `rtl/i2c_reg_array.sv` | 8 × 8 register file with 8:1 mux and nibble selector |
| `rtl/i2c_slave_chip.sv` | Slave chip: `i2c_slave` + `i2c_reg_array` |
| `rtl/lumi_cmd_decoder.sv` | LumiMulti serial command decoder |
| `rtl/lumi_readout.sv` | LumiMulti LVDS readout (parallel / serial / test) |
| `rtl/pb_wb_bridge.sv` | Processor I/O port to Wishbone master bridge |
| `rtl/slow_control_top.sv` | Top level |
| `tb/tb_<module>.sv` | Self-checking testbench per module |
| `tb/i2c_slave_model.sv`, `tb/i2c_bitbang_master.sv` | Behavioural bus partners used by the testbenches |

## The I2C master: host protocol

The host sees eight addresses. Writes happen at a `clk` edge while `cs & wr` is high.
Reads are combinational while `cs & rd` is high.

| addr | name | access | meaning |
|------|------|--------|---------|
| 0 | DEVICE | W | 7-bit slave address (bits 6:0) |
| 1 | TARGET | W | register address inside the slave (reset 0) |
| 2 | OP_NUM | W | number of data bytes, 1–255; 0 means 256 (reset 1) |
| 3 | DATA | W: output buffer, R: input buffer | one byte each way |
| 4 | STATUS | R, W clears ASK_IN | bit3 BUSY, bit2 ASK_IN, bit1 FULL, bit0 EMPTY |
| 5 | CTRL | R/W | bit1 DIR (1 = write, 0 = read), bit0 REQ (start) |

Write-only registers read as 0.

Setting REQ starts one transfer, and REQ clears itself.

| Transfer | Bytes on the bus |
|----------|------------------|
| Write | `S  DEV+W  TARGET  d0 … dN-1  P` |
| Read | `S  DEV+W  TARGET  Sr  DEV+R  d0 … dN-1  P` |

In a read the master ACKs every byte except the last, which it NACKs before the STOP.

**Flow control is the point to understand.** Each direction has only a one-byte buffer, so
the host and the bus work in lock step.

- **Write.** EMPTY says the output buffer can take the next byte. Before each data byte the
  master checks whether the host has refilled the buffer. If it has not, the master holds
  SCL low until the host does.
- **Read.** A received byte sets FULL, and reading DATA clears it. The master will not clock
  in the next byte, and will not send the ACK/NACK, while FULL is still set.

So a slow host simply slows the bus, and transfers of any length go through.

`irq = FULL | (EMPTY & BUSY & DIR)`. The host can work by interrupt or poll STATUS.

ASK_IN is sticky. It is set when the slave NACKs any byte: the address, TARGET or data.
The master then sends a STOP and ends the transfer. The host clears ASK_IN by writing 0 to
STATUS, and should repeat the operation.

**Bit timing.** `i2c_clkgen` divides `clk` down to a tick at four times the SCL rate, and
the divider rounds up. At 50 MHz that gives 125 clocks per quarter bit for 100.0 kHz, and
32 clocks for 390.6 kHz (the nearest rate that does not exceed 400 kHz). The `fast` pin
selects the rate.

Within one bit:

| Quarter | Action |
|---------|--------|
| Q0 | SCL low, SDA changes |
| Q1 | SCL released |
| Q2 | SDA sampled |
| Q3 | SCL pulled low |

If a slave keeps SCL low after the master has released it (clock stretching), the master
waits. The quarter divider is held at zero until SCL is seen high, so the high phase that
follows still lasts two full quarters: 5 µs at 100 kHz, which meets the standard's 4 µs
minimum. START and STOP each take one bit time. A
repeated START first releases SDA while SCL is low.

## The slave chip

`i2c_slave` samples SCL and SDA with its own system clock through short shift registers.
It finds START and STOP as SDA edges while SCL is high, so the system clock must be at
least about 8× the SCL rate.

The slave address is the parameter `SLAVE_ADDR`, default `7'h3C`. The slave uses the usual
register-pointer protocol:

- The byte after the address sets the pointer.
- Each further byte written is stored at the pointer, which then advances.
- A read returns the register at the pointer and advances the pointer.
- The pointer wraps from 7 to 0.

So writing the 8 bytes `11 22 33 44 56 78 9A BC` from pointer 0 fills the whole array, and
reading 8 bytes back returns them in order. The slave never stretches SCL.

`i2c_reg_array` stores 8 bytes, reset to 0. `mux_sel` picks a byte and `upper_lower`
(1 = bits 7:4) picks its half, which appears on `nibble`. This readout is combinational.
It lets the array be observed on four pins without a second bus.

## The LumiMulti command frame

The line is SPI mode 0: `sdi` is sampled on the rising edge of `sclk`, MSB first. There is
no chip select. The decoder finds each frame by looking for the header in the bit stream.

| State | What it does |
|-------|--------------|
| HUNT | shifts bits through a 6-bit window until it reads `101011` |
| CMD | takes the 2 command bits |
| DATA | takes the 8 data bits, then applies the command and pulses `cmd_done` for one `sclk` cycle |

After applying a command the decoder returns to HUNT. Any junk between frames is skipped.

| cmd | name | data |
|-----|------|------|
| 00 | config | [7:6] mode, [5:3] test ADC, [2] LVDS low power, [1] buffer low power, [0] unused |
| 01 | active ADCs | bit *i* = 1 switches ADC *i* on (the first bit sent is ADC7) |
| 10 | DAC0 | 8-bit code |
| 11 | DAC1 | 8-bit code |

Modes are 00 parallel, 01 test and 10 serial. Code 11 is undefined, so a config command
carrying it keeps the current mode but still updates the other fields.

A hard reset (`rst_n`, asynchronous) gives the following state:
- parallel mode;
- test ADC 0;
- both low-power bits off;
- all ADCs on;
- both DACs at mid-scale, 0x80.

## The readout modes

`lumi_readout` runs on the chip input clock `clk`. Once per frame it latches the eight
10-bit words. It pulses `adc_clk_en[i]` for each ADC that is switched on, because that
pulse stands for the internal ADC clock. The frame is then shifted out.

| Mode | Frame length | Lanes |
|------|--------------|-------|
| parallel | 10 clocks | lane *i* carries ADC *i*, MSB first; lanes 8–9 low |
| serial | 80 clocks | lane 0 carries bit 9 of ADC7, ADC6 … ADC0, then bit 8 of ADC7 … ADC0, and so on down to bit 0; lanes 1–9 low |
| test | 1 clock | lanes 9…0 carry the 10 bits of the selected ADC, a new sample every clock |

An ADC that is switched off gets no clock enable and sends zeros. `frame_start` is high
with the first bit of every frame.

The settings come from the decoder on the SPI clock. They pass through two-flop
synchronisers: `mode`, `test_adc` and `adc_on` are each synchronised bit by bit. They should
therefore only change between frames, which the command protocol ensures in practice. A
change of mode restarts the frame.

## The processor-port bridge

The processor has only INPUT and OUTPUT instructions: they drive an 8-bit `port_id` and
a one-cycle `read_strobe` or `write_strobe`. `pb_wb_bridge` maps ports 0x80–0xFF onto a
Wishbone address window of 128 bytes.

| Software does | Bridge does |
|---------------|-------------|
| OUTPUT to port 0x80+*a* | Wishbone write of `out_port` to address *a* |
| INPUT from port 0x80+*a* | starts a Wishbone read of *a* (the value this INPUT returns is meaningless) |
| INPUT from port 0x00 | returns `{busy, done}` in bits 1:0 |
| INPUT from port 0x01 | returns the data of the last completed read |

A read thus takes a start, one or more status polls, and a fetch. A write takes one
OUTPUT and at least one poll.

On the bus side:
- The bridge raises CYC and STB one clock after the strobe, with address, data and WE
  already set up.
- It holds them until the slave's ACK is seen at a clock edge. There it captures read
  data and drops CYC/STB.
- The slave may insert any number of wait states.
- A new access started while one is still pending is ignored. Software must poll first.

Two assertions check the Wishbone rules: STB only inside CYC, and a stable request until
ACK. The processor, UART and I2C controller of the test set-up are not part of this RTL:
the top brings the `pb_*` and `wb_*` signals out.

## Simulating

Any testbench runs with plain Verilator 5. For example, the end-to-end test at the default
parameters:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/i2c_pkg.sv rtl/lumi_pkg.sv -y rtl -y tb \
  tb/tb_slow_control_top.sv --top-module tb_slow_control_top
./obj_dir/Vtb_slow_control_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_slow_control_top` runs everything at the default 50 MHz clock. It forks the I2C
sequence and the LumiMulti sequence in parallel:

- **I2C sequence.** It writes the eight bytes in standard mode, reads them back in fast
  mode, and checks the nibble readout. It also:
  - addresses a missing device (NACK and ASK_IN);
  - lets the host fall behind in both directions (SCL held low);
  - has an external device stretch SCL.
- **LumiMulti sequence.** It sends commands with junk between them and walks the readout
  through all three modes, with some ADCs switched off.

- **Bridge sequence.** A processor-port model writes the start-up settings of the test
  software into a Wishbone memory model that inserts wait states, then reads them back:
  - an I2C prescaler of 0x63;
  - a UART baud limit of round(50e6 / (16 × 9600)) − 1 = 0x0145.

It also measures the shortest SCL period and high phase in each speed mode:
- 500 and 250 clocks at 100 kHz;
- 128 and 64 clocks at the 400 kHz setting.

It counts how often each mechanism happened and fails any that never did. It takes a few
seconds.

The module testbenches shrink the clock (for example a 6.4 MHz system clock in the master
test) to keep runs short, and compare against independent reference models. The I2C
partners in `tb/` are behavioural:
- `i2c_slave_model` has memory and clock stretching;
- `i2c_bitbang_master` is a task-driven master.

## Departures and open points

- **Data field width.** Two statements about the command data disagree: one says 8 bits,
  the other says 9. The RTL uses 8-bit data (16-bit frames), and `DATA_W` is a parameter.
- **START/STOP detection.** The original slave detects START and STOP asynchronously. This
  one oversamples the lines with a system clock. It needs that clock, but has no
  asynchronous logic on the bus pins.
- **Slave address.** No slave address is specified, so it is a parameter.
- **ASK_IN and IRQ.** Their exact meaning was only sketched, so both follow the reading
  given above.
- **DIR read-back.** DIR was specified as write-only. Here it reads back in CTRL next to
  REQ.
- **Speed select.** There is no register bit for 100/400 kHz, so a pin selects it.
- **No chip select on the command line.** Framing relies on the header alone, so a stream
  that contains `101011` by accident inside junk will be taken as a frame.
- **Bridge port numbers.** The port numbers of the processor-port bridge were not
  specified. The RTL uses the numbers given above.
- **Lane choices.** Which lane carries the serial stream, and what unused lanes do, were not
  specified. The RTL uses lane 0 and drives the unused lanes low.
- **Not included.** These have no RTL here:
  - the analog parts: pipelined ADCs, bias DACs and LVDS drivers;
  - the FPGA test set-up's soft processor, UART and third-party I2C core (only the
    bridge between processor and Wishbone is here);
  - Wishbone block and read-modify-write cycles, which the test software does not use;
  - high-speed I2C (3.4 Mbit/s), 10-bit addressing and multi-master arbitration, which
    were only proposed as extensions.
