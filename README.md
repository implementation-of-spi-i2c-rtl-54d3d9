# MULTIDUT board logic: one test station, four devices under test

Post-silicon validation of a Bluetooth chip means running the same test
sequence on several modules or reference cards, across voltage and
temperature. Normally each module needs its own station, or someone has to
open the temperature chamber and swap boards. The MULTIDUT board holds four
DUT (device under test) connectors at once. A small controller and a CPLD
connect the station to one DUT at a time: its UART lines, its VBAT and VIO
supplies, its BT_REG_ON line, its control lines and its PCIe switch port.
Radios can disturb each other, so only one DUT is ever connected and
powered.

This repository is synthesizable SystemVerilog for the digital part of that
board:

* the **CPLD**: an SPI slave, twelve configuration registers and a
  latch-free multiplexer/demultiplexer that switches everything to the
  selected DUT;
* the **command controller**: the firmware flow of the board's
  microcontroller, built as a hardware state machine. It receives command
  packets from the station over a UART, configures the CPLD over SPI, sets
  the DACs and reads and writes a configuration EEPROM;
* the SPI master, the UART receiver and transmitter, and the EEPROM array
  around them.

The DACs, the PCIe switch, the USB-to-UART bridge, the power switches and
the connectors are outside parts. Their signals are ports of the top
module, `multidut_top`.

```
 station cmd UART ──► uart_rx ─► host_ctrl ─► uart_tx ──► replies
                                   │   │  └── eeprom_store ×2 (strap picks one)
                                   │   └──── spi_master ── SS1 ─► DAC (outside)
                                   │              │ SS0
                     cpld_rst_n ───┘              ▼
 station USB-UART ◄──────────────────────► multidut_cpld ──► DUT1..DUT4
 (RXD,TXD,RTS,CTS)                       spi_slave → cpld_regfile → dut_mux
                                                               └─► PCIe switch port
```

## How a DUT gets switched

The whole design exists to carry out this sequence. The station sends it as
command packets:

1. `DUT_OFF`: write 0 to register 0. No DUT is connected.
2. Power off: write 0 to register 1 (VBAT and VIO).
3. Select DUT *n*: write `4 | (n-1)` to register 0.
4. Power on: write 3 to register 1.
5. Toggle BT_REG_ON: write 1, 0, 1 to register 2.

From the moment the CPLD applies each write, the selected DUT's RXD and CTS
follow the station's TXD and RTS, and the station's RXD and CTS follow that
DUT's TXD and RTS. `pcie_port` shows the DUT index. Every other DUT sees
RXD and CTS at the idle level 1, its control lines at 0 and its power
enables off. The power enables are decoded from a single 2-bit index, so no
register setting can power two DUTs at once.

A Bluetooth module may talk to the station over UART or over PCIe. For a
UART module, write 3 to register 4 and 0 to register 3. For a PCIe module,
write 1 to register 3; register 4 can then be 0, so that no UART line of any
DUT moves. The host must remove and rescan its PCIe root complex around the
switch; that is host software, not logic on this board.

After power-up, DUT1 is already selected and on, with its PCIe port and both
UART pairs enabled. This lets the PCIe host enumerate a module without a
soft reboot. Power and BT_REG_ON start off.

## Command packets (controller UART)

Every packet has this layout:

| byte | content |
|------|---------|
| 1 | header: `C` 0x43, `D` 0x44, `E` 0x45, `R` 0x52 |
| 2 | total packet length in bytes, counting the header, this byte and the final 0x00 |
| 3.. | operands |
| last | 0x00 |

| packet | bytes | action | reply |
|--------|-------|--------|-------|
| `C` | `43 05 hi lo 00` | sends the SPI word `{hi,lo}` to the CPLD (slave select 0) | `43` |
| `D` | `44 05 id code 00` | sends the SPI word `{id,code}` to the DACs (slave select 1); the output is code × 16 mV | `44` |
| `E` | `45 06 row off val 00` | writes `val` to the EEPROM at row `row+1`, offset `off` | `45` |
| `R` | `52 06 row off xx 00` | reads the EEPROM at row `row+1`, offset `off` | the byte read |

A packet goes through two checks. The last byte is checked first:

* **Last byte not 0x00.** The controller drops the packet and does the
  whole start-up again (see below), including the strap bit and a CPLD
  reset. It sends no reply and pulses `evt_bad_end`.
* **Unknown header, or a length that does not fit the header.** The
  controller drops the packet and reads the strap bit again, which may
  switch EEPROMs. It sends no reply and pulses `evt_bad_hdr`.

The controller handles one packet at a time. The station should wait for the
reply before it sends the next packet.

### The CPLD word

Each `C` packet carries a 16-bit word laid out as `[15:12]` tag,
`[11:8]` register, `[7:0]` data. The CPLD ignores the word unless the tag
is `4'hA` (`CPLD_TAG` in `multidut_pkg`) and the register number is below
12. SPI is full duplex: while a word is shifted in, the CPLD shifts out
`{tag, register, value}` for the register it last accepted. The controller
keeps that read-back on `cpld_rdbk`.

| reg | name | bits | reset |
|-----|------|------|-------|
| 0 | DUT_SEL | `[1:0]` DUT index (0 = DUT1), `[2]` DUT on | `04` |
| 1 | POWER | `[0]` VBAT, `[1]` VIO of the selected DUT | `00` |
| 2 | BTREG | `[0]` BT_REG_ON of the selected DUT | `00` |
| 3 | PCIE | `[0]` PCIe switch enable; the port follows the DUT index | `01` |
| 4 | UART | `[0]` RXD/TXD pair on, `[1]` RTS/CTS pair on | `03` |
| 5–8 | CTRL1–4 | control lines of DUT1–4, driven only while that DUT is selected | `00` |
| 9–11 | SCR0–2 | scratch | `00` |

## Start-up and configuration from EEPROM

After `rst_n` the controller goes through these steps:

1. It reads `strap` and uses it to pick EEPROM 0 or 1 (`ee_sel`).
2. It holds the CPLD in reset for `RST_CYCLES` clocks, then waits as long
   again.
3. It reads bytes 0–11 of physical EEPROM row 1. Row 0 is never used. This
   is the row that `E`/`R` packets address as row 0.
4. It sends each byte that is not 0xFF to the CPLD register of the same
   number.

Erased bytes (0xFF) are skipped, so a blank EEPROM leaves the CPLD with
DUT1 selected. After that `init_done` goes high and the controller waits for
packets.

To store a start-up configuration, write it with `E` packets (row 0,
offsets 0–11). Then send any packet whose last byte is not 0x00: the
controller re-initialises and loads the new configuration.
`tb_multidut_top` does exactly this.

## Clocks and timing

* **Controller** (`clk`). The UART is 8N1 at `clk / CLKS_PER_BIT`. The
  default of 417 gives 115200 baud at 48 MHz.
* **SPI master.** The divider, the SPI mode (CPOL, CPHA) and the frame
  length (2 to 16 bits) come with every transfer, so one bus serves slaves
  with different settings. SCLK = `clk / (2·div)`, MSB first. Before a slave
  select goes low, SCLK moves to the idle level of the new mode. An n-bit
  frame takes `(2n+3)·div + 1` clocks from start to done. The controller
  always sends 16-bit frames. It talks to the CPLD in mode 0 at
  `clk / (2·SPI_DIV)`, which is 4 MHz at the defaults. It talks to the DAC
  in mode 2 (SCLK idles high, data sampled on the falling edge) at
  `clk / (2·DAC_SPI_DIV)`, which is 2 MHz.
* **CPLD** (`cpld_clk`). This clock is independent of `clk`. The CPLD
  oversamples SCLK, SS_n and MOSI through two-flop synchronisers, so
  `cpld_clk` must be at least about 4× SCLK. A register write takes effect
  about four CPLD clocks after SS_n rises. The reset from the controller is
  asserted asynchronously and released through a two-flop synchroniser.
  Lint reports this flop as used both synchronously and asynchronously;
  that is normal for a reset synchroniser.
* The DUT multiplexer is purely combinational. Every output has a defined
  value in every state, so it has no latches and no floating lines.

## What is the source description's and what is this design's own

These parts follow the description the design was built from:

* four DUTs, only one powered at a time, and DUT1 selected at power-up;
* SPI from the controller to the CPLD with 16-bit words split into tag,
  register address and data;
* twelve CPLD registers that select and switch the DUTs;
* multiplexers without latches for the UART lines (RXD, TXD, RTS, CTS) and
  the control lines;
* the packet headers C/D/E/R, the length byte and the final 0x00;
* the operand positions of each packet, the DAC ID 0–3 with a 16 mV step,
  and the row+1 EEPROM addressing;
* the start-up order: strap bit, EEPROM choice, CPLD reset, register
  configuration, then the UART loop;
* what a bad last byte and an unknown header lead to;
* an SPI master made of a baud rate generator and a shift register, with
  programmable 2–16 bit frames and bit rate;
* a master that re-configures its clock mode for each slave.

These are choices of this design. Change them in `multidut_pkg` or in the
parameters if your hardware differs:

* the tag value `A` and the whole register map, including its reset values;
* the read-back scheme;
* the idle levels of unselected DUTs;
* the reply byte that acknowledges a packet (the header is echoed);
* reading the length byte as the total packet length;
* `3rd byte = word[15:8]` in a `C` packet;
* the DAC word `{id, code}` on a second slave select of the same SPI bus;
* two EEPROMs chosen by the strap bit, and 16-byte EEPROM rows;
* skipping erased EEPROM bytes at start-up;
* the SPI mode and SCLK rate of each slave, the UART baud rate and the
  reset length;
* the separate CPLD clock.

Things to keep in mind:

* `R` is taken as ASCII 0x52. One listing of the header codes gives 0x55
  for it, while the other three codes are plain ASCII.
* The DAC ID byte is passed through whole. The DAC model uses the low two
  bits and flags IDs above 3.
* The EEPROM is a RAM array that starts erased. It does not model
  programming time or retention.
* The controller here is a state machine, not firmware. A real board runs
  this flow on a microcontroller, whose timing between packets will
  differ.
* Root-complex removal and PCIe rescans are host-software steps and have no
  logic here.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends with a
line `TB_RESULT checks=N failures=M`:

| testbench | covers |
|-----------|--------|
| `tb_spi_master` | all four modes and random dividers against a behavioural slave, random 2–16 bit frames, SCLK idle level and period, exact frame time |
| `tb_spi_slave` | modes 0 and 3 from a bit-banged master, MISO contents, wrong-length frames dropped |
| `tb_cpld_regfile` | reset values, tag and address filtering, decode, read-back against a shadow model |
| `tb_dut_mux` | 2000 random configurations against a reference, one-DUT power rule, all selections |
| `tb_multidut_cpld` | SPI words to routing of each DUT, DUT_OFF, PCIe port, read-back on MISO, reset back to DUT1 |
| `tb_uart` | transmitter framing and busy time, receiver with good and bad stop bits, loop-back |
| `tb_eeprom_store` | erased state, random writes and reads, read latency |
| `tb_host_ctrl` | start-up sequence, each packet type, bad header, bad last byte, EEPROM switch by strap |
| `tb_multidut_top` | the full bring-up flow at default parameters (below) |
| `tb_bt_interfaces` | each DUT as a UART-attached and as a PCIe-attached Bluetooth module (8 cases) through the whole board at default parameters, including switches from a UART DUT to a PCIe DUT |

`tb_multidut_top` runs the whole design with every parameter at its
default. It uses `tb/dac_model.sv`, a behavioural model of the four DACs.
It walks through these steps:

1. power-up with DUT1 connected;
2. EEPROM write and read;
3. re-initialisation that loads a stored configuration;
4. a switch to each of the four DUTs, including the power and BT_REG_ON
   sequence;
5. a UART byte carried from the station to each DUT;
6. CPLD read-back;
7. DUT_OFF;
8. a DAC setting in mode 2, then a CPLD write in mode 0 again;
9. a bad header that makes the controller change EEPROM.

The testbench counts each of these mechanisms and fails if any of them never
happens. It simulates about 32 ms of board time in a few seconds.

For each block, a deliberately broken copy was also checked: with it, the
block's testbench reports failures.

## Simulating

The testbenches need Verilator 5 with `--timing`. Name the package first
and let Verilator find the other modules in `rtl/` and `tb/` by their file
names:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/multidut_pkg.sv tb/tb_multidut_top.sv --top-module tb_multidut_top -o sim
./obj_dir/sim
```

The same command with another testbench name runs that testbench, for
example `tb/tb_spi_slave.sv --top-module tb_spi_slave`.

## Files

* `rtl/multidut_pkg.sv`: packet codes, tag, register map, reset values,
  shared structs
* `rtl/multidut_top.sv`: the board logic
* `rtl/host_ctrl.sv`: the command controller
* `rtl/multidut_cpld.sv`: the CPLD, built from `spi_slave.sv`,
  `cpld_regfile.sv` and `dut_mux.sv`
* `rtl/spi_master.sv`, `rtl/uart_rx.sv`, `rtl/uart_tx.sv`,
  `rtl/eeprom_store.sv`
* `tb/`: the testbenches and `dac_model.sv`
