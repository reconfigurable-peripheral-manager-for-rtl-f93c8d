# Logibot: a reconfigurable peripheral manager on a BeagleBone FPGA cape

A small robot controller often needs more PWM channels, serial ports and
timing-exact outputs than its Linux processor can drive directly. This design
puts those peripherals in the Spartan-6 FPGA of a BeagleBone Black expansion
board and exposes them to software as plain memory. The processor reads and
writes 16-bit words over its GPMC external memory bus. Inside the FPGA, every
peripheral is a small block that only reads or writes register words. A
routing stage connects any peripheral signal to any board pin.

What is built and where each signal goes is fixed when the design is built,
by one configuration package (`logibot_cfg_pkg`). Changing the peripheral set
means editing that package; no other file changes. The package shipped here
holds the reference configuration described in
[Reference configuration](#reference-configuration).

```
 BeagleBone                  FPGA (100 MHz)
 GPMC bus ──► gpmc_to_wishbone ──► wb_decoder ─┬─► W_RO  ──► PWM, H-bridge, UART TX, SPI, servo, custom
 (25 MHz,       (gpmc_sync:                    ├─► WR_RO ──► digital outputs
  AD mux)        3 flops)                      ├─◄ R_RI  ◄── link-test words, digital inputs, SPI RX, custom
                                               ├─◄ RW_RI ◄── UART RX (peripheral load + software clear)
                                               └─► mem_bank (up to 8 dual-port RAMs) ◄─► custom memory block
                     peripheral pins ◄──► io_ports (direction per port) ◄──► 22 board pins
```

## Crossing from the GPMC bus into the FPGA

This is the most delicate part of the design. The other blocks are ordinary
synchronous logic.

### The bus

The GPMC is used in synchronous, non-burst mode with address and data
multiplexed on the 16-bit `AD` bus. The host drives these signals:

- `CSn` frames a transfer.
- While `ADVn` is low, `AD` carries the address.
- In a write, the host then drives data with `WEn` low. A write lasts three
  GPMC clocks.
- In a read, the host releases `AD` and pulls `OEn` low, and the FPGA drives
  the word. A read lasts six GPMC clocks.
- `BEn[1:0]` gives the byte enables.

This design takes the GPMC clock to be 25 MHz. At that rate, one 16-bit word
every three clocks gives about 16.6 MB/s for writes.

The GPMC clock runs only during a transfer, so it cannot clock the FPGA. The
FPGA runs on its own 100 MHz clock. That clock is made by a PLL from the
board's 50 MHz oscillator, outside this RTL, and enters as `clock100M`.

### Synchronizer (`gpmc_sync`)

All GPMC inputs go through a three-flop chain:

1. The first flop captures on the falling edge of the GPMC clock, in the
   middle of the host's data eye.
2. The next two flops run on the 100 MHz clock.

The bus signals are grouped in one packed struct, so they pass the chain
together. The strobes reset to their inactive value (1).

### Bridge (`gpmc_to_wishbone`)

After the synchronizer, the bridge makes a reduced Wishbone request,
`wb_req_t`: `addr[15:0]`, `wrdata[15:0]` and `wren`. It works as follows:

- **Address.** `addr` follows `AD` while `CSn` and `ADVn` are both low, then
  holds for the rest of the transfer.
- **Write data.** `wrdata` follows `AD` on every clock, and only matters while
  `wren` is high.
- **Write strobe.** `wren` is a one-clock pulse. It is issued one FPGA clock
  after a falling edge of the synchronized `WEn` is seen inside `CSn`, so the
  data it writes has been stable for at least one clock. An assertion checks
  that the pulse is one clock wide.
- **Read data.** The read word (`wb_rddata` from the decoder) is registered
  onto `gpmc_ad_o` on every clock.
- **Read drive enable.** `gpmc_ad_oe` rises when the synchronized `CSn` and
  `OEn` are both low. The raw `CSn` and `OEn` pins also gate it, so the FPGA
  lets go of `AD` at once when the host ends the read, before the
  synchronized copies catch up.
- **Byte enables.** `BEn` is accepted but not used: every access is a full
  16-bit word.

Timing at 25 MHz GPMC and 100 MHz FPGA:

- The address is valid inside the FPGA about 40–50 ns after the host presents
  it.
- Read data reaches the pins about 60–70 ns after `OEn` falls. This includes
  the one-clock read latency of the memories, and is well before the host
  samples at the end of its six-clock read.

A testbench runs random writes and reads, with random gaps that shift the
GPMC clock against the FPGA clock. It checks the following:

- each write gives one strobe, within 300 ns, with the right address and data;
- each read returns its word inside the six-clock window;
- the bridge never drives `AD` outside a read.

The bidirectional pins (`AD` and the board ports) are split into `_i`, `_o`
and `_oe` signals. The I/O buffers that join them belong to the FPGA's pad
ring and are outside the RTL.

## Address map

The 64K-word space is split by the three top address bits (`wb_decoder`):

| addr[15:13] | Base   | Region | Meaning |
|---|---|---|---|
| 000 | 0x0000 | W_RO  | output registers, write only (reads return 0) |
| 001 | 0x2000 | WR_RO | output registers, write and read back |
| 010 | 0x4000 | R_RI  | input words, read only |
| 011 | 0x6000 | RW_RI | input registers loaded by a peripheral and cleared by software |
| 1xx | 0x8000 | memories | up to eight dual-port RAMs |

Each register region has room for 8K registers of 16 bits. A bank holds only
as many registers as its parameter says. Writes past the last register are
ignored, and reads past it return 0.

Decoding is a 3-bit compare, because every block owns a fixed, aligned
region whatever its size.

The banks work as follows:

- **W_RO / WR_RO** (`w_ro`, `wr_ro`). Register *k* appears on bits
  `[16k +: 16]` of a flat output vector, so the number of registers is a
  single parameter. Registers reset to 0.
- **R_RI** (`r_ri`). This bank holds no storage. It is a read multiplexer over
  the peripherals' status words. Words 0 and 1 always read `0xDEAD` and
  `0xBEEF`, so software can test the link.
- **RW_RI** (`rw_ri`). Each register has a load-enable from its peripheral. A
  peripheral load wins over a host write in the same clock. The intended use
  is receive data:
  1. The peripheral's data-ready pulse loads the word.
  2. Software reads it.
  3. Software writes 0 to it.

  A non-zero word therefore means "new data".

## Memories and their slots (`mem_bank`, `dpram`)

The upper half of the space (0x8000–0xFFFF) is cut into eight slots of 4K
words. Each memory starts in a fixed slot and owns every slot up to the start
of the next memory that exists. The slot order is chosen so that any number
of memories splits the space evenly:

| Memory | M1 | M5 | M4 | M6 | M2 | M7 | M3 | M8 |
|---|---|---|---|---|---|---|---|---|
| Slot (base) | 0 (0x8000) | 1 (0x9000) | 2 (0xA000) | 3 (0xB000) | 4 (0xC000) | 5 (0xD000) | 6 (0xE000) | 7 (0xF000) |

This gives the following regions:

| Memories | Words per region |
|---|---|
| 1 | 32K |
| 2 | 16K each |
| 3 | 16K / 8K / 8K |
| 4 | 8K each |
| 8 | 4K each |

Each region is an aligned power of two. Selecting a memory is therefore a
compare on `addr[14:12]`, and the word address is the low bits.

Memory *m* has `MEM_SIZE[m]` words of `MEM_WIDTH[m]` bits, from 8 to 16 bits.
A memory larger than its region stops elaboration with an error. Narrow words
read back zero-extended.

Each memory is a true dual-port RAM (`dpram`) with synchronous, read-first
ports:

- Port A is on the bus. A read returns its word one clock after the address.
- Port B goes to a peripheral through the `b_*` arrays.

## Board ports (`io_ports`)

The board has 22 usable pins, numbered as follows:

| Pins | Port numbers |
|---|---|
| PMOD1_0..7 | 0–7 |
| PMOD2_0..7 | 8–15 |
| ARD_0..5 | 16–21 |

Peripherals never touch pins directly. They write the `out` vector and read
the `in` vector, both indexed by port number. The routing works as follows:

- `PORT_IS_OUT` fixes the direction of each pin and becomes its pad enable.
- An output pin shows its `out` bit.
- An input pin's value appears on its `in` bit.
- The `in` bit of an output port reads 0.

Any peripheral signal can thus be placed on any pin by changing one constant.

## Peripherals and their registers

| Block | Registers | Behaviour |
|---|---|---|
| `pwm_uni` | 1 × W_RO command | PWM at 20, 100 or 200 kHz (`PWM_HZ`). Duty = \|value\| %. |
| `pwm_hbridge` | 1 × W_RO command | Four switch drives S1..S4 (`s[0]..s[3]`). Positive value: S1 and S4 carry the PWM. Negative: S3 and S2. The other pair stays off. Direction changes only at a period start, and an assertion checks that S1/S2 and S3/S4 are never on together. |
| `uart` | W_RO TX word, RW_RI RX word | 8 data bits, 1 stop bit, no parity, `BAUD` (115200 default). |
| `spi_master` | W_RO data, W_RO control, R_RI received word, R_RI status | Mode 0, MSB first, `N_BITS` 8 or 16, 1 MHz SCLK. |
| `servo_ctrl` | 1 × W_RO width | 50 Hz frame. The register is the high time in µs, clamped to the 20 ms frame. |
| `digital_in` | 1 bit of an R_RI word | Two-flop synchronizer per pin. Pin *k* is word bit *k*, up to 16 per word. |
| digital out | 1 bit of a WR_RO word | A register bit wired to a port; no logic of its own. |

### PWM command word

The PWM command word (`pwm_cmd_pkg::pwm_cmd_t`) is shared by both PWM blocks:

| Bits | Field |
|---|---|
| 7:0 | signed value, −100..100 (values beyond ±100 are treated as ±100) |
| 11:8 | dead zone |
| 12 | enable |

The output stays low when `enable` is 0 or when \|value\| ≤ dead zone.

The PWM period is `CLK_HZ/PWM_HZ` clocks: 5000, 1000 or 500 at 100 MHz. The
high time is \|value\| × period/100 clocks. A new command takes effect at the
next period start.

### UART

**Transmit word.**

| Bits | Field |
|---|---|
| 7:0 | byte to send |
| 8 | request toggle |

Every change of bit 8 sends the byte. A request made while a frame is still
going out is held and sent after it.

**Receive word.** The receive word in RW_RI is `{7'b0, 1'b1, byte}`, loaded by
the one-clock data-ready pulse. Software clears it by writing 0.

The receiver checks the start bit at half a bit time and samples each bit at
its centre. The bit time is `CLK_HZ/BAUD` clocks: 868 at 115200 baud and
10416 at 9600 baud.

### SPI

**Control word.** Bit 0 is a start toggle. Each change starts one transfer
when the master is idle.

**Transfer.** `cs_n` falls, then `N_BITS` clocks of SCLK follow. `sdo` changes
on the falling edge, and `sdi` is sampled on the rising edge. At the end,
`cs_n` rises and the received word (right-aligned) appears in R_RI.

**Status word.** Bit 0 is busy. It is high from the request to the end of the
transfer.

## Reference configuration

`logibot_cfg_pkg` holds this peripheral set:

- two unidirectional PWMs;
- one H-bridge PWM;
- a UART;
- a 16-bit SPI master;
- a servo output;
- one digital input and one digital output;
- a user "custom register" block and a user "custom memory" block.

### Register map

| Address | Register |
|---|---|
| 0x0000 | PWMU0 command |
| 0x0001 | PWMU1 command |
| 0x0002 | PWMH0 command |
| 0x0003 | UART0 TX |
| 0x0004 | SPI0 data |
| 0x0005 | SPI0 control |
| 0x0006 | servo width (µs) |
| 0x0007–0x0008 | custom block outputs |
| 0x2000 | digital outputs (bit 0) |
| 0x4000 / 0x4001 | 0xDEAD / 0xBEEF |
| 0x4002 | digital inputs (bit 0) |
| 0x4003 | SPI0 received word |
| 0x4004 | SPI0 status |
| 0x4005–0x4006 | custom block inputs |
| 0x6000 | UART0 RX |
| 0x8000 | custom memory, 512 × 8 bits |

### Pins

| Function | Pin |
|---|---|
| PWMU0 | ARD_0 |
| PWMU1 | ARD_1 |
| PWMH0 S1..S4 | PMOD2_2, PMOD2_3, PMOD2_4, PMOD2_7 |
| UART TX / RX | PMOD1_2 / PMOD2_6 |
| Digital in | PMOD2_5 |
| Digital out | PMOD1_3 |
| SPI SCLK / SDO / SDI / CS | PMOD1_0 / PMOD1_1 / ARD_4 / PMOD2_0 |
| Servo | ARD_5 |
| Custom register block | out PMOD1_5, PMOD1_7; in ARD_2 |
| Custom memory block | out PMOD1_6; in ARD_3 |

### Custom blocks

The custom blocks hold logic the user writes, so the top brings out their
connections as ports instead:

- `custom_r_*`: the two W_RO words, the two R_RI words, and the pin signals.
- `custom_m_*`: port B of memory 0, and the pin signals.

A user module attaches there.

### Changing the configuration

1. Edit the counts, indices, ports and rates in `logibot_cfg_pkg`.
2. Add or remove instances in `logibot_top` to match.

## Files

| File | Contents |
|---|---|
| `rtl/logibot_pkg.sv` | bus struct, region codes, link-test constants, memory slot functions |
| `rtl/logibot_cfg_pkg.sv` | build configuration (see above) |
| `rtl/pwm_cmd_pkg.sv` | PWM command word and its decoding |
| `rtl/logibot_top.sv` | top level |
| `rtl/gpmc_sync.sv`, `rtl/gpmc_to_wishbone.sv` | GPMC crossing and bridge |
| `rtl/wb_decoder.sv`, `rtl/w_ro.sv`, `rtl/wr_ro.sv`, `rtl/r_ri.sv`, `rtl/rw_ri.sv` | decode and register banks |
| `rtl/mem_bank.sv`, `rtl/dpram.sv` | memories |
| `rtl/io_ports.sv` | pin routing |
| `rtl/pwm_core.sv`, `rtl/pwm_uni.sv`, `rtl/pwm_hbridge.sv`, `rtl/uart.sv`, `rtl/spi_master.sv`, `rtl/servo_ctrl.sv`, `rtl/digital_in.sv` | peripherals |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/gpmc_host.sv` | behavioural model of the processor's GPMC: `write16`/`read16` tasks with the three- and six-clock timing |
| `tb/tb_check.svh` | check and report macros |

## Simulation

Everything runs with plain Verilator 5 (`--binary --timing`). The packages go
first on the command line, and `-y` finds the other modules. For example, the
end-to-end test:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/logibot_pkg.sv rtl/pwm_cmd_pkg.sv rtl/logibot_cfg_pkg.sv \
  tb/tb_logibot_top.sv --top-module tb_logibot_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. Each test prints
`TB_RESULT checks=N failures=M` and stops. Each also has a watchdog that
counts a failure if the test hangs.

### End-to-end test

`tb_logibot_top` runs the top with its default parameters: 100 MHz, the
reference configuration, real baud and PWM rates. It drives the top only
through GPMC accesses from the host model, as software would. About 60 ms of
simulated time take a few seconds. It checks:

- the link-test words;
- every register region;
- the memory from both sides;
- the duty of both PWMs at 20 kHz;
- both H-bridge directions;
- a UART byte looped from the TX pin to the RX pin, read from RW_RI and
  cleared;
- an SPI exchange with a slave model;
- a 1.5 ms servo pulse in a 20 ms frame;
- digital in and out;
- the custom block wiring.

It counts each mechanism, and a mechanism that never happened is a failure:

- GPMC writes and reads;
- peripheral loads and host writes of RW_RI;
- UART receptions;
- SPI transfers.

### Block tests

The block tests cover the following:

- the sizes the peripherals support:
  - PWM at 20, 100 and 200 kHz;
  - UART at 9600 and 115200 baud;
  - SPI with 8 and 16 bits;
- every memory count from 1 to 8 against the slot table;
- random traffic for the register banks and the decoder.

The servo test runs at a 1 MHz clock, one clock per µs, to keep it short.

## Choices made in this RTL

These points are this design's own choices. They are not taken from the
original thesis design, or they depart from it:

- **Pin count.** The board is often described as having 21 pins. The pin
  numbering used here (PMOD 8 + 8, Arduino header 6) puts ARD_5 at index 21,
  so the design has 22 ports.
- **GPMC timing and edges.** The GPMC clock of 25 MHz and the falling-edge
  capture in the first synchronizer flop are readings of the bus timing. The
  edge-detected one-clock write strobe is this design's way to turn the
  level-based `WEn` into a single write.
- **Register formats.** The bit layouts of all peripheral registers are this
  design's:
  - the PWM command word;
  - the UART TX and RX words;
  - the SPI control and status words;
  - the servo width in µs.

  So is the assignment of registers to indices.
- **PWM details.** The unidirectional PWM ignores the sign of the value. The
  dead zone is a band around zero in percent.
- **H-bridge pairing.** The pairing of S1..S4 is an assumed bridge layout.
- **UART and SPI.** The UART and the SPI master are written from scratch. The
  SPI mode and SCLK rate are assumed.
- **Not used or not included.** `BEn` is not used. There is no PLL, pad
  buffer or processor model in the synthesizable RTL.
- **Configuration.** The configuration is a hand-written package, not a
  generated parameter file. The custom blocks are represented only by their
  ports.
