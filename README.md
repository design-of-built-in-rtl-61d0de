# Self-testing I2C master with APB bridges

This design sends I2C write frames and checks them bit by bit in hardware.
Three pseudo-random generators make a control byte, a word address and a data
byte. An I2C master puts them on the bus as a standard write frame. A
comparator watches the bus and checks every bit against the pattern it came
from. Counting the comparator's `bit_correct` and `bit_error` pulses gives the
bit error rate of the link, with no software and no external tester. This is
built-in self-test (BIST) of the I2C link.

The same chip also holds a plain I2C master, fed from pins, and two bus
bridges that share the theme of joining a slow serial or peripheral bus to a
faster one:

* an **I2C-to-APB bridge**. An external I2C master writes bytes into it, and it
  sends them on as 32-bit APB writes. It can also fetch a 32-bit APB word and
  return it over I2C byte by byte.
* an **AHB-to-APB bridge**. It turns single AHB transfers into APB
  SETUP/ENABLE transfers to one of sixteen peripherals.

The four parts are independent. They share only the clock, and some of them
share GO and `reset_n`.

```
                 +---------------------- i2c_bist_top -----------------------+
 CLK enable GO   |  bist_module                                              |
 reset reset_n ->|   lfsr8 x3 --bytes--> i2c_master --SCL/SDA--> pins        |
                 |        \--expected--> bist_comparator <--SDA bus level    |
                 |                        -> bit_correct / bit_error         |
 in_*_simple --->|  i2c_master (plain)            --> *_simple pins          |
 i2c_scl/sda --->|  i2c_apb_bridge = i2c_slave + apb_master --> apb_* pins   |
 H* (AHB)    --->|  ahb_apb_bridge                           --> P* pins     |
                 +-----------------------------------------------------------+
```

## The write frame and its bit slots

All the timing follows from how `i2c_master` splits a frame into **bit slots**.
Each slot is four `CLK` cycles long (phases 0 to 3). In a bit slot, SCL is low
in phases 0 and 1 and high in phases 2 and 3. SDA changes in phase 1, so it
is stable for the whole time SCL is high. `CLK` therefore runs at four times
the SCL rate: 200 kHz gives a 50 kHz SCL, and 400 kHz gives 100 kbit/s.

| `SD_COUNTER` | slot | SCL | SDA |
|---|---|---|---|
| 0 | idle, waiting for GO | high | high |
| 1 | START | high | high, then low in phase 2 |
| 2 to 9 | control byte, MSB first (7-bit slave address and R/W) | low, low, high, high | bit |
| 10 | ACK 1 | pulse | released, read in phase 3 |
| 11 to 18 | word address, MSB first | pulse | bit |
| 19 | ACK 2 | pulse | released |
| 20 to 27 | data byte, MSB first | pulse | bit |
| 28 | ACK 3 | pulse | released |
| 29 | STOP | pulse | low in phase 1, released in phase 3 while SCL is high |
| 30 | bus free | high | high |

The slot number comes out on the 7-bit `SD_COUNTER`. When GO goes high, the
block takes a copy of the three input bytes and starts at slot 1. After slot
30 it starts the next frame at once if GO is still high, with fresh bytes.
Otherwise it returns to slot 0. Measured on the bus:

* START to STOP takes 113 `CLK` cycles.
* With GO held high, a new frame begins every 120 cycles.
* `done` pulses once per frame, in the first cycle of slot 30.

`I2C_SCLK` and `I2C_SDAT` are registered, so they show the slot and phase of
the cycle before.

`I2C_SDAT` is a drive level for an open-drain pad: 0 pulls the line low and 1
releases it. The tristate pad itself is not part of the RTL. The block reads
the real line level on `sda_in` in phase 3 of each ACK slot. The frame always
runs to its end. If any of the three ACK bits reads high (NACK), `ack_err` is
set when the frame ends. It stays set until a frame ends that was
acknowledged in full.

## The self-test loop (`bist_module`)

The module holds three `lfsr8` generators, one `i2c_master` and one
`bist_comparator`:

* **Generators.** Each is an 8-bit Fibonacci LFSR with polynomial
  x^8+x^6+x^5+x^4+1, so it runs through all 255 non-zero states. The seeds are
  8'hA5 for the control byte, 8'h3C for the address and 8'h5A for the data.
  The active-high `reset` loads the seeds.
* **When the generators step.** They advance only in the cycle where
  `done` is high, and only while `enable` is high. That is once per frame,
  during the bus-free slot. The master takes its copy of the new bytes at the
  end of that slot. The comparator reads the generator outputs directly, so
  it sees exactly the bytes being sent throughout the frame. With `enable`
  low, the same three bytes are sent in every frame.
* **Comparator.** It finds a rising SCL edge by comparing SCL with its value
  one cycle earlier. At each such edge it uses `SD_COUNTER` to find which
  byte and which bit is on the line, and compares it with the matching
  generator output. It gives a one-cycle `bit_correct` or `bit_error` pulse
  one cycle after the edge. START, ACK, STOP and idle slots are not
  compared. A clean frame gives 24 `bit_correct` pulses and no `bit_error`.
* **What the comparator sees.** It compares `I2C_SDAT & sda_in`: the master's
  own drive level combined with the line level read back from the pad. A
  device or a fault that holds SDA low while a 1 is sent therefore counts as
  a bit error. With `sda_in` tied high the loop checks the master's output
  alone.

The bit error rate is `bit_error` pulses divided by all pulses. The counters
are left to the user of the block.

## Plain I2C master

A second `i2c_master` sends the bytes on the pins `in_control_simple`,
`in_address_simple` and `in_data_simple`. It shares `CLK`, GO and `reset_n`
with the self-test part and has its own `*_simple` outputs. It is the same
module, without generators or a comparator.

## I2C-to-APB bridge (`i2c_apb_bridge`)

The bridge has two halves.

**`i2c_slave`** samples SCL and SDA with the system clock through two-flop
synchronisers. The system clock must be at least eight times the SCL rate.
The slave finds START, STOP and the SCL edges from those samples. It answers
to 7-bit address `SLAVE_ADDR` (default 7'h50).

* **Write frame:** START, address+W, word address, then data bytes. The word
  address gives one `addr_valid` pulse. Each data byte gives one
  `data_valid` pulse, with `addr` holding that byte's address. The address
  goes up by one after every byte.
* **Read frame:** the master writes the word address, sends a repeated START
  with R/W = 1, and clocks bytes out. The slave sends `rdata` for the current
  address and goes to the next address after every byte the master ACKs. It
  stops at the master's NACK.
* Clock stretching is not supported.

**`apb_master`** holds two four-byte buffers.

* **Write path.** A written byte goes to location `addr[1:0]` of the transmit
  buffer, and that location is marked as updated. When all four marks are
  set, the buffer goes out as one APB write and the marks are cleared. The
  APB address is the word-aligned I2C address `{addr[7:2],2'b00}`. The data
  is `{byte3,byte2,byte1,byte0}`, with byte 0 in bits 7:0. A new word address
  clears the marks, so a partial word is dropped.
* **Read path.** The APB slave pulses `rx_changed` when it has new data. The
  bridge then reads the word at the current word-aligned I2C address into the
  receive buffer. I2C reads return byte `addr[1:0]` of that buffer.
* **APB timing.** A transfer is one SETUP cycle and one ENABLE cycle, with no
  PREADY and no PSLVERR. A write starts its SETUP cycle two clocks after the
  fourth byte's `data_valid`. A waiting write goes before a waiting read.

The bridge's external I2C master and its APB slave are not part of the RTL.
Their signals are top-level pins.

## AHB-to-APB bridge (`ahb_apb_bridge`)

The bridge is an AHB slave that accepts a transfer when `HSEL`, `HTRANS[1]`,
`HREADY` and its own `HREADYOUT` are all high. Bits
`HADDR[SEL_LSB+3:SEL_LSB]` select one of `NUM_PERIPH` = 16 peripherals; by
default these are `HADDR[15:12]`, which gives 4 KiB per peripheral. The
bridge and the APB side run on the same clock, `HCLK`.

* **Read:**
  * T1: AHB address phase.
  * T2: SETUP. PSELx and PADDR are valid and `HREADYOUT` is low.
  * T3: ENABLE. `PENABLE` is high, `HREADYOUT` is high, and `HRDATA` is the
    selected peripheral's `PRDATA`, passed straight through.
  * T4: the AHB master samples the data.

  That is one wait state per read.
* **Read with `REG_RDATA = 1`:** `PRDATA` is registered at the end of ENABLE
  and returned in the next cycle. This costs a second wait state but takes
  the APB read path out of the AHB cycle, for fast clocks.
* **Write:** T1 address phase; T2 AHB data phase, where `HWDATA` is captured
  and `HREADYOUT` is low; T3 SETUP; T4 ENABLE, with `HREADYOUT` high. That
  is two wait states.

A new transfer may be presented in any cycle where `HREADYOUT` is high, so
transfers can follow each other back to back. `HRESP` is always OKAY. Bursts
are handled as a series of single transfers.

## Top level (`i2c_bist_top`)

The top has no parameters.

| Part | Pins |
|---|---|
| Shared | `CLK`, `enable`, `GO`, `reset`, `reset_n` |
| Self-test part | `I2C_SDAT_in` (line level read back), `SD_COUNTER[6:0]`, `bit_correct`, `bit_error`, `I2C_SCLK`, `I2C_SDAT`, `ack_err` |
| Plain master | `in_*_simple[7:0]`, `I2C_SDAT_simple_in`, `SD_COUNTER_simple`, `I2C_SCLK_simple`, `I2C_SDAT_simple`, `ack_err_simple`, `done_simple` |
| I2C-to-APB bridge | `i2c_scl`, `i2c_sda` (line levels), `i2c_sda_oe` (1 pulls SDA low), `apb_paddr[7:0]`, `apb_psel`, `apb_penable`, `apb_pwrite`, `apb_pwdata[31:0]`, `apb_prdata[31:0]`, `apb_rx_changed` |
| AHB-to-APB bridge | `HADDR`, `HWDATA`, `HWRITE`, `HSEL`, `HREADY`, `HTRANS`, `HREADYOUT`, `HRESP`, `HRDATA`, `PADDR`, `PWDATA`, `PWRITE`, `PSEL[15:0]`, `PENABLE`, `PRDATA[16][32]` |

Notes on the pins:

* `reset_n` resets the I2C masters, the comparator and both bridges.
* `reset` resets only the generators.
* All resets are synchronous.

## What comes from the original description, and what was chosen here

The following follow the original description of the design:

* The frame format: START, control byte, ACK, word address, ACK, data, ACK,
  STOP.
* The pin names of the I2C block and of the self-test block, and the 7-bit
  `SD_COUNTER`.
* The structure of the self-test block: three LFSRs, one comparator and the
  I2C block, with LFSR 1 for the address, LFSR 2 for the control byte and
  LFSR 3 for the data.
* A plain I2C block beside the self-test block at the top.
* The I2C-slave/APB-master split of the bridge, its four-byte buffer with an
  update check after every byte, and its data-available flag.
* The AHB bridge's ports, its SETUP/ENABLE sequence, its sixteen peripheral
  selects, and its direct and registered read-data options.

The following are choices made here, where the description is silent or
unclear:

* The LFSR polynomial and seeds.
* Stepping the generators once per frame.
* Four clock cycles per bit and the slot numbering.
* `reset_n` is active low.
* The frame finishes even after a NACK, which is reported on `ack_err`.
  The description says bytes are sent "depending on the ACK", but its
  self-test schematic has no slave.
* The comparator reads the bus level, which needs `sda_in`, `SD_COUNTER` and
  `SCL` as extra comparator inputs.
* The I2C slave address, the repeated-START read and the address
  auto-increment.
* The byte order, the APB addresses and the read trigger of the I2C-to-APB
  bridge.
* The AHB decode bits, the single clock, and the 2-bit `HRESP` that is always
  OKAY.

Compared with the original description, this RTL differs or leaves things out
in these ways:

* The original pin diagram has no `sda_in`, `ack_err` or `done`.
* The AHB bridge has no separate PCLK and PRESETn.
* The I2C-to-APB bridge uses one clock and one reset for both halves, where
  the original diagram shows separate resets.
* No timing closure was done, so the AHB clock of 10 MHz and the I2C rate of
  100 kbit/s quoted for the original are not confirmed for this RTL.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The testbenches use these
models:

| Model | What it does |
|---|---|
| `i2c_tb_slave` | Decodes frames and ACKs them |
| `i2c_tb_master` | An I2C master driven by tasks: `start`, `stop`, `write_byte`, `read_byte` |
| `apb_tb_slave` | A 64-word APB slave that also checks the SETUP/ENABLE rules |

What each testbench covers:

| Testbench | What it checks |
|---|---|
| `lfsr8_tb` | Reference sequence, hold with `enable` low, period 255 |
| `i2c_master_tb` | Decoded bytes, 113-cycle frame, 120-cycle repeat, NACK reporting, return to idle |
| `bist_comparator_tb` | Hand-made waveforms with chosen bits inverted |
| `bist_module_tb` | Reference patterns frame by frame, 24 correct bits per frame, a forced-low bit gives one error, generator reset |
| `i2c_slave_tb` | Own and foreign address, write strobes, repeated-START read |
| `apb_master_tb` | Packing, partial words, `rx_changed` read, SETUP delay |
| `i2c_apb_bridge_tb` | Eight bytes become two APB words, read-back over I2C |
| `ahb_apb_bridge_tb` | Random back-to-back transfers to all 16 peripherals, both read options, wait-state counts |
| `i2c_bist_top_tb` | All four parts at once at the top's defaults; every mechanism must occur at least once |

The RTL also holds assertions for the bus rules:

* **I2C master:** SDA changes while SCL is high only for START and STOP.
* **APB side of both bridges:** every SETUP is followed by one ENABLE with
  the address, direction and data held, and at most one PSELx is high.
* **I2C slave:** SDA is not driven while the slave is idle.

Simulating with `--assert` checks them in every testbench.

The mechanisms `i2c_bist_top_tb` counts are: self-test frames, correct bits,
an injected bit error, a NACK frame, generator steps, plain frames, I2C to
APB writes and reads, and AHB writes and reads.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/i2c_pkg.sv tb/i2c_bist_top_tb.sv --top-module i2c_bist_top_tb
./obj_dir/Vi2c_bist_top_tb
```

Replace the testbench name to run another one. Every testbench finishes
within a second.

## Files

| File | Contents |
|---|---|
| `rtl/i2c_pkg.sv` | Slot numbers and helper functions shared by the master and the comparator |
| `rtl/lfsr8.sv` | 8-bit pattern generator |
| `rtl/i2c_master.sv` | I2C write-frame generator |
| `rtl/bist_comparator.sv` | Bit checker |
| `rtl/bist_module.sv` | Self-test block |
| `rtl/i2c_slave.sv` | I2C slave |
| `rtl/apb_master.sv` | APB master |
| `rtl/i2c_apb_bridge.sv` | I2C-to-APB bridge |
| `rtl/ahb_apb_bridge.sv` | AHB-to-APB bridge |
| `rtl/i2c_bist_top.sv` | Top level |
| `tb/*.sv` | Testbenches and bus models |
