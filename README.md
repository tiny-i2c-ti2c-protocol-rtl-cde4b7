# Tiny I2C (TI2C) slave

In a phone, the camera and the display take their image data over fast one-way links
(MIPI CSI and DSI). The processor still has to send the sensor or panel control commands,
and read status back. That traffic is small but goes both ways. TI2C is a cut-down I2C for
this control channel. It has:

- two wires, half duplex, fast mode (400 kHz);
- 7-bit slave addresses;
- one master only, so no arbitration and no clock stretching;
- an index layer above I2C. An index (sub-address) of 8 or 16 bits picks a register inside
  the slave, and each register holds 8 bits of data.

This repository holds SystemVerilog for the TI2C slave. The slave is a general I2C controller
with only the parts a TI2C slave needs kept. The repository also holds a small ROM-driven test
master that runs the slave's verification sequences. The top module `ti2c_top` joins the two
on one open-drain bus.

## The protocol as the slave implements it

A write transfer, in 16-bit index mode:

```
START | addr<<1|0 A | index MSB A | index LSB A | data A | data A | ... | STOP
```

In 8-bit index mode there is only one index byte. A read transfer carries no index:

```
START | addr<<1|1 A | data A | data A | ... | data N | STOP
```

A read starts at the *current index*: the index most recently set by a write transfer, moved
on by the bytes transferred since then. After each byte written or read, the index goes up by
one. The index is kept across STOP. This gives two ways to read:

- **Current-location read.** A write transfer with only an index, then a separate read
  transfer. This is all the dummy master can do.
- **Random read.** Index bytes, then a repeated START, then a read. The slave supports this,
  and the slave-subsystem testbench uses it.

A wrong index is refused. The register bank spans the indexes
`[REG_BASE, REG_BASE + NUM_REGS)`:

| Situation | What the slave does |
|---|---|
| Index byte points outside the bank | Not acknowledged (NACK). Nothing is written. The current index does not change. |
| Write continues past the last register | That data byte gets a NACK. |
| Read starts at an index outside the bank | The address byte gets a NACK. |
| Read continues past the last register | Returns 0xFF (SDA released), and the index stops moving. |

In all these cases the slave raises the index-error interrupt.

A *16-bit register* is two neighbouring byte registers, most significant byte at the lower
index. A two-byte sequential transfer therefore moves it whole.

## Inside the slave (`ti2c_slave_top`)

```
SCL ─► ti2c_filter ─┐
                    ├─► ti2c_bus_monitor ─► ti2c_trans_monitor ─► ti2c_slave ◄─► ti2c_regs ◄─┐
SDA ─► ti2c_filter ─┘        (strobes)          (tagged strobes)    │  SDA pull-down          │
                                                                    ▼                          │
                    ext_en ─► ti2c_ea_sync ─► core_en         ti2c_apb_regs ◄──── APB ─────────┘
                                                              (SCR CCR CSR IMSCR ICR MIS, INTR)
```

The whole slave runs on one clock, `clk`. That clock must be much faster than SCL. The slave
never drives SCL; it only pulls SDA low (`sda_low_o`).

**Filters (`ti2c_filter`).** Each line goes through two synchronising flip-flops. A counter
then lets a new level through only after it has stayed stable for `FILT_LEN` cycles (default
3, which is 60 ns at 50 MHz). Both lines have the same delay, `FILT_LEN + 2` cycles, so SCL and
SDA keep their timing relative to each other. Shorter spikes never reach the logic.

**Bus monitor (`ti2c_bus_monitor`).** Turns edges of the filtered lines into one-cycle strobes:

- `start`: SDA falls while SCL is high. `repeated` is also set if the bus was already busy.
- `stop`: SDA rises while SCL is high.
- `sample`: SCL rises.
- `output_`: SCL falls.

It also gives the `busy` level, which runs from START to STOP.

**Transfer monitor (`ti2c_trans_monitor`).** This block knows where each bit sits in a frame,
so the slave engine never counts bits. A frame is 8 data bits, MSB first, plus the acknowledge
bit. `bitcnt` is the position of the bit now on the bus: 0 to 7 for data, 8 for the
acknowledge.

Each SCL fall opens a new bit, and `bitcnt` moves on by one, except for the first fall after
START. That fall only opens bit 0 of the address byte, and is tagged `output_fst`.

Every strobe is passed on with a tag:

- Sample strobes are tagged `sample_bit` or `sample_ack`.
- `last_bit` marks the sample of data bit 7, when a full byte has arrived.
- Output strobes are tagged `output_bit` or `output_ack`, after the bit they open.
- `first_frame` marks the frame right after START, which is the address byte.

These tags come out in the same cycle as the bus monitor's strobe.

**Slave engine (`ti2c_slave`).** A state machine (IDLE, ADDR, IDX_H, IDX_L, WRITE, READ,
IGNORE) that acts only on tagged strobes:

- **Receiving.** On each `sample_bit` it shifts SDA into a 7-bit register. On `last_bit` the
  complete byte is `{shift, SDA}`. In that same cycle the engine:
  - decides whether to acknowledge the byte;
  - writes the register bank if the byte is data;
  - picks the next state.
- **Acknowledging.** On the following `output_ack` (the SCL fall that opens the acknowledge
  bit) it pulls SDA low if it accepted the byte. On the next `output_bit` it releases SDA.
- **Sending (READ).** On `output_bit` with `bitcnt == 0` it loads the register at the current
  index, and drives one bit per SCL fall. On `sample_ack` it reads the master's answer:
  - ACK: the index goes up by one.
  - NACK: the engine stops driving, moves to IGNORE, and waits for STOP or START.

  The acknowledge of the slave's own read-address byte also raises a `sample_ack` while in
  READ. The engine tells the two apart by its pending-ACK flag.
- **Index check.** The register bank checks the index combinationally. While an index LSB
  is coming in, the engine shows the bank the *candidate* index, not the current one. This way
  a wrong index is refused before it replaces the current one.

SDA changes after the filtered SCL fall, which is `FILT_LEN + 3` cycles after the pin. SDA
then holds until the next fall. SCL must therefore stay low and high for at least
`FILT_LEN + 6` cycles each: 180 ns at 50 MHz, well inside fast-mode timing.

**Register bank (`ti2c_regs`).** `NUM_REGS` byte registers. It has two ports:

- a TI2C port: index, valid flag, combinational read, write;
- a host port, reached through the APB window.

If both ports write the same register in one cycle, the TI2C write wins.

**Ea-sync (`ti2c_ea_sync`).** Passes the external enable pin through two flip-flops, then
ANDs it with the CCR enable bit to give `core_en`. While `core_en` is low, the engine treats
every START as not addressed to it.

**APB registers (`ti2c_apb_regs`).** Zero wait states. PSLVERR is raised for unmapped
addresses.

| Address | Name | Contents |
|---|---|---|
| 0x000 | SCR | `[6:0]` own address; `[7]` 1 = take the address from the `hw_addr` pins; `[8]` 1 = 16-bit index. Reset value 0x180. |
| 0x004 | CCR | `[0]` core enable. Reset value 0. |
| 0x008 | CSR | Read only. `[0]` bus busy; `[1]` addressed; `[2]` read transfer; `[3]` external enable (synchronised); `[4]` core enabled; `[7:5]` engine state; `[31:16]` current index. |
| 0x00C | IMSCR | Interrupt mask, 1 = enabled. |
| 0x010 | ICR | Read: raw interrupt status. Write 1: clear that bit. A new event wins over a clear in the same cycle. |
| 0x014 | MIS | Masked interrupt status. |
| 0x100 + 4·i | — | TI2C register i, in bits `[7:0]`. |

Interrupt bits:

| Bit | Event |
|---|---|
| 0 | Own address received |
| 1 | Byte written |
| 2 | Byte read |
| 3 | STOP after a transfer that addressed this slave |
| 4 | Index error |

`intr` is the OR of the masked status bits.

## The dummy master (`ti2c_dummy_master`)

This is a test master that can only do sequential transfers. You give it a ROM start address
`rom_addr` and a byte count `count`, then pulse `start`. It sends START and then the ROM byte
at `rom_addr`. Bits `[7:1]` of that byte are the slave address; bit 0 selects read or write.

- **Write.** After each acknowledged byte, the ROM address goes up by one and the next byte is
  sent, for `count` bytes in all. A NACK ends the transfer with STOP.
- **Read.** It receives `count` bytes and presents each on `rx_valid`/`rx_data`. It
  acknowledges every byte except the last, which gets a NACK so that it can send STOP.

When it finishes, `done` pulses. `nack` and `acked` then report how the transfer went.

Each bit takes four quarter periods of `QUARTER = ceil(CLK_HZ / (4·SCL_HZ))` cycles:

1. SCL low.
2. SDA changes.
3. SCL high.
4. SCL high, with SDA sampled at the end.

At 50 MHz that is 128 cycles per bit, or 390.6 kHz. A transfer of n bytes takes
`(2 + 9n)·4·QUARTER` cycles.

The ROM (`rtl/ti2c_dummy_master_rom.hex`, 32 bytes) holds the test sequences for slave address
0x50:

| ROM address | Bytes | `count` | Purpose |
|---|---|---|---|
| 0 | A0 00 02 11 22 33 44 | 6 | Sequential write at index 0x0002 |
| 7 | A0 00 02 | 2 | Set index 0x0002 |
| 10 | A1 | n | Read n bytes |
| 11 | A0 FF F0 55 | 3 | Wrong index |
| 15 | A0 00 0E AB CD EF | 5 | Write running past the end of the bank |
| 21 | A4 | 0 | Another slave address (0x52) |
| 22 | A0 00 08 12 34 56 78 | 6 | Two 16-bit registers at index 8 |
| 29 | A0 00 08 | 2 | Set index 8 |

## The top (`ti2c_top`)

The slave subsystem and the dummy master share a wired-AND bus: a line is high unless some
device pulls it low. `ext_scl_low` and `ext_sda_low` let a further device on the same bus pull
the lines. The line levels come out on `scl` and `sda`. The top also brings out:

- the slave's APB port, `hw_addr`, `ext_en` and `intr`;
- the dummy master's controls and results.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `CLK_HZ` | 50 000 000 | top, master | System clock, used for SCL timing (assumed value) |
| `SCL_HZ` | 400 000 | top, master | Maximum SCL rate (fast mode) |
| `FILT_LEN` | 3 | top, slave, filter | Stable cycles for a new line level |
| `NUM_REGS` | 16 | top, slave, bank, APB | Byte registers in the bank |
| `REG_BASE` | 0x0000 | top, slave, bank | Index of the first register |
| `ROM_DEPTH` | 32 | top, master | Dummy master ROM size |
| `ROM_FILE` | `rtl/ti2c_dummy_master_rom.hex` | top, master | ROM contents, read relative to the project root |

The index is 16 bits wide throughout. In 8-bit mode its upper byte is zero.

## Simulating

Every testbench in `tb/` checks itself. It ends by printing
`TB_RESULT checks=N failures=M`, and a watchdog stops it if it hangs. Run from the project
root, because the ROM file path is relative to it. For example, for the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ti2c_pkg.sv tb/tb_ti2c_top.sv --top-module tb_ti2c_top -o sim
./obj_dir/sim
```

| Testbench | What it checks |
|---|---|
| `tb_ti2c_top` | All default parameters. Dummy-master sequences from the ROM: addressing, 16-bit index, sequential write and read, wrong index, write and read past the bank, other address, 16-bit register pairs, APB access to the same registers, 8-bit index mode, SCR address, both enable paths, spike filtering, interrupts. Also measures the SCL period and the length of a transfer, and counts that every mechanism happened. Runs in a few seconds. |
| `tb_ti2c_slave_top` | The slave subsystem driven by a bit-banged master. Random read with a repeated START, a one-cycle SCL spike during an acknowledge, interrupt masking. Then 40 random write, read and wrong-index transfers, checked against a model of the registers and the current index. |
| `tb_ti2c_slave` | The engine with the monitors played by the testbench, and the register bank as an array. |
| `tb_ti2c_dummy_master` | The master against a behavioural slave in the testbench. Bytes, master ACK/NACK, SCL period, transfer length. |
| `tb_ti2c_filter`, `tb_ti2c_bus_monitor`, `tb_ti2c_trans_monitor`, `tb_ti2c_regs`, `tb_ti2c_apb_regs`, `tb_ti2c_ea_sync` | The leaf blocks, against reference models or hand-worked sequences. |

The RTL also carries assertions, which are active when you simulate with `--assert`:

- The slave and the dummy master change SDA only while SCL is low, except when making START
  or STOP.
- The bus-monitor strobes are mutually exclusive, and so are the transfer-monitor tags.
- The bit counter stays within 0 to 8.
- The register bank is written only inside its range.
- APB accesses follow the set-up/access order.

The testbenches do not depend on x or z values, so they behave the same on a two-state
simulator.

## What follows the source description, and what is this design's own

These come from the source description:

- The block set of the slave configuration: SCL/SDA filters, bus monitor, transfer monitor,
  slave module, SCR/ICR/IMSCR/CSR/CCR registers, Ea-sync, APB interface.
- 7-bit addressing, 8- or 16-bit index with 8-bit data, 400 kHz, no multi-master.
- Sequential read and write.
- Refusal of a wrong index.
- The ROM dummy master and its address-byte layout.
- The names of the monitors' strobes and states.

These are this design's own choices:

- The insides of the filters and monitors.
- Every register field, address and reset value.
- The interrupt events.
- The bank size and base, and 16-bit registers as byte pairs.
- Exactly how wrong indexes are handled frame by frame (the table in the protocol section).
- The single clock domain.
- The 50 MHz clock.
- The ROM size, contents and start/count interface of the dummy master.

**Departure.** The source has the dummy master acknowledge every byte it reads. Here the last
byte gets a NACK, because an I2C master has to do that before it can send STOP.

**Not built:**

- The rest of the general controller: master module, FIFOs, DMA controllers, their
  registers, the clock tree. These are unused in the slave configuration and not described.
- The AHB-to-APB bridge of the validation set-up. The processor is assumed to reach the APB
  port some other way.
- The camera-interface modules the slave is later integrated with.
- Bus-error detection. Signals with bus-error names appear in the source's waveforms, but
  their behaviour is not given.
- The `NON_INVER_CLK` and DMA pins shown on the validation board.

## Size

After generic synthesis, the slave subsystem has 227 flip-flop bits; 128 of them are the
16-byte register bank. The dummy master adds 54 more, and its ROM.
