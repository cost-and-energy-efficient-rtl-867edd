# Spartan-6 hardware reconfiguration engine

A peripheral for dynamic partial reconfiguration of a Spartan-6 FPGA from
inside the FPGA itself. The processor does not hand it partial bitstreams.
It gives the engine only raw frame data and a rectangle on the die: four
coordinates, for clock-region rows and configuration columns. The engine then
builds the whole configuration stream at run time. This stream is the sync
header, a frame address and command block for every frame, the data, pad
frames, and a tail with a checksum. The engine pushes it through the vendor
HWICAP core into the internal configuration port (ICAP).

Because addresses are generated rather than parsed out of a stored bitstream,
one set of frame data can be:

- written anywhere (relocation);
- written into several rows at once (replication);
- read back from the device;
- copied from one place in the configuration memory to another (copy and paste).

No bitstream parser is needed. Everything that depends on the FPGA family sits
in two packages: fabric geometry and bitstream format. The state machines stay
the same across families.

The RTL is SystemVerilog-2017. The top is `s6_reconf_engine`. Its one external
dependency is the vendor HWICAP core, which connects to the `ip_*` ports.

## Block structure

```
             clk_bus domain                 |            clk_cfg domain
                                            |
 processor  +----------+   start ---cdc_toggle--->  +-------------+    +-----------+   ip_*   +--------+
 bus  <---->| bus_regs |   <----- done ----------   | reconf_ctrl |--->| icap_ctrl |<-------->| HWICAP |--> ICAP
            +----------+                            |  far_gen    |<---|           |          | (vendor)|
              |      ^                              |  cfg_crc    |    +-----------+          +--------+
              v      |                              +-------------+
         +---------------+  input memory (cfg_ram)   ^     |  ^
         |  port B (rw)  |---------------------------|-----+  |
         +---------------+  output memory (cfg_ram)  |        |
         |  port A (ro)  |<--------------------------+--------+
```

| Module | Role |
|---|---|
| `s6_device_pkg` | Word and frame size, clock-region rows and columns, column kinds, frames per column kind, frame address packing |
| `s6_bitstream_pkg` | Packet encodings, and the header, per-frame command and tail sequences for write and readback |
| `hwicap_regs_pkg` | Register map of the HWICAP slave port; the engine's operation codes |
| `bus_regs` | Registers seen by the processor; data access to both memories |
| `cfg_ram` | Dual-clock memory. It is used twice: as the input memory (frames to write) and as the output memory (readback) |
| `far_gen` | Walks every frame of a region and produces the frame address words |
| `cfg_crc` | Running checksum of the configuration register writes |
| `reconf_ctrl` | Global state machine. It composes the stream and runs the write, readback and copy operations |
| `icap_ctrl` | State machine that operates the HWICAP core through its registers |
| `cdc_toggle` | Passes the start and done events between the two clocks |

## The configuration stream

This is the core of the design. Words are 16 bits. A frame is 65 words and
configures one column inside one clock region, so regions can be addressed in
two dimensions. One pass of the engine sends the following.

**Header** (7 words):

```
FFFF AA99 5566 2000 30A1 0007 2000
```

These are a dummy word, the sync pair, a NOP, a write of RCRC (reset CRC) to
CMD, and a NOP.

**Per frame, write**:

```
3022 FAR_MAJ FAR_MIN 30A1 0001 2000 5060 0000 0082  <65 data words> <65 zero words>
```

This writes both frame address words and the WCFG command. It then opens a
type-2 FDRI packet of 130 words: the frame and a pad frame. The configuration
logic holds each frame in a one-frame buffer. The pad frame is what pushes the
real frame into the configuration memory, and the pad itself is then
discarded. Each frame carries its own address, so any region shape works
without relying on address auto-increment.

**Per frame, readback**:

```
3022 FAR_MAJ FAR_MIN 30A1 0004 2000 4880 0000 0082
```

This sends the address and RCFG, and opens a type-2 FDRO read of 130 words.
The engine then asks the HWICAP core for 130 words. The first 65 are a pad
frame and are dropped; the other 65 go to the output memory.

**Tail** (7 words):

- Write: `3002 CRC_hi CRC_lo 30A1 000D 2000 2000`. This writes the CRC check,
  then DESYNC and NOPs.
- Readback: `2000 2000 2000 30A1 000D 2000 2000`.

A write of N frames is therefore 14 + 139·N words at the port. The end-to-end
testbench checks this count.

**Checksum.** After RCRC, every register data word goes into the CRC, except
words written to the CRC register and the RCRC command itself. A word enters
as 22 bits, `{register number[5:0], data[15:0]}`, LSB first. The CRC is a
reflected CRC-32C (polynomial `0x82F63B78`), zero-initialised.

**Packet header layout:**

- Type 1: `{001, opcode[1:0], register[5:0], count[4:0]}`.
- Type 2: `{010, opcode, register, 00000}`, followed by a 32-bit count sent as
  two words.
- Opcodes: 01 read, 10 write.

**Registers:** CRC 0, FAR_MAJ 1, FAR_MIN 2, FDRI 3, FDRO 4, CMD 5. A two-word
write to FAR_MAJ also writes FAR_MIN.

**Commands:** WCFG 1, RCFG 4, RCRC 7, DESYNC 13.

**Frame address:** `FAR_MAJ = {row, column}` and `FAR_MIN = minor`.

All of this lives in `s6_bitstream_pkg` and `s6_device_pkg`. Check it against
the vendor configuration guide before using it on silicon (see the section on
trust below).

## Regions and the device description

A region is `{col1, col0, row1, row0}`: one byte each, bounds inclusive,
ordered. `far_gen` walks it row by row, then column by column, then minor by
minor. The number of minors of a column comes from its kind.

| Column kind | Frames | Columns in the default device map |
|---|---|---|
| CLB | 31 | all others |
| DSP | 24 | 14, 32 |
| BRAM | 25 | 9, 27 |
| IO | 30 | 0, 39 |

The default map has 4 clock-region rows and 40 columns. It stands in for the
LX45T; the real column layout should be read from the device, for example in
FPGA Editor or PlanAhead.

To port the engine to another family or part, change:

- `col_type` (where the columns are);
- `frames_per_col`;
- `FRAME_WORDS` and `WORD_W`;
- the FAR packing functions;
- the sequences in `s6_bitstream_pkg`.

## Operations

| `op` | What happens |
|---|---|
| write (0) | Frames from the input memory go into region `dst`. With `src_sel` = 1 they come from the output memory instead. Any `dst` works, which gives relocation. |
| write + `replicate` | The data pointer goes back to 0 at the first frame of every clock-region row. The frames for one row are thus written into every row of `dst`. |
| readback (1) | Region `src` goes into the output memory, frame after frame, with no gaps. |
| copy (2) | A readback of `src` into the output memory, then a write from the output memory into `dst`. |

**Memory capacity.** Each memory holds 5120 words, which is 78 frames. If the
next frame would not fit in the memory it reads or fills, the pass stops and
closes with its tail. `error` is then set, and `frames` says how many frames
were moved.

Larger regions take several operations, with the memory reloaded in between.
A module covering a fifth of an LX45 (about 2,300 frames) would need about 30
operations.

**Changing single words.** To change a few words of a module, for example LUT
contents:

1. Read the region back.
2. Fetch the output memory.
3. Edit the data and store it in the input memory.
4. Write it back.

## Processor interface

The interface is 32-bit, with word addresses on `bus_addr`. A request holds
`bus_cs` until `bus_ack`. The access takes effect in the first cycle, and
`bus_ack` follows one cycle later, carrying the read data.

| Addr | Name | Access |
|---|---|---|
| 0 | CTRL | W: bit 0 start, bits 2:1 op, bit 3 source is output memory, bit 4 replicate. R: the last fields written |
| 1 | STATUS | R: bit 0 busy, bit 1 done (sticky), bit 2 error, bits 31:16 frames moved |
| 2 | SRC | RW: source region `{col1, col0, row1, row0}` |
| 3 | DST | RW: destination region |
| 4 | IN_PTR | RW: word pointer into the input memory |
| 5 | IN_DATA | W: store bits 15:0 at IN_PTR. R: the word at IN_PTR. Both then advance IN_PTR |
| 6 | OUT_PTR | RW: word pointer into the output memory |
| 7 | OUT_DATA | R: the word at OUT_PTR, then advance OUT_PTR |

While busy, writes to CTRL, SRC and DST are ignored.

A typical write:

1. IN_PTR ← 0.
2. Write N·65 words to IN_DATA.
3. DST ← region.
4. CTRL ← 1.
5. Poll STATUS until done.

## Driving the HWICAP core (`icap_ctrl`)

The engine treats the vendor core as a set of registers, so a new core version
only needs a new `hwicap_regs_pkg`. The registers used are:

- WF 0x100, RF 0x104: write and read FIFOs;
- SZ 0x108: readback size;
- CR 0x10C: bit 0 write, bit 1 read;
- SR 0x110: bit 0 done;
- WFV 0x114: write FIFO vacancy;
- RFO 0x118: read FIFO occupancy.

**Write burst:**

1. Read WFV.
2. Push up to that many words into WF, one per clock against a zero-wait slave.
3. Set CR write.
4. Poll SR until done.

The controller flushes early on a word marked `wr_flush`. This marks the end of
the commands in front of a readback, and the end of the tail.

**Readback:**

1. Write SZ.
2. Set CR read.
3. Read RFO, then drain that many words from RF.
4. Repeat step 3 until the requested count has arrived.
5. Poll SR.

The handshake is an IPIF-style `ip_cs` held until `ip_ack`. Assertions check it
and the word stream's valid/ready rule.

## Clocks, memories and rates

The processor side runs on `clk_bus`. The engine and the HWICAP slave port run
on `clk_cfg`. The two `cfg_ram` instances are the only paths that carry data
between the two clocks:

- The input memory is written on the bus clock and read on the engine clock.
- The output memory is written on the engine clock and read on both clocks.

Each memory has one read/write port and one read-only port, and reads take one
cycle. 5120 × 16 bits is five 18-Kbit block RAMs per memory, ten in total.

Start and done cross between the clocks as toggle events. The operation
settings cross directly, because they are frozen while busy. `error` and
`frames` also cross directly, because they settle before done arrives.

**Word rate.** While it sends frame data, the controller keeps two words
requested ahead of the port: a small prefetch buffer hides the one-cycle memory
latency. With a port that never stalls, a data word leaves every engine clock.
Each frame loses only a few clocks, at its command block and where its pad
begins. In the unit test, a 24-frame write (3350 words) takes 3431 clocks.

The ICAP of Spartan-6 takes at most 20 M words/s, and the control logic runs
well above that. So the port, not the engine, limits the rate. The HWICAP core
moves its FIFO to the port at the port's own clock.

The end-to-end test models a port that takes one word every five engine clocks,
like 20 MHz against 100 MHz, and adds random bus wait states. It keeps that port
busy about 72% of the time during a 24-frame write. The rest is lost in the
HWICAP handshake: the vacancy read, the start write and the status poll.

## How far to trust it, and where it departs

**Assumed rather than specified.** The following are this design's own
choices. They are plausible for the family but have not been checked on
hardware:

- the packet words;
- the register and command numbers;
- the frame counts per column kind;
- the column map;
- the FAR bit layout;
- the CRC algorithm and framing;
- the HWICAP register map.

A wrong CRC makes the device reject the write. If in doubt, replace the CRC
write in the tail with a reset-CRC command.

**Departures from the design described:**

- **HWICAP placement.** The HWICAP core sits outside `s6_reconf_engine` and is
  reached through the `ip_*` ports. The original embeds it.
- **Processor bus.** The bus is a simplified IPIF-style slave, not a full PLB
  attachment.
- **Single-word changes.** These go through the processor (read back, edit,
  write), not on the fly inside the engine.
- **Memory size.** The input and output memories are an equal 5120-word split
  of the ten block RAMs.

**Not built:**

- the vendor parts: MicroBlaze, System ACE / CompactFlash, external memory
  and sensor interfaces, HWICAP, ICAP;
- the software-only reconfiguration profile;
- the partition of the die into static and reconfigurable areas.

## Simulation

Every testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
has a cycle-count watchdog.

| Testbench | Covers |
|---|---|
| `tb_s6_device_pkg` | Column kinds, frame counts and FAR packing, against hand-computed values |
| `tb_s6_bitstream_pkg` | Every header, command and tail word, against hand-encoded packets |
| `tb_cfg_ram` | Both ports, on unrelated clocks, against a reference array |
| `tb_far_gen` | Region walks with random stalls, against a reference walk |
| `tb_cfg_crc` | The checksum, against a bit-serial reference |
| `tb_icap_ctrl` | FIFO fill and flush, one word per clock, readback, random wait states |
| `tb_reconf_ctrl` | The full generated stream, word by word, for every operation, plus overflow and the one-word-per-clock rate |
| `tb_bus_regs` | The register map, busy locking, done and status, memory streaming |
| `tb_s6_reconf_engine` | End to end at default sizes with behavioural HWICAP and configuration logic models (`tb/hwicap_model.sv`, `tb/s6_cfg_model.sv`) |

The end-to-end test covers write, relocation, readback, copy, replication,
writing from the output memory, overflow, a full write FIFO, and checksum
matches. It also requires the port to be busy at least 60% of the time
during a 24-frame write. It runs in well under a minute.

Build and run a testbench with plain Verilator. The packages go first, and
`-y` finds the rest:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/s6_device_pkg.sv rtl/s6_bitstream_pkg.sv rtl/hwicap_regs_pkg.sv \
  tb/tb_s6_reconf_engine.sv --top-module tb_s6_reconf_engine -Mdir obj
./obj/Vtb_s6_reconf_engine
```

To run another testbench, substitute its name. All flops have asynchronous
active-low resets. The testbenches assert reset with an edge at time 1, before
the first clock edge.
