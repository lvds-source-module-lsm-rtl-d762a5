# LVDS Source Module (LSM) — SystemVerilog RTL

The LVDS Source Module is a 6U VME board that plays stored test patterns into
**96 serial LVDS links at 480 Mb/s**, in step with the LHC bunch-crossing
clock, so that trigger processor modules (CPM, JEM) can be tested without
their real upstream electronics. Each link carries one 10-bit word per 25 ns
bunch crossing. Patterns are loaded over VME into per-link memories; playback
is started, stopped and restarted either from VME or by TTC broadcast
commands, so several modules can start playing on the same crossing.

This RTL implements the logic of the board as laid out in the LSM design
specification (v2.1): one VME/TTC interface FPGA and six Pattern Generator
(PG) FPGAs. Analog and bought-in parts (TTCdec card, PLLs, LVDS output
buffers and cable pre-compensation, VME buffers, configuration EEPROMs,
power) are not modelled; their signals are ports of the top level.

## Architecture

```
            VME bus                      TTCdec (TTCrx)
               |                        |  clock, broadcasts, L1A, I2C
   +-----------v------------------------v-----------------+
   | vme_fpga                                             |
   |  vme_slave --lb--> lsm_regs   ttc_interface          |
   |      |                 |          |  start/stop      |
   |      |                 +--> playback_ctrl --+        |
   |      |                      ttcrx_i2c_master|        |
   |      |                      fp_indicators   |        |
   +------|--------------------------------------|--------+
          | pg_lb (local bus)     Memory_sync,   |  pg_length, LVDS Sync
   +------v------------------------------v-------v--------+
   | pg_fpga  x 6   (PG_NUM = 1..6)                       |
   |   pg_playback_counter --addr--> pg_link_mem x16       |
   |                                   | 10-bit word       |
   |                              lvds_serialiser x16 --> 16 serial links
   +------------------------------------------------------+
```

| Module | Role |
|---|---|
| `lsm_top` | Whole board: `vme_fpga` plus six `pg_fpga`; 96 serial outputs |
| `vme_fpga` | VME/TTC interface FPGA; routes local-bus accesses |
| `vme_slave` | A24/A32 D16 VME slave, base from four hex switches |
| `lsm_regs` | Control/status register file |
| `ttc_interface` | Broadcast decode, BCNT/EVNT counters, SER/DER flags, dump FIFO |
| `ttc_dump_fifo` | 16 x 12 FIFO for TTCrx dump data (helper) |
| `playback_ctrl` | VME or TTC control of playback; drives Memory_sync |
| `ttcrx_i2c_master` | I2C access to the TTCrx internal registers |
| `fp_indicators` | Front-panel LEDs with pulse stretching |
| `pg_fpga` | One PG FPGA: 16 memories, one counter, 16 serialisers |
| `pg_playback_counter` | Playback pointer, programmable wrap |
| `pg_link_mem` | 1024 x 10 single-port pattern memory, powers up to 0x001 |
| `lvds_serialiser` | 10-bit word to 12-bit frame at 12x the TTC clock |
| `lsm_pkg` | Register map, constants, local-bus structs |

## Timing of the serial links

This is the part you most need to understand before changing anything.

**Clocks.** `clk` is the 40 MHz TTC clock. It runs everything except
the serialisers. `clk_ser` is exactly 12 times `clk` and phase-aligned to it.
On the board each PG FPGA's PLL makes this clock. In this RTL it is a single
top-level input, together with one `pll_locked` bit per PG FPGA.

**Frame.** Each crossing carries one 12-bit frame, sent least significant
bit first:

- data frame: start bit `1`, D0 … D9, stop bit `0`;
- sync frame (while Module Control bit 0, *LVDS Sync*, is set): six `1`s,
  then six `0`s.

This follows the framing of the National 10-bit LVDS serialisers used
elsewhere in the trigger system. The specification asks for that format but
does not print it, so check it against your receiver.

**Crossing the clock domains.** Each serialiser has a 0 … 11 bit counter in
the `clk_ser` domain. The counter is cleared by the PG FPGA's reset, and that
reset is released on a `clk` edge. Count 0 therefore falls on a TTC clock
edge. At count 5 the serialiser captures the 10-bit word and the sync request
from the 40 MHz domain. Count 5 is half a crossing away from any `clk` edge,
so the captured values are stable. At count 11 it loads the frame. As a
result, a word that the memory presents after TTC edge *k* goes out during
crossing *k+1*.

**From pointer to wire.** The playback pointer changes on a TTC edge. The
memory reads that address on the next edge. The serialiser sends the word one
crossing after that. A VME access to a link takes that link's memory port for
one clock, so the word it reads or writes appears on the link in place of one
pattern word. This is the specified "VME has priority" behaviour. The other
15 links on the same FPGA are not disturbed.

**PG reset.** A PG_Reset pulse (Pulse register bit 0) also resets the
serialisers. All links then send one frame cut short after its start bit,
followed by one all-zero frame. After that the frames are realigned to the
TTC clock.

## Playback

- Every link memory is 1024 words of 10 bits and powers up to `0x001`, the
  link idle word.
- All 96 links share one pointer value. Each PG FPGA has its own counter, and
  the single `Memory_sync` line keeps them together. High means run, low
  means frozen, and a rising edge restarts every counter at 0.
- The pointer runs from 0 to *PG Playback Length* (reset value 1023) and
  then wraps. The cycle can be longer than the memory, up to the 3564-crossing
  LHC orbit: pointer values from 1024 upward read location 0. Location 0 is
  therefore the idle word sent in the tail of a long cycle.
- **VME control** (PG Control bit 0 = 0): setting PG Control bit 2 starts
  playback from location 0. Clearing it freezes playback. A frozen link keeps
  sending the word at the held location.
- **TTC control** (bit 0 = 1): the broadcast `01 0000 xx` starts playback
  from location 0. This also applies when playback is already running: the
  controller then drops `Memory_sync` for one clock so that the counters see
  a new rising edge. The broadcast `10 0000 xx` freezes playback. Switching to
  TTC control starts in the frozen state.

## VME interface and register map

The board takes a 256 KB window. In A24 cycles (AM 0x39/0x3A/0x3D/0x3E),
A23..A18 must equal `base_sw[7:2]`. In A32 cycles (AM 0x09/0x0A/0x0D/0x0E),
A31..A18 must equal `base_sw[15:2]`. Only 16-bit word cycles are answered.
A cycle takes about six TTC clocks from the data strobes to DTACK*.

| Offset | R/W | Register |
|---|---|---|
| 0x00 | RO | Module ID = 0x2423 |
| 0x02 | RO | `<11:8>` revision, `<7:0>` serial number |
| 0x04 | RO | Firmware revision (0x0001) |
| 0x06 | RO | FPGA status: `<6:1>` PG FPGA not configured |
| 0x08 | RO | Module status: `<2>` cycling, `<1>` TTCdec S2, `<0>` S1 |
| 0x0A | RW | Module control: `<3>` TTCdecPD (no pin), `<2>` XTAL select (TTCdecTX = not bit), `<1>` VME lockout, `<0>` LVDS Sync (reset 1) |
| 0x0C | RW | Pulse: `<7>` TTCrx reset, `<6>` TTCrx JTAG reset, `<1>` PG PLL reset, `<0>` PG reset; reads 0 |
| 0x20 | RW | PG control: `<2>` playback, `<0>` 1 = TTC / 0 = VME control |
| 0x22 | RO | PG status: `<2>` cycling |
| 0x24 | RW | PG playback length, cycle length - 1 (reset 1023) |
| 0x30 | WO | TTCrx pulse: `<0>` clear SER/DER flags |
| 0x32 | RO | TTCrx status: `<6>` SER, `<5>` DER, `<0>` ready |
| 0x34 | RO | BCNT, 12 bits, cleared by BCntRes |
| 0x36 | RO | EVNT, 16 bits, counts L1A, cleared by EvCntRes |
| 0x3C | RO | TTC FIFO status: `<2>` full, `<1>` empty |
| 0x3E | RW | TTC FIFO data `{DQ[3:0], DOUT[7:0]}`; a read pops, a write empties |
| 0x40 | RW | I2C control: `<15>` reset, `<13>` 1 = write, `<12:8>` index, `<7:0>` data; a write starts an access |
| 0x42 | RO | I2C status: `<14>` error, `<13>` busy, `<7:0>` read data |
| 0x8000·p | RW | PG *p* (1..6) memories: link L (A..P = 0..15) at +0x800·L, word n at +2n; bits `<9:0>`; location 0 also returns bit 15 = PLL not locked |
| 0x38000 | — | unused, reads 0 |

Undefined locations and bits read 0. When VME lockout is set, memory reads
return 0, memory writes are dropped, and the register area still works.

## TTCrx and its I2C registers

`ttc_interface` outputs `ttcrx_addr = 0000 ssss 001000`, where `ssss` is the
low nibble of the serial number; the TTCrx reads this ID at reset. The I2C
controller reaches the TTCrx through its pointer register, at I2C address
`{ID,0}`, and its data register, at `{ID,1}`. A write first sends the register
index to the pointer register and then the data byte to the data register.
A read sends the index the same way and then reads one byte back. The 6-bit
I2C ID is the parameter `I2C_ID`, with default `001000`. The bus runs at
100 kHz by default (`QDIV` = 100 clocks per quarter bit). The controller
honours clock stretching by the slave. A missing acknowledge sets the error
bit.

## Where this RTL goes beyond the specification

The specification fixes the partition, the sizes (96 links, 1k x 10
memories, 16-bit length, 480 Mb/s), the register map and bit meanings, the
broadcast codes, the power-up values and the VME priority over playback. The
following are this design's own choices:

- the serial frame layout and the count-5 capture point (see above);
- the encoding of run and restart on the single `Memory_sync` line;
- the local bus between the FPGAs: a single-cycle request, with the
  acknowledge and read data one clock later;
- VME details: synchronisers, accepted address modifiers, word cycles only,
  and which switch bits are used in A24 and A32;
- the dump FIFO depth (16), read-pops and write-flushes;
- the I2C protocol, bit rate and default ID (the TTCrx's own scheme);
- one-clock pulse widths, LED stretch time (50 ms), active-high LEDs;
- the PLL status bit appears on location 0 of *every* link of a PG FPGA;
- a PG reset also resets and realigns the serialisers;
- all six PG FPGAs share one `clk_ser` input in this RTL.

Not implemented as logic: the TTCdec card, the PLLs, clock fanout, LVDS
drivers and the RC cable pre-compensation (82 Ω and 18 pF on each leg,
150 Ω across the line, 100 Ω cable), VME buffers, configuration EEPROMs,
DC/DC supplies, JTAG, the monitor output (selected by a jumper) and the
connector pin-out. Link *l* of PG *p* is `lvds_out[16*(p-1)+l]`.

## Simulation

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`. Testbench-only models:
`vme_master_bfm` (a VME master with `write16`/`read16` tasks) and
`ttcrx_i2c_model` (the TTCrx I2C slave).

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl rtl/lsm_pkg.sv tb/tb_lsm_top.sv \
  --top-module tb_lsm_top -o sim
./obj_dir/sim
```

`tb_lsm_top` runs the whole board at its default size: 6 x 16 links and
1024-word memories. It checks all 96 serial outputs in every crossing against
a reference model through this sequence:

1. power-up sync frames;
2. idle words;
3. pattern loading over VME;
4. VME-started playback with a 1100-crossing cycle, so location 0 fills the
   tail, then two full 3564-crossing orbit cycles;
5. VME accesses during playback;
6. TTC start, restart and stop;
7. lockout and PG reset;
8. the PLL fault bit, the counters, the FIFO and an I2C round trip.

It counts each of these mechanisms and fails if one never happened. The run
takes a few seconds. `tb_pg_playback_counter` runs a full 3564-crossing orbit
cycle. `tb_lvds_serialiser` and `tb_pg_fpga` check the frame format and its
one-crossing latency.

All state that is read is either reset or initialised. The pattern memories
start from their power-up value, so the design also simulates correctly with
two-state, randomly initialised simulators.
