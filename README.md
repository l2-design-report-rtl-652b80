# L2β adapter-card FPGA

This is the logic of the FPGA on the 9U adapter card of an L2β processor.
The L2β processor is a Level 2 trigger processor for the DØ experiment. It is
built from a commercial CompactPCI single-board computer. The adapter card
plugs that computer into a Level 2 trigger crate.

The computer sees only PCI. A PLX 9656 bridge turns PCI into a 32/64-bit
"local bus". The FPGA sits on that local bus and does everything the crate
needs. It serves the Magic Bus (MBus), the crate's 128-bit data backplane,
and the trigger control lines.

The FPGA has four jobs:

1. **Broadcast receive and DMA.** Other boards (the input "worker" boards)
   write event data to MBus addresses 0..1023. Each of these addresses is a
   broadcast channel. The FPGA stores every broadcast word together with its
   channel number. It then has the PLX copy the words into host memory, at a
   separate destination for each channel.
2. **Programmed I/O (PIO), both ways.** The CPU can read and write any MBus
   address through two PCI windows. Other MBus masters can read and write
   host memory through an MBus address window.
3. **MBus arbitration.** Bus ownership is passed down a daisy chain (the
   "BOSS" chain).
4. **Trigger-system interface (TSI).** This covers:
   - status lines;
   - crate-master outputs;
   - J2 trigger lines;
   - 32 ECL scaler outputs;
   - the two interrupts to the CPU.

The whole design is in `rtl/`. It is synthesizable SystemVerilog with one
top module, `l2b_fpga`. Every block has a self-checking testbench in `tb/`.

## Block map

```
            PLX 9656 local bus (lb_req / lb_rsp, window 0..3)
                              |
                        local_bus_if
        +---------------+-----+---------------+
        | window 0      | windows 1,2         | window 3
    ctrl_regs       pio_master            dma_engine --- dma_cmd_* to PLX
     |   |   |          |                   |     |
    tsi  |  dma_mapper--+-------------------+     |
         |              |                         |
         |         mbus_master             bcast_fifo (4096 x 138)
         |              |                         |
         |         boss_arbiter             bcast_decode
         |              |                         |
         +------- MBus (mb_i / mb_o, BOSS chain) -+------ pio_target --- lm_* to PLX
                                                           (local bus master)
    spy_mux: 32 debug channels, group picked by spy_sel
```

| Module | Role |
|---|---|
| `l2b_pkg` | Shared types: local-bus beat and answer structs, the MBus bundle, register offsets |
| `local_bus_if` | Sends each local-bus beat to a target, by the PLX window it came through |
| `ctrl_regs` | Control & Monitor window: I/O control, PIO configuration, error register, TSI and Mapper access |
| `bcast_decode` | Detects MBus broadcast writes, fills the FIFO, answers DDONE |
| `bcast_fifo` | 4096-entry FIFO of {channel[9:0], data[127:0]} |
| `dma_mapper` | 1024 × 32 table: next host (PCI) address for each channel, with its own 16-bit adder |
| `dma_engine` | Sets up PLX DMA bursts and feeds them FIFO data |
| `pio_master` | CPU to MBus: PIO windows A and B, read buffer, retry and error reporting |
| `mbus_master` | One MBus master cycle, with timeout |
| `boss_arbiter` | BOSS daisy-chain arbitration |
| `pio_target` | MBus to host memory, through the MBus window |
| `tsi` | Trigger-system registers, outputs and interrupts |
| `spy_mux` | Logic-analyser header |

## Conventions

**Clock.** The whole FPGA runs on one clock, the local-bus clock (up to
66 MHz). MBus and trigger inputs are taken as already synchronous to it. A
board-level implementation would add input synchronisers.

**Reset.** `rst_n` is asynchronous and active low.

**MBus signals.** The MBus appears as a packed struct `mb_sig_t`, in
active-high form. It holds:
- `ad[31:0]`, the address;
- `da[127:0]`, the data;
- `rd`;
- `dstrobe`;
- `ddone`.

`mb_i` is what the backplane shows. `mb_o` is what this FPGA would drive.
The external bidirectional drivers are enabled by `mb_ad_dir`, `mb_da_dir`
and `mb_ctl_oe`. The board drivers invert the active-low lines (DSTROBE*,
DDONE*). MBus addresses count 128-bit words, so one MBus word is 16 bytes of
host memory.

**MBus handshake.** Every MBus cycle is a four-phase handshake:
1. The master raises DSTROBE.
2. The target raises DDONE.
3. The master drops DSTROBE.
4. The target drops DDONE.

**Local bus.** The local bus is abstracted as one beat at a time.

- `lb_req_t` carries:
  - valid;
  - the PLX window (0–3);
  - the byte address (bits 19:0);
  - write;
  - 32- or 64-bit size;
  - the last beat of the PCI burst;
  - 64-bit write data.
- A beat is held until the target answers with `ready` (done) or `retry`
  (the PLX must STOP, and the PCI master repeats the transaction later).
- `eot` marks the last beat of a DMA burst.

Window 3 is reserved in the PLX. This design uses it as the DMA data port.

## Register map (window 0, 32-bit registers)

| Offset | Register |
|---|---|
| 0x000 | I/O control. Bit 0: enable DMA. Bit 1: broadcast lockout. Bit 2: clear FIFO (write 1; reads 0). Bit 8: enable PIO target. Bit 9: PIO write to FIFO (stored only) |
| 0x010 | PCI Translation Base. Bits 31:16 become MBus address bits 31:16 for windows A/B |
| 0x014 | MBus Upper Memory Address. Upper limit of the MBus window, bits 31:16, exclusive |
| 0x018 | MBus Lower Memory Address. Lower limit, bits 31:16, inclusive |
| 0x01C | MBus Translation Base. Bits 31:20 become PCI address bits 31:20 for the MBus window |
| 0x020 | MBus error register (read only). Bit 0: timeout. Bit 1: bus not won in time. Bit 2: lost to an MBus-side access |
| 0x10C | Broadcast status (R). 18:0 MOD_DONE, 19 local FIFO empty, 20 AP_FIFO_EMPTY, 24:21 EV_LOADED, 25 MBRESET*, 27:26 BUFFER(1:0) |
| 0x110 | Crate master. 2 CRATE_MASTER (driver enable), 3 DONE, 5:4 BUFFER, 6 START_LOAD*, 7 MBRESET*, 9 VBD_START_REQ. Reads 16 VBD_DONE and 18 L2_ANSWER_READY |
| 0x114 | Scaler, TSL_OUT(31:0) |
| 0x130 | Interrupt control. 18:0 MOD_DONE mask, 19 FIFO-empty select (0 AP, 1 local), 20 new-event enable, 21 test enable, 22 external (SCL) enable, 30 INT_1 enable, 31 INT_2 enable |
| 0x134 | Interrupt request (R). 0 test, 1 external, 2 new event, 8 raw SCL line, 30 INT_1, 31 INT_2 |
| 0x13C | Internal test. 0 test interrupt request, 4:1 J2 crate-master test outputs |
| 0x140 / 0x144 | J2 user outputs / inputs (8 bits) |
| 0x148 | Geographic address GA(4:0), parity in bit 5 |
| 0x1000 + 4n | Mapper entry n: the host address the next word of channel n goes to |

An output bit reads back as the register that drives it, not as the pin
level. The pin levels can be seen in the status register.

## Broadcast path: FIFO, Mapper and DMA bursts

This is the part of the design with the most interaction between blocks.

**Receive.** A broadcast is an MBus write with address bits 31:10 all zero.
`bcast_decode` writes `{address[9:0], data}` into the FIFO the first clock it
sees DSTROBE. It raises DDONE the clock after, and holds DDONE until DSTROBE
falls. There are three special cases:

- **FIFO full, `HOLDOFF=1` (default).** DDONE is withheld until there is
  room, so the sender waits.
- **FIFO full, `HOLDOFF=0`.** The word is acknowledged and lost, and
  `dropped` pulses. This matches the behaviour of the older boards.
- **Broadcast lockout.** The word is acknowledged and thrown away. A
  locked-out board never stalls the crate.

**Host addresses.** The Mapper holds a 32-bit host address for each
channel. Software writes the start address of each channel's buffer there
before an event. After each MBus word, the entry is advanced by 16 bytes.

The adder is only 16 bits wide and works on address bits 18:3. Bits 31:19
never change, so a channel's buffer wraps around inside its 512 KB-aligned
region. This limit is deliberate and comes from the original design.

The DMA engine has priority on the Mapper. A CPU access to the Mapper waits
for a free clock.

**DMA.** The PLX does the PCI mastering. The FPGA only tells it where to
write, and then supplies the data:

1. With DMA enabled and the FIFO not empty, `dma_engine` pops the head entry
   and reads that channel's Mapper entry, in the same clock.
2. The next clock it offers the address on `dma_cmd_valid` /
   `dma_cmd_pci_addr`. The PLX takes it with `dma_cmd_ready`. This stands
   for "load the PLX DMA registers and go".
3. The PLX then reads window 3. Each MBus word is two 64-bit beats, bits
   63:0 first. Each beat is answered in the clock it is requested.
4. After the second beat, the Mapper entry moves on by 16 bytes.
5. If the next FIFO entry is for the same channel, its two beats follow in
   the same burst.

The burst ends, with `eot` on the last beat, when any of these happens:

- the channel changes;
- the FIFO is empty;
- DMA is disabled;
- an MBus-side PIO is waiting (`pio_hold`);
- the channel's address reaches its 512 KB wrap point, because the PLX
  counts addresses linearly.

The next burst starts again from step 1 with a fresh Mapper lookup. A burst
therefore always has one destination that runs linearly.

**Clear.** Writing bit 2 of the I/O control register empties the FIFO
immediately.

## PIO from the CPU (windows A and B)

Both windows are 64 KB and map onto the same MBus addresses. The MBus word
address is `{PCI_TB[31:16], PCI address[19:4]}`.

The windows differ only in when a write goes out on the MBus:

- **Window A.** Beats of up to 128 bits (1–4 × 32-bit or 1–2 × 64-bit) are
  collected. The MBus write starts on the last beat of the PCI burst.
  Bytes not written in that burst are sent as 0.
- **Window B.** The MBus write starts when the top 32 bits of the word
  (byte offset 0xC) are written. This suits software that always writes
  whole 128-bit words.

**Reads.** A read at a 128-bit aligned address starts an MBus read. The
word is kept in a buffer, so reads of the rest of that word are answered
without a new MBus cycle.

**Timing of an MBus access.**

- The beat that starts an MBus cycle is answered only when the cycle has
  finished.
- If the bus is not won within `RETRY_LIMIT` (16) clocks, the request is
  withdrawn and the beat is answered with `retry`. The same happens if an
  MBus-side PIO to this board is in progress, because that side takes
  precedence.
- A cycle that gets no DDONE ends after `MB_TIMEOUT` (256) clocks. A read
  then returns all ones.
- The error register always shows the outcome of the last MBus transaction.

## PIO from the MBus (MBus window)

An MBus cycle is claimed when both of these hold:
- its address bits 31:16 lie in [Lower, Upper);
- it is not a broadcast address.

The host address is `{MB_TB[31:20], MBus address[15:0], 4'b0000}`. Only
1 MB of host memory is therefore reachable.

`pio_target` turns each claimed cycle into two 64-bit local-bus master beats
(`lm_*`). The beats cover bytes 0–7, then bytes 8–15 at address + 8. DDONE
is given only after both beats have finished. For a read, the 128-bit word
is driven with DDONE.

While the beats are pending, `hold` makes the DMA engine end its burst
after the current word. The local bus is then free for the PIO.

## BOSS arbitration

- A board raises BOSSREQ while it wants the bus.
- A grant travels down the crate on the BOSSGRIN → BOSSGROUT chain.
- A requesting board that sees the rising edge of BOSSGRIN while BOSS is
  free takes the bus. It drives BOSS until its request ends.
- A board that does not take the grant passes it to BOSSGROUT after
  `GRANT_DELAY` clocks.

The original logic is asynchronous gate logic. Here the same structure is
clocked, with one grant step taking one clock (15 ns at 66 MHz). The grant
source at the head of the chain (the crate controller) is outside this
FPGA.

## Interrupts

- **New event.** Every MOD_DONE bit selected by the mask is set, AND the
  selected FIFO-empty flag is set, AND new-event interrupts are enabled.
- **Test interrupt.** The internal test request bit is set AND its enable is
  set.
- **INT_1** = (new event OR test) AND the INT_1 enable.
- **INT_2** = (SCL line AND its enable) AND the INT_2 enable.
- The local interrupt to the PLX is INT_1 OR INT_2.

## Spy header

`spy_sel` picks one of four 32-bit groups. The group is registered onto the
pins one clock late.

**Group 0, events and handshakes** (bit 31 first):

| Bits | Signals |
|---|---|
| 31–24 | dstrobe, ddone, rd, BOSS, BOSSGRIN, BOSSREQ, BOSSGROUT, local BOSS |
| 23–16 | FIFO write, FIFO read, full, empty, DDONE withheld, word dropped, clear, lockout |
| 15–8 | DMA busy, burst start, burst end, channel change, DMA preempted by PIO, MBus request, MBus done, MBus timeout |
| 7–0 | MBus-window PIO busy, PCI retry, read-buffer hit, local master valid, local master ready, INT_1, INT_2, new-event request |

**The other groups:**

| Group | Contents |
|---|---|
| 1 | MBus address lines |
| 2 | FIFO fill count |
| 3 | Current DMA host address |

## Parameters of the top

| Parameter | Default | Meaning |
|---|---|---|
| `FIFO_DEPTH` | 4096 | Broadcast FIFO entries, 128 data bits + 10 channel bits each |
| `HOLDOFF` | 1 | 1: a full FIFO withholds DDONE. 0: a full FIFO drops words |
| `MB_TIMEOUT` | 256 | Clocks without DDONE before an MBus cycle is abandoned |
| `RETRY_LIMIT` | 16 | Clocks to win the MBus before a PCI retry |

## Resources and performance

**Memory.** At the defaults the design needs 598,016 memory bits:
- the FIFO, 4096 × 138 bits;
- the Mapper, 1024 × 32 bits.

That is about 73 KB. The XCV405E FPGA the card was planned around has about
70 KB of block RAM, so the full-size configuration is about 3 KB short on
that part. Options are:
- a larger FPGA;
- `FIFO_DEPTH` = 3840 (3.75 K entries);
- storing only a "channel changed" flag instead of the full channel number.
  This is not built.

**Speed.** The DMA data port can supply one 64-bit beat per local-bus clock,
which is 528 MB/s at 66 MHz. That is more than a 64-bit, 33 MHz PCI bus
(264 MB/s) can take, and well above the 80–100 MB/s the processor needs.
Each new burst costs two FPGA clocks before the PLX gets its address.

## Where this design departs from, or adds to, the original description

- **Local-bus interfaces.** The PLX local-bus signals are not described. All
  three are this design's abstraction:
  - the beat and answer structs;
  - the DMA command and `eot` handshake;
  - the local-bus master port of the MBus window.

  Connecting to a real PLX 9656 needs a thin adapter for its LHOLD/LHOLDA,
  ADS, BLAST, READY and DMA pins.
- **Window 3** is used as the DMA data port.
- **One clock.** The MBus and trigger lines are sampled on the local-bus
  clock without synchronisers.
- **Broadcast lockout** acknowledges and discards words, rather than leaving
  them unanswered.
- **Full FIFO.** Hold-off is the default. Words are dropped only with
  `HOLDOFF=0`.
- **DDONE is a wired-OR line.** If another board on the same broadcast
  answers DDONE, the sender sees DDONE even while this board is withholding
  it. Hold-off protects a board's FIFO only when every receiving board takes
  part in it.
- **Bursts also end at the 512 KB wrap point** of a channel.
- **Upper bound of the MBus window** is exclusive, compared on bits 31:16.
  Broadcast addresses are never claimed by the window.
- **Interrupt FIFO-empty flag.** One flag is chosen by bit 19 of the
  interrupt control register, rather than the OR of both flags.
- **AP_FIFO_EMPTY** is not driven by the FPGA. No register bit for it is
  defined.
- **"PIO write to FIFO"** (I/O control bit 9) is stored and read back but
  does nothing, because its effect is not described.
- **Error register.** Its bit layout is this design's own. Writes to it are
  ignored.
- **Spy header.** The group contents are this design's own. The group is
  chosen by a switch input.
- **Arbitration** is synchronous. See *BOSS arbitration*.
- **Reset values.**
  - Everything resets to 0 (DMA, PIO target and interrupts disabled).
  - START_LOAD* and MBRESET* reset to 1, their inactive level.
- **Interrupt to the PLX.** The interrupt is a plain `lint` output (INT_1 OR INT_2). It is not a local-bus master cycle.
- **Scaler lines as spy channels.** These were suggested as an option and are not provided.
- **Not part of this FPGA.** These are listed for completeness:
  - the single-board computer;
  - the PLX 9656 itself;
  - the VME (Universe II) interface;
  - MBus, TTL/PECL and ECL drivers;
  - reset and display pins;
  - the IDE hard-drive routing.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A
watchdog ends a hung run with a failure.

Example with Verilator 5, run from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal \
  --top-module tb_l2b_fpga -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/l2b_pkg.sv tb/tb_l2b_fpga.sv -o sim
./obj_dir/sim
```

Replace `tb_l2b_fpga` with any `tb_<block>`. Block testbenches use random
stimulus from `$urandom`, compared against reference models written inside
the testbench.

**`tb_l2b_fpga`** runs the whole FPGA at its default parameters, including
the 4096-entry FIFO. It takes well under a second.

It builds a small crate around the FPGA:

| Model | Behaviour |
|---|---|
| Broadcasting board | Also grants the bus at the head of the chain, alternating with the FPGA |
| Downstream board | Does PIO into the FPGA's MBus window |
| MBus memory | A memory board on the MBus |
| PLX | Retries refused beats after 4 clocks, and runs the DMA |
| Host memory | Also answers the FPGA's local-bus master beats, with adjustable delay |

The test runs these phases:

1. Multi-channel broadcasts with DMA on. This includes a channel that wraps
   at 512 KB, and PIO running at the same time.
2. Window A/B writes and reads, including a read-buffer hit.
3. A PIO read from another board.
4. An MBus timeout.
5. DMA preempted by MBus-side PIO.
6. Broadcast lockout.
7. Filling the FIFO completely, so it holds off the sender, then clearing it.
8. All interrupt sources.
9. Crate-master outputs, the scaler and the spy groups.

The test counts each mechanism, read from spy group 0 and the MBus pins. It
fails if any of them never happened.

**`tb_l2b_fpga_drop`** builds the top with `HOLDOFF=0` and a 16-word FIFO.
It checks the following:

- Words sent to a full FIFO are acknowledged at once and dropped.
- The fill count and the FIFO-empty status bit are correct.
- Clearing the FIFO works.
- Broadcast lockout works.
