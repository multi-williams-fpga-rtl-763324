# Williams multi-game arcade core

Williams Electronics' early-1980s arcade boards (Defender, Stargate, Joust,
Robotron) all follow one scheme. An M6809E CPU at 1 MHz drives a
bit-mapped, 16-colour framebuffer that shares the address space with the
program ROM. A free-running video counter tells the software where the CRT
beam is, and the video interrupts come from that counter. Later games add a
"Special Chip": a DMA blitter that halts the CPU and moves sprites into the
framebuffer. Stargate, Joust and Robotron share one memory layout and differ
only in their ROMs and in whether the blitter is present. That is why one
core can run all of them, with the game chosen at run time.

This repository is the RTL of that core, written for an FPGA with an
embedded host processor. It contains:

* the address decoder with the RAM/ROM bank switch;
* a shared 128 kB dual-port block RAM that holds ROM, RAM, palette and CMOS;
* the video counter and its two interrupt sources;
* the blitter;
* two reduced 6821 PIAs, one for player input and one for sound commands;
* debouncing and per-game routing of a two-player control panel;
* a small register block for the host.

Three parts live outside the core. The M6809E CPU connects to the `cpu_*`
ports. The host processor connects to the `plb_*` and `host_*` ports: it
loads the ROMs, draws the screen from the framebuffer and plays the sounds.
The control panel's switches connect to `controls`.

## Block map

```
                 host processor (ROM load, video, sound)
                   | plb_* (64-bit)            | host_*
              +----+------+              +-----+-----+
              |  bram_dp  |              | host_regs |-- game, run, blit_en
              | 128 kB DP |              +-----------+
              +----+------+
                   | port B (64-bit lines)
          +--------+----------+
          | bram_port_adapter |  byte <-> 64-bit line
          +--------+----------+
                   |
            +------+------+   pia_in / pia_snd / blitter regs / 0xCB00
  M6809E ---+ memory_map  +------------------------------------------+
  cpu_* bus +------+------+                                          |
     (mux: CPU, or blitter while busy)                               |
                   |                                                 |
              +----+----+         +------------+   +---------+   +---+------+
              | blitter |-- HALT  | crt_timing |-->| irq_gen |-->| cpu_irq  |
              +---------+         +------------+   +---------+   +----------+
  controls -> debounce -> control_mux -> pia_input (PA, PB, CB2 -> player select)
                                      -> pia_sound (PA = coin door; PB = sound command)
```

`williams_top` instantiates all of it. `williams_pkg` holds the game enum,
the blitter control-byte struct and the address constants.

## Clocking and the bus cycle

The original board clocks its RAM faster than the CPU. This core does the
same with one clock, `clk`, which runs at four times the MPU cycle rate: 4 MHz
for a 1 MHz M6809E. A two-bit phase counter splits each MPU cycle into
phases 0-3. `cpu_ce` is high on phase 3, the last clock of the cycle, and
the CPU should advance on it.

* The CPU holds `cpu_addr`, `cpu_rw` and `cpu_dout` stable for a whole MPU
  cycle. The core makes the access at phase 0.
* Read data appears on `cpu_din` at phase 2 and stays there until the next
  read. The CPU can take it at `cpu_ce`.
* While `cpu_halt` is high, the CPU must not use the bus. The core ignores
  it anyway: the blitter owns the bus during those cycles.
* `cpu_reset` holds the CPU in reset until the host sets RUN. This lets the
  host load the ROMs first.
* `cpu_irq` is the video interrupt. Only IRQ is generated; on the boards,
  FIRQ and NMI are unused.

The CPU, the blitter and the host each see a synchronous BRAM with one
clock of read latency.

## Memory map and the bank switch

| CPU address     | What                                    | Where it goes                 |
|-----------------|-----------------------------------------|-------------------------------|
| 0x0000-0x8FFF   | framebuffer RAM, or ROM when banked in  | BRAM 0x00000+ / 0x10000+      |
| 0x9000-0xBFFF   | RAM                                     | BRAM 0x09000+                 |
| 0xC000-0xC00F   | palette (mirrored to 0xC3FF)            | BRAM 0x0C000-0x0C00F          |
| 0xC804-0xC807   | input PIA                               | `pia_input`                   |
| 0xC80C-0xC80F   | sound PIA                               | `pia_sound`                   |
| 0xC900          | bank latch, bit 0 (1 = ROM), write only | `memory_map`                  |
| 0xCA00-0xCA07   | blitter registers, write only           | `blitter`                     |
| 0xCB00          | video counter, upper six line bits      | `crt_timing`                  |
| 0xCC00-0xCFFF   | CMOS configuration RAM                  | BRAM 0x0CC00+                 |
| 0xD000-0xFFFF   | ROM                                     | BRAM 0x1D000+                 |

The BRAM byte address is `{is_rom, cpu_address}`. RAM, palette and CMOS
sit in the lower 64 kB at their own CPU addresses. The 48 kB of ROM sits in
the upper 64 kB, also at its CPU address. The host needs no translation
table: the framebuffer byte for CPU address `a` is BRAM byte `a`, and the
banked ROM byte for `a` is `0x10000 + a`.

The bank latch only affects **reads** below 0x9000. Writes there always go
to RAM. Game code uses this to copy sprite data out of ROM and straight
into the framebuffer beneath it.

The framebuffer is 304 x 256 pixels at 4 bits per pixel, so 0x0000-0x97FF.
It is stored column-wise: byte `(x/2) * 256 + y` holds pixels `x` and
`x+1` of line `y`, with the left pixel in the high nibble. Each palette byte
is a 3-3-2 colour: blue [7:6], green [5:3], red [2:0]. The host turns
framebuffer and palette into a VGA picture. That conversion is software and
is not in this RTL.

Unmapped I/O reads 0x00 and ignores writes. Writes to 0xD000-0xFFFF are
ignored.

## The video counter and the interrupts (`crt_timing`, `irq_gen`)

This is the part of the board whose exact timing the game software relies
on. The boot tests and game loops poll 0xCB00 and expect particular lines at
particular cycles.

`VA[13:0]` is a 14-bit counter that advances once per MPU cycle:

* `VA[13:6]` is the scan line (V128..V1);
* `VA[5:0]` is the horizontal position (H32..H1): 64 MPU cycles per line.

The original board counts at 4 MHz with wider counters. Running the count
at the CPU rate needs only 14 bits.

A frame has 256 lines plus a stretch. The counter counts from 0 up to
0x3FFF. At that first overflow it reloads 16128 (0x3F00) and counts to
0x3FFF again. At the second overflow it goes back to 0. A frame is
therefore 16384 + 256 = **16640 MPU cycles, 16.6 ms (60 Hz)**.

Two signals are decoded from the counter:

* **4 ms interrupt = VA11.** It rises every 4096 cycles, four times per
  frame. The gap across the frame wrap is 4352 cycles.
* **COUNT 240 = VA13 & VA12 & VA11 & VA10**, i.e. scan line >= 240. It is
  high for 1024 cycles at the bottom of the count and stays high through
  the 256-cycle stretch: 1280 cycles, about 1.3 ms per frame.

A read of 0xCB00 returns `{VA13..VA8, 0, 0}`: the scan line to a
resolution of four lines.

`irq_gen` turns each rising edge of the two signals into an IRQ pulse of
`IRQ_HOLD` (100) MPU cycles. The pulse is long enough that the CPU sees it
whatever instruction it is in the middle of. There is one timer per source,
and `cpu_irq` is their OR.

There is no interrupt flag register and no acknowledge: the pulse simply
ends after `IRQ_HOLD` cycles. Software that reads or clears an interrupt
flag will not find one. See "Known differences".

## The blitter (`blitter`)

The blitter is written through eight registers:

| reg | address | meaning                                  |
|-----|---------|------------------------------------------|
| 0   | 0xCA00  | control byte; writing it starts the blit |
| 1   | 0xCA01  | mask: colour pair used in solid mode     |
| 2/3 | 0xCA02/3| source address high/low                  |
| 4/5 | 0xCA04/5| destination address high/low             |
| 6   | 0xCA06  | width in bytes (0 = 256)                 |
| 7   | 0xCA07  | height in rows (0 = 256)                 |

Control byte (`williams_pkg::blit_ctrl_t`):

| bit | name          | effect |
|-----|---------------|--------|
| 0   | `src_screen`  | source in screen format. Along a row the address steps by 256 (one byte column); each new row starts 1 byte on. In linear format the address steps by 1 and each new row starts W bytes on. |
| 1   | `dst_screen`  | same choice for the destination |
| 2   | `xwrap`       | screen-format column wraps from 151 back to 0 (152 byte columns = 304 pixels) |
| 3   | `transparent` | source pixels of value 0 are not written |
| 4   | `solid`       | write the mask register's nibble instead of the source pixel |
| 5   | `rotate`      | rotate each row one pixel right; the row's last pixel comes out first |
| 6   | `even_en`     | left (high-nibble) pixels may be written |
| 7   | `odd_en`      | right (low-nibble) pixels may be written |

A plain copy therefore needs bits 6 and 7 set (0xC0 | format bits). A
control byte with neither bit set writes nothing.

When a blit starts, `busy` goes high and drives the CPU's HALT. The blitter
then uses the bus, one byte per MPU cycle:

1. phase 0: read the source byte;
2. phase 1: latch it and read the destination byte;
3. phase 2: write the merged byte, or nothing if no pixel of it is to be
   written;
4. phase 3: step the addresses.

Reading the destination first lets a byte keep the pixel that is not
written. The rate is 1 byte/us at a 1 MHz MPU, about 1 MB/s. A W x H blit
halts the CPU for W*H MPU cycles, plus one cycle to start. With `rotate`,
each row costs one more cycle, which reads the row's last source byte for
its right-hand pixel.

The original hardware has two 4-bit blitters working in parallel. This core
has one 8-bit unit that does the same work.

Source reads go through the memory map, so with the bank latch set a
sprite can be read from ROM below 0x9000. The blitter is switched off
(`blit_en = 0`) for Defender and Stargate. Writes to its registers are then
ignored.

## The shared BRAM and its 64-bit port (`bram_dp`, `bram_port_adapter`)

Once a bus is attached to the vendor's BRAM block, both of its ports become
64 bits wide with 8-byte-aligned 32-bit byte addresses. `bram_port_adapter`
lets the 8-bit core use that port:

* **Address:** bits [16:3] of the byte address select the line. In the
  bus's big-endian bit numbering these are `BRAM_ADDR_B[15:28]`. The full
  address is also given with its low three bits cleared.
* **Write:** the byte is replicated into all eight lanes, and only the lane
  chosen by the low three address bits is write-enabled.
* **Read:** the whole line returns one clock later, and the adapter picks
  the byte using the offset it registered with the request.
* **Byte order:** big-endian, matching the PowerPC-style host. Byte offset
  `k` of a line is lane `7-k`, bits `[63-8k -: 8]`. The host must use the
  same order when it loads ROMs through `plb_*`.

`bram_dp` models the block itself: 16384 lines x 64 bits, two synchronous
ports on one clock, byte-lane write enables, one cycle of read latency, and
read-before-write. A same-line write from both ports in the same clock is
not arbitrated; port B's lanes win.

## PIAs and controls

The full 6821 is replaced by sampling registers. The player controls are
inputs only, and sound is handled by the host.

* **`pia_input`** (0xC804-0xC807). PA and PB are sampled every clock from
  `control_mux`. The only writable register is control register B. CB2 is
  bit 3 of CRB when CRB[5:4] = 11 (the 6821's output set/reset mode), and 0
  otherwise. In Joust, CB2 selects which player's stick and flap button
  appear on PA. Register select is RS1 RS0 = address[1:0]: 0 = PA,
  1 = (reads 0), 2 = PB, 3 = CRB.
* **`pia_sound`** (0xC80C-0xC80F) keeps two registers:
  * Port A samples the coin-door switches.
  * A write to port B stores the low six bits as a sound command and raises
    `snd_valid`.
  The host reads the command from host register 1; that read clears the
  flag. A CPU write in the same clock as the clear wins.
* **`debounce`**: a two-flop synchroniser per line, then a change is
  accepted only after the line has been stable for `CYCLES` clocks. The
  default is 20000 clocks, 5 ms at 4 MHz. The output changes `CYCLES + 2`
  clocks after the input settles.
* **`control_mux`** routes the panel to the PIAs for the selected game. The
  panel has 14 lines per player: up, down, left, right, buttons 1-7, coin,
  start, meta. Player 1 is on `controls[13:0]`, player 2 on
  `controls[27:14]`, restart on `controls[28]`; bits 31:29 are unused.

Per-game routing in `control_mux`:

| Game                 | PA bits 0..7                                            | PB bits 0..1            |
|----------------------|---------------------------------------------------------|-------------------------|
| Defender, Stargate   | fire, thrust, smart bomb, hyperspace, start 2, start 1, reverse, down | up, inviso |
| Joust                | left, right, flap of the player CB2 selects; start 1 on bit 4, start 2 on bit 5 | — |
| Robotron             | move up/down/left/right (P1 stick), start 1, start 2, fire up, fire down (P2 stick) | fire left, fire right |
| coin door (all games) | auto-up = P2 meta (bit 0), advance = P1 meta (bit 1), left coin = P1 coin (bit 4), centre coin = P2 coin (bit 5) | — |

## Host interface (`host_regs`, `plb_*`)

`host_*` is a plain synchronous register port (select, write, 2-bit
address, 32-bit data). Read data is combinational.

| reg | access | bits |
|-----|--------|------|
| 0 CONTROL | rw | [1:0] game (0 Defender, 1 Stargate, 2 Joust, 3 Robotron), [4] RUN |
| 1 SOUND   | r  | [5:0] last sound command, [8] new-command flag (a read clears it) |
| 2 STATUS  | r  | [0] restart button, [1] blitter busy, [2] bank latch |

The host sequence:

1. With RUN = 0, write the game's ROMs and clear RAM through `plb_*`.
2. Write CONTROL with the game and RUN = 1.
3. Periodically read the framebuffer and palette from BRAM and draw the
   screen.
4. Poll SOUND for new commands.
5. To change game, clear RUN and start again.

## Parameters

| module       | parameter        | default | meaning |
|--------------|------------------|---------|---------|
| williams_top | `DEBOUNCE_CYCLES`| 20000   | switch debounce time in clocks |
| williams_top | `IRQ_HOLD`       | 100     | IRQ pulse length in MPU cycles |
| crt_timing   | `RELOAD`         | 16128   | value loaded at the first overflow; sets the frame length |
| bram_dp      | `LINES`          | 16384   | 64-bit lines (128 kB) |
| debounce     | `W`, `CYCLES`    | 32, 20000 | lines, stable time |

All defaults are the full design; nothing is scaled down.

## Known differences and limits

* **No CPU here.** The M6809E must be supplied. It must follow the bus
  cycle above: address held for an MPU cycle, data taken at `cpu_ce`, HALT
  obeyed at the cycle boundary. A real 6809 finishes its current cycle and
  signals BA/BS before it halts; this core does not wait for that.
* **Defender's own memory map is not implemented.** Every game uses the
  Stargate/Joust/Robotron map, so Defender ROMs will not run as they are.
* **No interrupt latch or acknowledge.** Both interrupts are fixed-length
  IRQ pulses. The cycle-exact interrupt behaviour that some boot tests
  check may differ.
* **The sound board (its own 680x CPU and DAC) is not part of the core.** The
  host plays recorded sounds for the six-bit commands.
* **Not taken from the original boards; chosen here:**
  * the blitter's nibble order;
  * the polarity of its even/odd bits, as described above;
  * its wrap width (152 columns);
  * its treatment of 0 as 256 for width and height.
  Software that depends on finer details of the original chip may see
  different results.
* **CMOS RAM is plain BRAM** with no battery backing: its contents last
  only until the host clears the BRAM.
* **Host side:** the register layout, the BRAM layout and the host bus
  (a plain register port rather than the vendor's peripheral bus protocol)
  are this core's own.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. Example
with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_williams_top -y rtl -y tb +libext+.sv \
  rtl/williams_pkg.sv tb/tb_williams_top.sv -o sim
obj_dir/sim
```

Substitute any other `tb_<block>` for the top.

`tb_williams_top` runs the whole core at its default parameters. A bus
model plays the CPU and the host, and the run goes through:

* ROM load and CPU release;
* the bank switch and a write under ROM;
* palette writes seen by the host;
* a copy blit and a rotate blit, with the length of the CPU halt checked;
* a blit ignored for Stargate;
* a sound command;
* debounced controls with the CB2 player switch, the coin door and the
  restart button;
* two full video frames, checking the 16640-cycle frame, both interrupt
  sources and the 0xCB00 read.

It counts each of these mechanisms and fails if one never happened. It
runs in well under a second.

`tb_blitter` compares every blit mode, and then each of the 256 control
bytes at a random size and position, with a reference model of the pixel
rules, including the cycle count. `tb_crt_timing` checks the counter
against the frame formula on every clock.
