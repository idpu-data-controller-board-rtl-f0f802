# Data controller FPGA for an instrument data processing unit

A spacecraft instrument suite has five instruments (Plastic, SWEA, MAG, SEP,
STED). A small 16-bit microcontroller board collects their data. This board
needs one FPGA to do the work that a processor with a multiplexed bus cannot
do alone:

- It turns the processor's 64 KB address space into a 4 MB paged memory
  map, with boot ROM, EEPROM and 3 MB of RAM.
- It lets a 1553 remote-terminal chip (the SuMMIT) and the FPGA's own serial
  engines use that memory by DMA. They take the bus from the processor with
  HOLD/HLDA.
- It keeps the spacecraft-synchronous microsecond time. Once per counter
  period it sends a sample-clock command ("F0") to every instrument, timed to
  the microsecond.
- It sends commands to the instruments from a queue in RAM, with per-record
  instrument masks.
- It receives each instrument's telemetry into its own circular buffer in
  RAM. Each buffer has a read/write pointer protocol, so software only ever
  sees whole, error-free messages.

This repository holds synthesizable SystemVerilog for the FPGA (`rtl/`) and
self-checking testbenches (`tb/`). The processor, memories, 1553 chip and
instruments are outside the FPGA. They appear as ports, and the testbenches
model them.

## Block structure

| Module | Role |
|---|---|
| `dcb_fpga` | Top level. Instantiates everything. It also holds the reset synchroniser and the soft-reset OR, and drives the diagnostic outputs. |
| `dcb_pkg` | Register indices, control and interrupt bit positions, frame lengths, and the DMA request and telemetry configuration/status structs. |
| `dcb_clkgen` | Divides 24 MHz into the 8 MHz processor clock and the 1 MHz serial timing. |
| `dcb_timebase` | The 20-bit microsecond counter and its latch. Makes the 1 s tick, the timer tick, the F0 start and the guard window. |
| `dcb_bus_ctrl` | Processor bus: address latch, paging, override windows, wait states, data bridge, memory bus multiplexer. |
| `dcb_mem_decode` | Decodes a 22-bit physical address to chip selects and bus width. |
| `dcb_regs` | FPGA register file at processor I/O 1F80-1FFF. |
| `dcb_intc` | Interrupt latches and the two processor interrupt lines. |
| `dcb_summit_if` | Reset, DMA gating, DMA page and write protection for the 1553 chip. |
| `dcb_arbiter` | Seven-client bus arbiter and DMA cycle generator. |
| `dcb_cmd_ctrl` | Command queue reader and command/F0 serialiser. |
| `dcb_tlm_shift` | Per-instrument telemetry deserialiser and message framer. |
| `dcb_tlm_ctrl` | Per-instrument circular-buffer writer with error roll-back. |

The whole design runs on the 24 MHz clock. The 8 MHz and 1 MHz rates exist
only as enables, plus the two clocks driven off-chip: the processor clock,
and the instrument clock, which runs at 1 MHz with a 50 % duty cycle. The
8 MHz processor clock is high for one 24 MHz period in three (33/67).

## Memory map and paging

Physical memory as seen on the 22-bit memory address bus (byte addresses):

| Range | Device | Bus |
|---|---|---|
| 002000-003FFF | boot ROM, 8 KB (or an alternate boot device, see below) | 8 bit |
| 080000-0FFFFF | EEPROM, 256 KB; its image repeats above 0C0000 | 16 bit |
| 100000-1FFFFF | RAM bank 0 | 16 bit |
| 200000-2FFFFF | RAM bank 1 | 16 bit |
| 300000-3FFFFF | RAM bank 2 | 16 bit |

BUSWIDTH is low only for the boot ROM.

The processor's 16-bit address is turned into a physical one as follows:

- **Internal space.** 0000-03FF on data accesses is the processor's own
  register file. The FPGA selects nothing.
- **I/O space.** 1F00-1FFF on data accesses: 1F00-1F7F selects the 1553
  chip's registers, and 1F80-1FFF the FPGA registers.
- **Code fetches** (INST high) always go through page 0. Page 0 supplies
  physical bits [21:16], and the processor supplies [15:0].
- **Data accesses** pick page 0-3 from processor address bits [15:14].
  Pages 1-3 supply physical bits [21:14], and the processor supplies [13:0].
  (Page 0 behaves as for code.)

**EEPROM protection.** With control bit 6 clear, EEPROM writes are
suppressed. With it set, every EEPROM access, read or write, has READY held
low for `WAIT_CLKS` = 3 clocks (one processor state) at the start of the
strobe.

**Alternate boot.** A strap input (`sel_alt_boot_n`, low active) sends the
boot ROM select to a second output, `alt_rom_sel`. This lets a debug board
substitute its own boot device. `rom_on`, the boot ROM power switch, follows
the inverse of control bit 1.

## FPGA registers

The processor reaches the registers at 1F80-1FFF. The register index is
address bits [6:1]. All accesses are word accesses.

| Index (address) | Read | Write |
|---|---|---|
| 0 (1F80) | control | control: b6 EEPROM write enable, b5 1553 DMA enable, b4 command DMA enable, b3:2 timer rate 32/64/128/256 Hz, b1 boot ROM off, b0 1553 enable |
| 1 (1F82) | page 0 | page 0 [5:0] = physical [21:16] |
| 2-4 (1F84-1F88) | pages 1-3 | page n [7:0] = physical [21:14] |
| 5 (1F8A) | version (`VERSION`, default 03) | - |
| 6 (1F8C) | external diagnostic device (the FPGA does not drive the bus) | external diagnostic device; `diag_sel` is strobed |
| 7 (1F8E) | time register | time register (hours/minutes/seconds; sent in F0) |
| 8 (1F90) | latched counter [15:0] | any write latches the counter |
| 9 (1F92) | latched counter [19:16] | - |
| 10 (1F94) | interrupt enables [5:0] | interrupt enables |
| 11 (1F96) | latched interrupts: b5 command buffer overflow, b4 MSG_INT, b3 YF_INT, b2 command block done, b1 timer tick, b0 1 s tick | pulse register: b7 resets the FPGA, b5:0 clear the matching latch |
| 12 (1F98) | b15 command DMA busy, b14:8 buffer address | b15 starts command DMA, b14:8 = buffer physical [21:15] |
| 15 (1F9E) | b7 TERACT, b6 READY (1553 chip), b4:0 DMA page | b4:0 = 1553 DMA physical [21:17] |
| 16+8n (1FA0+16n) | telemetry n start page | start page [11:0] = physical [21:10] |
| 17+8n | telemetry n read pointer | read pointer [15:0] = word address [16:1] |
| 18+8n | telemetry n next-message start (word address) | - |
| 19+8n | b14:8 end page, b7 output enable, b6 enable, b2 framing, b1 timeout, b0 overrun error | b14:8 end page = physical [16:10], b7, b6; writing b0 = 1 clears the three error latches |

Unused indices read as zero. Writing bit 7 of the pulse register resets
every FPGA register and engine for one clock. The microsecond counter is the
exception: only the board reset clears it.

## Interrupts

Six events set latches in register 11. `EXTINT1` is the OR of the latches
whose enable bit in register 10 is set. `EXTINT` is the OR of the two latched
1553 interrupts (YF_INT, MSG_INT), and it has no mask. A latch is cleared
only by writing its bit to the pulse register. An event in the same clock as
the clear wins.

## Time base and the F0 sample command

The microsecond counter is 20 bits wide and wraps every 2^20 µs (about
1.05 s).

- **1 s tick.** Fires when the count reaches FFFFF.
- **Timer tick.** Fires when the low 15, 14, 13 or 12 bits are all ones,
  which gives 32, 64, 128 or 256 Hz.
- **F0 command.** Goes to all enabled instruments once per counter period.
  It is placed so that its parity bit is on the line during count FFFFF and
  its stop bit during count 0. The instruments can therefore use the
  command's end as a precise sample mark. The F0 frame starts at count
  2^20 - 26.

Each command frame, F0 included, has these fields:

| Field | Length |
|---|---|
| start bit (1) | 1 bit |
| command, MSB first | 24 bits |
| odd parity | 1 bit |
| stop bit (0) | 1 bit |
| **total** | **27 µs** |

The line idles low. F0's 24 bits are `F0` followed by the 16-bit time
register.

**Guard window.** Queued commands must never collide with F0. A new queued
frame is started only outside the guard window, which covers:

- the 26 counts before the F0 start,
- the F0 start itself,
- count 0.

A queued frame already on the line when the window opens has always finished
before F0 starts.

## Command queue

Software builds a list of 4-byte records in a 32 KB-aligned buffer:

- word 0 = `{command[7:0], mask[7:0]}`
- word 1 = `command[23:8]`

It then sets control bit 4 and writes register 12 with bit 15 set and the
buffer address.

The engine works through the list as follows:

1. It reads the records by DMA, two reads per record.
2. It sends each command to the instruments whose mask bit (4:0) is set.
   Commands go out back to back: the next record is fetched while the
   current one is shifting.
3. A record with an all-zero mask sends nothing for 26 µs. Software uses
   this to space commands.
4. Mask bit 7 (word 0 = `xx80`) ends the block. Busy clears and the "command
   done" interrupt is latched.
5. If the engine reads the buffer's last word before finding an end record,
   it latches the overflow interrupt and stops, without sending that record.

Clearing control bit 4 aborts the block. The frame on the line is completed.

## Telemetry buffers

Each instrument has its own pair of engines: a shifter and a buffer
controller.

### Shifter framing (`dcb_tlm_shift`)

The shifter samples its line at mid-bit.

- **Message boundaries.** Messages are separated by at least 17 zero bits.
  After enabling, the shifter first waits for such a gap.
- **Words.** A word is a 1 start bit followed by 16 data bits, MSB first.
- **Continuation.** A word followed by another start bit is part of the same
  message. A word followed by a zero is the message's last word.
- **Delivery.** A message's first word is released only when the second
  word's start bit is seen.
- **Framing error.** A message of only one word is reported as a framing
  error and not delivered.

### Buffer controller (`dcb_tlm_ctrl`)

The buffer lives in a 128 KB segment chosen by start page bits [21:17]. Its
bounds are set in 1 KB pages, from start page [16:10] up to and including
the last word of end page [16:10]. When it is enabled, the current address
and the next-message pointer both go to the buffer start.

For each word:

- The controller requests one DMA write at the current address.
- It then advances the current address, or wraps it to the buffer start
  after the last word.
- When a message's last word has been written, the next-message pointer
  moves up to the current address. Software may consume everything up to
  that pointer and then advance its read pointer.

Three errors are detected:

- **Overrun.** A word is due to be written where the read pointer is.
- **Timeout.** A new word arrives while the previous one is still waiting
  for the bus.
- **Framing.** Reported by the shifter.

Every error latches its flag and moves the current address back to the
next-message pointer. The message that was being written is thrown away, and
recording resumes with the next message. Software therefore never sees a
partial message.

To use a buffer:

1. Set its start page, end page and read pointer. The usual initial read
   pointer is the last word of the buffer.
2. Set enable (bit 6) and output enable (bit 7).

The buffer holds one word less than its size, because the read pointer's
word is never overwritten.

## Bus arbitration and DMA

Seven clients compete for the memory bus, in fixed priority:

1. the 1553 chip,
2. telemetry 0-4,
3. the command engine.

Any request raises HOLD. After HLDA the arbiter grants the highest
requester. If another request is waiting when that cycle ends, it runs a
second cycle in the same hold. This halves the processor's hold overhead. It
then drops HOLD and waits for HLDA to fall.

**FPGA client cycles.** An FPGA client's cycle is `DMA_CLKS` = 5 clocks
(208 ns). The address is valid for all five clocks and the strobe for the
middle three. On the last clock the client receives `done`, the read data
and the granted address + 1. That one shared incrementer serves all
clients.

**1553 chip cycles.** The 1553 chip is granted with `sum_dmag` and runs its
own strobes. Its cycle ends when `sum_dmack` has risen and fallen. Its
address is `{DMA page, chip address[16:1]}`. A DMA page outside RAM
suppresses its writes.

The 1553 request is recognised only when both the 1553 enable and the 1553
DMA enable bits are set.

**Bus load** at the specified rates:

| Source | Rate |
|---|---|
| 1553 traffic | every 20 µs |
| each telemetry stream (five) | every 17 µs |
| commands | two reads per 27 µs |

That is about 0.42 bus cycles/µs. The processor is expected to need about
0.65 µs to grant a hold. Even if every cycle paid that latency alone, DMA
would take roughly a third of the bus. In simulation, with all seven clients
running together and a 16-clock hold latency, HLDA is high for about 13 % of
the time. The 1553 chip waits at most about 1.1 µs for its grant, and no
telemetry word is ever late.

## Diagnostic outputs

These outputs go to the diagnostic connector:

- `dmareq[4:0]` and `cmddmareq`: the telemetry and command requests.
- `dmasel[2:0]`: the granted client number, 0 for the 1553 chip, 1-5 for
  telemetry 0-4, 6 for commands.
- `fpga_cs`: a processor access to the FPGA register window.
- `cstr`/`dstr`: the processor and DMA strobes.
- `sererrs`: the OR of all telemetry error latches.

## Where this design makes its own choices

The specification fixes the register map, memory map, paging rules, frame
format for commands, F0 placement, buffer pointer protocol, error rules and
arbitration order. The following points are not fixed there and were chosen
here:

- **Telemetry word format.** Start bit plus 16 data bits, MSB first, idle
  low. This matches the 17 µs-per-word figure. The low bit ending a message
  counts towards the 17-zero gap.
- **Command frames.** MSB first, idle low, exactly one stop bit. The F0
  payload is `{F0, time}`.
- **F0 after reset.** F0 frames are generated from reset on, without any
  register setup. Like every command, they reach only instruments whose
  output enable is set, and that bit is clear after reset.
- **Timer and guard windows.** The timer-tick bit selection and the exact
  extent of the guard window.
- **Interrupt sources.** All six latched sources can drive `EXTINT1`,
  through their enables.
- **EEPROM wait state.** With writes enabled, the wait state applies to
  reads as well as writes. It lasts 3 clocks.
- **Timing and handshakes.** The DMA cycle length, the client handshake,
  and the 1553 grant/acknowledge handshake.
- **Processor bus sampling.** The processor bus is sampled synchronously on
  24 MHz. Register writes take effect at the end of the write strobe.
- **Command queue details.** Command buffer overflow raises only the
  overflow interrupt, not "done". An abort finishes the frame on the line.
- **Telemetry recovery.** After an overrun, the controller retries at each
  new message. It does not wait for software to clear the latch.
- **Start page bits.** Start page bits [21:17] are ordinary register bits.
- **Version and spare reads.** The version number value is 03, and spare
  registers read as zero.

The version value, `DMA_CLKS` and `WAIT_CLKS` are parameters of the top.

## Simulating

Each module has a testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself, with a watchdog against
hangs. Any simulator with SystemVerilog-2017 and timing support works. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/dcb_pkg.sv rtl/*.sv \
          tb/tb_dcb_fpga.sv --top-module tb_dcb_fpga
./obj_dir/Vtb_dcb_fpga
```

Three testbenches cover the whole design:

**`tb_dcb_fpga`** runs the whole design end to end, with a 12-bit counter
and 8-bit timer so that several F0 periods fit in a short run. It models the
processor bus, memories, 1553 DMA and five instruments. It exercises, and
counts:

- boot and paged accesses,
- EEPROM protection and wait states,
- 1553 DMA,
- interrupts,
- queued commands, dead time, end of block and buffer overflow,
- guard-window deferral,
- F0,
- telemetry messages, wrap, overrun, timeout and framing errors,
- two-cycle holds,
- soft reset.

It fails if any of these never occurred.

**`tb_dcb_fpga_full`** uses the top with all defaults. It checks the
register interface and runs to the first F0 at count FFFFF, about 1.05 s of
simulated time (around half a minute of Verilator run time).

**`tb_dcb_fpga_load`** also uses all defaults. For 3.5 ms it runs every DMA
client at its specified rate:

- 1553 writes every 20 µs, with bursts at block start and end,
- continuous 8-word telemetry messages on all five lines,
- a 120-record command queue sent to all five instruments.

It checks that every word and command arrives intact and that no telemetry
error is raised. It also prints the measured bus share.

The block testbenches use smaller counters where the default period would
be too long to simulate.

## Not included

The processor, RAM, EEPROM, boot PROM, 1553 chip, oscillator and reset
circuitry, and the instruments are external parts. The testbenches model
just enough of them to drive the FPGA.
