# IDPU Data Controller Board FPGA

The Data Controller Board (DCB) is the processor card of the STEREO IMPACT
instrument data processing unit. A 16-bit microcontroller at 8 MHz talks to
the spacecraft through a MIL-STD-1553 chip and to five instruments (MAG,
SEP, SWEA/STE-U, STE-D, PLASTIC) through identical 1 Mbps serial links. One
FPGA sits between all of them. It does the following:

* It pages 4 MB of physical memory (RAM, EEPROM, boot PROM) into the
  processor's 64 KB address space, in four 16 KB segments.
* It places the FPGA's own registers in that address space.
* It makes the clocks, the 1 MHz and 1 Hz time base, the time latch and the
  processor interrupts.
* It receives the five telemetry streams and writes them into circular
  buffers in RAM by DMA. This never throttles an instrument, and blocks are
  dropped cleanly when a buffer fills.
* It sends commands from a list in RAM to the instruments. A time command
  goes to all of them at every 1 Hz tic, and the command channel keeps that
  slot clear.
* It shares the memory bus with the processor and with the 1553 chip's own
  DMA, using the processor's HOLD/HLDA (hold request / hold acknowledge)
  lines.

This repository holds that FPGA as synthesizable SystemVerilog. It also holds
testbenches that model the processor, the memories, the 1553 chip and the
instruments around it.

## Block structure

```
dcb_fpga (top)
 ├─ clk_div  u_cpu_div, u_us_div    24 MHz -> 8 MHz processor clock, 1 MHz serial clock
 ├─ timebase u_time                 20-bit µs counter, 16-bit seconds, 1 Hz tic, time latch
 ├─ int_ctrl u_int                  256/128/64/32 Hz timer interrupt, OR of 1553 interrupts
 ├─ mem_pager u_pager               page registers, PROM power, I/O window
 ├─ mem_decode u_dec                physical address, chip selects, bus-width flag
 ├─ io_regs  u_regs                 processor registers
 ├─ g_if[0..4]
 │   ├─ serial_rx    u_rx           telemetry deserializer
 │   └─ tlm_dma_chan u_ch           circular buffer pointers and DMA requests
 ├─ cmd_seq  u_cmd                  command list DMA, time command, slot guard
 ├─ cmd_tx   u_tx                   24-bit command serializer with 5-way steering
 └─ dma_arb  u_arb                  HOLD/HLDA, 1553 grant, channel priority, memory cycle
```

`dcb_pkg` holds the memory map, the register offsets, the DMA request struct
(`dma_req_t`) and the bus-master enum. The whole design runs on one clock:
the 24 MHz crystal. The slower rates are one-cycle enables, and `cpu_clk_o`
and `sclk_o` are square waves from the same counters.

## Memory map and paging

The physical address is 22 bits: an 8-bit **block** number (16 KB blocks)
and a 14-bit offset.

| blocks  | memory | notes |
|---------|--------|-------|
| 00–BF   | 3 MB RAM | `ram_cs[blk[7:6]]`: three 1 MB banks, each two 512Kx8 SRAMs, 16 bits wide |
| C0–CF   | 256 KB EEPROM | two 128Kx8, 16 bits wide |
| FC–FF   | 8 KB boot PROM | byte wide (`cpu_bus16_o`=0), repeats every 8 KB, only while PROM power is on |
| others  | none | reads return 0 |

**Data cycles.** Processor address bits 15:14 pick one of four page
registers. That register gives the block:
`phys = {page[a[15:14]], a[13:0]}`.

**Instruction fetches** (`cpu_inst`=1) all go through page register 0, which
names a 64 KB-aligned group of four blocks:
`phys = {page0[7:2], a[15:0]}`. So code can run from anywhere in its 64 KB
region, while data segments are remapped independently.

**Reset.** At reset, page 0 is FFh and the PROM is powered. The processor's
reset vector at 2080h therefore fetches from the PROM, whichever path the
cycle takes. The boot code turns on the EEPROM or RAM pages and may switch
the PROM off (CTRL bit 0) to save power.

**I/O window.** Processor addresses 1E00h–1E7Fh, just below 2000h, select
the FPGA registers in every cycle, whatever page 0 maps there. Memory is
masked: no chip select goes active.

## Registers

All registers are 16-bit words at even offsets from 1E00h. Reads are
combinational. A write takes effect on the clock edge of a one-cycle
`cpu_wr`.

| offset | name | contents |
|--------|------|----------|
| 00–06 | PAGE0–3 | 8-bit block number per segment |
| 08 | CTRL | [0] PROM power, [2:1] timer rate (0:256, 1:128, 2:64, 3:32 Hz), [3] timer interrupt enable |
| 0A / 0C | USEC | µs counter bits 15:0 / 19:16 (read only) |
| 0E | SEC | seconds counter |
| 10 / 12 / 14 | LUSEC lo, hi, LSEC | counters latched at the 1553 time command |
| 16 | WIN1553 | base block of the 1553 chip's 128 KB RAM window (bits 2:0 ignored) |
| 18 / 1A | CMDADDR | byte address of the command list, bits 15:0 / 21:16 |
| 1C | CMDCTRL | write [0]=1 starts the list. Read: [0] busy, [1] bad prefix seen |
| 1E | STATUS | [4:0] over-run per channel, [9:5] word lost per channel. Writing 1 to bit n clears both flags of channel n |
| 20h+10h·n | channel n | +0 BASE (KB), +2 CFG ([2:0] size code, [3] enable), +4 OUT, +6 IN, +8 WR, +A END (the last four read only) |

The document lists what the processor must read and program. The addresses
and bit positions are this design's choices.

## Telemetry channels: the circular buffers

This is the part with the most subtle behaviour.

**Buffer geometry.** A channel's buffer holds `512 << size_code` words, that
is 1, 2, 4 … 128 KB. It starts at `BASE` KB. The base is rounded down to a
multiple of the size, so the address is `{base_hi, ptr}` with no adder. All
pointers are **word offsets** inside the buffer.

**Line format.** Each telemetry word on the line is 18 bit times at 1 MHz:

1. a start bit (0);
2. a block flag (1 = first word of a block);
3. 16 data bits, MSB first.

The line idles high, and the receiver samples on the FPGA's 1 MHz enable.

**Pointers.**

* **WR**: where the next word goes. It advances after every DMA write.
* **END**: where the block now being received started.
* **IN**: where the most recent *complete* block starts. A block counts as
  complete when the first word of the next block arrives; at that moment IN
  jumps to END, and END to WR. The processor can process everything from
  OUT up to IN.
* **OUT**: written by the processor. It is the start of the oldest block not
  yet processed.

**Over-run.** Writing a word when `WR+1 == OUT` would catch up with OUT.
The channel then:

1. sets its over-run flag;
2. does not write the word;
3. puts WR back to END, the start of the block that was arriving;
4. discards every word until the next block flag.

Older data is never overwritten. The broken block is lost, and reception
resumes cleanly with the next block. Because a full buffer stops one word
short of OUT, `WR == OUT` always means empty.

**Enabling a channel.** After enabling, a channel ignores words until the
first block flag. Enabling loads WR, END and IN with 0. The processor should
set OUT=0 before enabling.

**Queueing.** Received words wait in a two-word queue for their DMA write.
A word that arrives with the queue full is dropped and sets the channel's
`lost` flag. At the default timing this cannot happen (see *DMA and the
bus*), but the flag shows it if the 1553 chip ever holds the bus for more
than about 36 µs.

## Command channel and the time slot

The processor does the following:

1. Builds a list of 32-bit entries in RAM. Each entry is two words:
   * word 0 = `{prefix[7:0], cmd[23:16]}`;
   * word 1 = `cmd[15:0]`.
2. Writes CMDADDR.
3. Writes 1 to CMDCTRL.

The sequencer then fetches entries by DMA. Prefixes 0–4 steer the 24-bit
command to MAG, SEP, SWEA/STE-U, STE-D or PLASTIC. FFh ends the list. Any
other prefix is skipped and sets the bad-prefix flag.

**Command frame.** Each command goes out on the selected line in this form:

1. a start bit (0);
2. 24 bits, MSB first;
3. a stop bit (1).

The frame takes 26 µs; the transmitter is busy for about 27 µs.

**Time command.** At every 1 Hz tic the sequencer sends `{C0h, SEC}` to all
five lines at once, where SEC is the seconds count that starts with that
tic. To keep the slot free, no list command is *started* once the
µs counter has reached `US_PER_SEC − GUARD_US` (999968). A command already
on the line always finishes before the tic. List processing resumes after
the time command.

## DMA and the bus

The five telemetry channels (writes), the command channel (reads) and the
1553 chip share the processor's memory bus.

When any of them asks, `dma_arb` raises `cpu_hold_o` and waits for
`cpu_hlda_i`. It then serves requests in fixed priority:

1. **The 1553 chip.** `b_dmag_o` is granted, and the chip runs its own
   cycles on `b_addr_i`/`b_rd_i`/`b_wr_i` until it drops `b_dmar_i`. Its
   16-bit word address is placed in the 128 KB RAM window set by WIN1553.
2. **Telemetry channels 0–4**, lowest number first.
3. **The command channel.**

A channel transfer is `MEM_CYC` (3) crystal clocks with `mem_rd`/`mem_wr`
high, followed by an acknowledge cycle. When nothing is pending, HOLD is
dropped, and the arbiter waits for HLDA to fall before asking again.

Bus load at the default timing:

* One word arrives every 18 µs per instrument.
* Five continuous 1 Mbps streams therefore need about 6 % of the bus.
* The two-word queue covers 36 µs of bus unavailability.

## Time base and interrupts

* **Time counters.** The 20-bit µs counter counts 0…999999. Its wrap is the
  1 Hz tic (`tic_o`), which also advances the 16-bit seconds counter.
* **Time latch.** The 1553 time command strobe (`b_time_i`) is asynchronous.
  After a two-flop synchronizer, its rising edge copies both counters into
  the latch registers 2–3 clocks later.
* **Timer interrupt.** It is a 1 µs pulse locked to the tic. A phase
  accumulator adds the rate on each µs and fires at each multiple of
  1 000 000. The pulses therefore fall at `ceil(k·10⁶/rate)` µs, with the
  first one at the tic itself. That is exactly 256, 128, 64 or 32 per
  second, even though 10⁶/256 is not an integer.
* **1553 interrupt.** The 1553 interrupt lines are synchronized and ORed
  into `cpu_int_1553_o`.

## Where this design follows the document and where it chooses

**Taken from the document:**

* the memory sizes;
* four 16 KB segments, and instruction fetch through the first page register;
* PROM power on and PROM mapped at reset;
* I/O just below 2000h, with memory masked there;
* the 20-bit and 16-bit counters, the 1 Hz tic and the asynchronous time
  latch;
* the four interrupt rates and the OR of the 1553 interrupts;
* 1 Mbps per instrument without handshaking;
* eight aligned buffer sizes;
* the block-in and output pointers, the over-run flag and dropping a block
  on over-run;
* the 32-bit command entries with an 8-bit prefix, the end-of-list prefix;
* the automatic time command and its protected slot;
* HOLD-based DMA shared with the 1553 chip.

**Chosen here, because the document does not give them:**

* **Serial framing.** The word and command frame formats are this design's own; the
  instrument link has its own interface specification. Only `serial_rx` and
  `cmd_tx` need to change to match it.
* **Physical block numbers** of the three memories.
* **Register addresses and bit fields.**
* **Codes and word order of command entries**: word order, FFh end code,
  C0h time opcode.
* **Guard length** (32 µs).
* **DMA priority and memory cycle length** (3 clocks).
* **Clocking.** The crystal is taken as 24 MHz, the oscillator the document
  prefers for the 1553 chip; it feeds that chip directly.
* **Processor bus.** It is modelled as a demultiplexed synchronous bus with
  one-cycle strobes. The real UT80CRH196KD bus is multiplexed, and its
  address latch and wait-state logic would be added around `cpu_addr`,
  `cpu_rd` and `cpu_wr`.
* **Synchronous logic.** The document would accept ripple counters to save
  power. This design is fully synchronous with clock enables. That is easier
  to verify, but does not save power.

**Not in this RTL** (parts bought, not designed):

* the processor;
* the UT69151 1553 chip;
* the memories;
* the 54AC14 line buffers;
* power supply, connectors and board.

The testbenches contain behavioural models of the processor bus, the
memories, the 1553 DMA and the instruments.

## Verification

Every block has a self-checking testbench in `tb/` (`tb_<block>.sv`). Each
ends by printing `TB_RESULT checks=N failures=M` and has a watchdog.

**`tb_dcb_fpga`** is the end-to-end test. It runs the top with a 4-clock µs
and 1000 µs "seconds" so that twelve tics fit in a short run. The shared
environment `dcb_tb_env` does the following:

* boots from the PROM, checks the I/O masking and the paging, and turns the
  PROM off;
* sets up five 1 KB buffers;
* streams back-to-back numbered blocks from all five instruments;
* drains channels 0–3 and checks every word and pointer;
* leaves channel 4 un-drained so that it over-runs;
* runs a 40-entry command list across several tics;
* runs 1553 DMA bursts and interrupts;
* switches the timer rate;
* latches the time.

It counts how often each of 17 mechanisms happened, for example buffer
wrap, over-run, guard hold-off, time command, 1553 DMA and rate switch.
Any mechanism that never happened counts as a failure.

**`tb_dcb_fpga_full`** runs the same scenario with every parameter at its
default: a 24 MHz clock and real 1-second tics, over 3 seconds. It takes
roughly a minute and a half in Verilator and makes about 3.7 million checks.

Two more tests run single blocks at full size:

* **`tb_tlm_sizes`** takes one channel through all eight buffer sizes, up to
  128 KB. Each size is placed at a misaligned base, wraps, and then
  over-runs. Every DMA write is compared with a model.
* **`tb_int_rates`** runs the timer interrupt with real 10⁶ µs seconds at all
  four rates. It checks the count per second, the position of each pulse and
  the pulse width.

To run a test with plain Verilator, for example the end-to-end one:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/dcb_pkg.sv \
    $(ls rtl/*.sv | grep -v dcb_pkg) tb/dcb_tb_env.sv tb/tb_dcb_fpga.sv \
    --top-module tb_dcb_fpga -o sim && ./obj_dir/sim
```

For a unit test, use the same command with that block's testbench as the
top. The package must come first. The testbenches use `#` delays and
`@(posedge clk)`, so `--timing` is required.

**Changing the design:**

* Sizes are parameters of `dcb_fpga`: `CPU_DIV`, `US_DIV`, `US_PER_SEC`,
  `GUARD_US` and `MEM_CYC`.
* The memory map and register offsets are in `dcb_pkg`.
* The serial formats live entirely in `serial_rx` and `cmd_tx`.
