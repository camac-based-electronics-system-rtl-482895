# Proportional wire chamber hodoscope read-out (CAMAC, 1970 design) in SystemVerilog

A proportional wire chamber used as a hodoscope tells you *which wires fired*
during a short, externally generated gate. This design stores those hits and
turns them into a compact list of wire addresses for a 24-bit computer.

The wire signals (amplified and discriminated at the chamber, outside this RTL)
go to **octo-4-bit latch modules**: 8 wires per module, and for each wire four
latches, one per *event*. Up to four trigger gates arrive during a beam pulse.
Gate *e* stores the wires that are active while it is open into latch row *e*.
Sixteen latch modules sit in a CAMAC crate. Eight crates hang off one
**branch highway**, which has 8 data lines, a 9-bit word address (3 crate, 4
module, 2 event lines), Clear and S2. Between beam pulses an **interface
unit** walks through all 512 module words. It expands every set bit into a
12-bit wire address and packs two addresses per 24-bit computer word. Then it
clears the latches for the next pulse.

There are two interchangeable interface units:

* the **scanner** (scan-stop-read). It scans while the computer waits, and
  stops each time a word is ready.
* the **memory processor**. It scans on its own into a 64-word memory, then
  interrupts the computer and hands over the whole block.

Both are built here. A select input decides which one owns the highway.

## Wire addresses and computer words

A module word is addressed by `bh_addr_t = {event[1:0], crate[2:0], module[3:0]}`.
This is the 9-bit value on the branch highway. A single wire adds its bit
position inside the word:

```
wire address (12 bits) = {event[1:0], crate[2:0], module[3:0], wire[2:0]}
```

Computer words (24 bits):

| word | bits 23:12 | bits 11:0 |
|---|---|---|
| address word | first wire address | second wire address (0 if unused) |
| count / identification word | bit 23 = overflow, 22:8 = 0 | bits 7:0 = number of wire addresses (half-words) |

What each unit sends, in order:

* **Scanner:** address words, then the count word last.
* **Memory processor:** the identification word, then the address words, then
  one word of all zeros as a synchronisation check.

Wire addresses come in scan order: module fastest, then crate, then event.
Within a word they run from wire 0 to wire 7.

The field order in the address and the layout of the count word are choices
made for this RTL. The two-addresses-per-word packing, the half-word count and
the trailing zero word come from the original system.

## The scan and its two limits

`scan_address_counter` produces the 9-bit address. The crate and event fields
stop at two thumbwheel settings, `last_crate` (0-7) and `last_event` (0-3).
A scan therefore covers `16 x (last_crate+1) x (last_event+1)` module words.
Fewer crates or events mean a proportionally shorter scan.

The highway is a plain combinational path. The unit drives an address. The
crate controller whose thumbwheel `crate_no` matches the crate field raises
station line N for the module and puts the event on A1,A2. That latch module
answers F(0) (Read) on the dataway, and the controller gates the word onto the
branch data lines. All other crates drive zeros, so the branch data lines act
as a wired-OR. The unit samples the data in the last clock of each address
period, just before the address changes. This gives the lines the longest time
to settle.

## Scanner: scan, stop, read

All timing is in clocks of a 4 MHz clock (250 ns).

1. **Module scan, 2 MHz.** Each address is held for `MODULE_CYCLES` = 2
   clocks. On the second clock, an OR of the 8 data lines decides. If the word
   is zero, the counter steps on.
2. **Bit scan, 4 MHz.** If the word has ones, it is copied into a register.
   An 8-to-1 multiplexer then looks at one bit per clock.
3. **Packing.** Each one found is written as a 12-bit address into the next
   half of a 24-bit register (upper half first), and the half-word counter
   counts it.
4. **Stop and read.** When the register is full, scanning stops and `ready`
   rises. While `ready` is low, the computer sees "not ready". The computer
   takes `dout` and pulses `ack`. The bit scan then resumes at the next bit of
   the same module word.
5. **End.** The scan ends after the last address (end of wires), or when the
   half-word counter reaches `MAX_HALF_WORDS` = 128 (overflow). A half-filled
   register is sent next, with the lower half 0. The count word follows.
   `complete` (the skip-bus signal) then rises.

Scan time, excluding the time spent waiting for the computer:

```
2 x (module words) + 8 x (module words containing hits) + 1   clocks
```

An empty full scan is 1025 clocks, that is 256 us plus one clock.

## Memory processor: a pipelined scan into memory

This unit scans at 500 kHz, whatever the hits. Each address is held for
`BIT_CYCLES` = 8 clocks.

* **Pipelined strobe.** At the end of each period, the returned word goes into
  a data register. The address goes into a *delayed address register*.
* **Bit multiplexer.** During the next period, the multiplexer walks the data
  register one bit per clock. So the data under examination always belongs to
  the *previous* address on the highway. This is why the delayed register
  exists.
* **Writing.** The wire address `{delayed address, bit}` is always present at
  the memory input. A one pulses the write enable of the next 12-bit half of
  the 64 x 24 memory (`mp_memory`).
* **Memory address counter.** It counts half-words.
* **Overflow.** Writing stops after 63 words (126 addresses). A further hit
  sets the overflow flag. The scan itself runs to the end.
* **Flush period.** One extra period after the last address handles the last
  word.

The scan lasts `8 x (words + 1)` clocks: 4104 clocks = 1.026 ms for a full
scan. That is well inside the 2.78 ms between beam pulses.

Readout:

1. The count and overflow flag are kept in the identification register.
2. `irq` rises and stays high until the first word is read.
3. The computer reads, with the same `ready`/`ack` handshake, the
   identification word, then the stored words, then a zero word.
4. Readout reuses the memory address counter, now stepping a whole word at a
   time. If the count is odd, the unused lower half of the last word reads
   as 0.

The original memory is quoted both as 63 words and as 64 words. Here the array
has 64 words, and at most 63 of them hold addresses.

## Computer port, completion and reset

| signal | direction | meaning |
|---|---|---|
| `start` | in | begins a scan from idle |
| `ready` | out | `dout` holds a word |
| `ack` | in | the computer read it, one clock pulse while `ready`; checked by an assertion |
| `complete` | out | stays high after the last word |

Leaving `complete` resets the unit. It also sends one clock of Clear and S2
down the highway to every crate. A latch module resets only when Clear and S2
are high together.

There are two ways out of `complete`:

* **Automatic:** with `auto_reset` high, the unit leaves `complete` after one
  clock.
* **External:** otherwise it waits for `reset_req`. A `reset_req` also aborts a
  running scan, or clears the latches from idle.

## Module hierarchy

```
pwc_system                     top: 8 crates, highway, both interface units
├── camac_crate  x8            controller + 16 latch modules + dataway wired-OR
│   ├── crate_controller       crate-address compare, N/A decode, data gating
│   └── octo_4bit_latch  x16   8 wires x 4 events, F(0) read, Clear.S2 reset
├── branch_highway             wired-OR data, selects the unit driving commands
├── scanner                    scan-stop-read unit
│   └── scan_address_counter
└── memory_processor           off-line scanning unit
    ├── scan_address_counter
    └── mp_memory              64 x 24, two 12-bit write enables
pwc_pkg                        sizes, address structs, count-word function
```

Top-level parameters:

| parameter | default |
|---|---|
| `CRATES` | 8 |
| `MODULES` | 16 |

The scanner parameters are `MODULE_CYCLES` and `MAX_HALF_WORDS`. The memory
processor parameters are `BIT_CYCLES`, `MEM_WORDS` and `DATA_WORDS`. All
defaults are the original system's sizes and rates.

## How far the model goes

**Built as a synchronous model.** The original latches are cross-coupled gates,
set by 15-30 ns NIM gates. Here they are flip-flops on the 4 MHz system clock:
a hit counts when it and its gate are both high at a clock edge. The
nanosecond coincidence timing of the real latch is therefore not modelled.

**Positive logic for the buses.** The open-collector dataway and branch lines
are modelled as ORs. An undriven line reads 0.

**Not in the RTL.** These parts have no logic function of their own:

* wire amplifiers
* discriminators (the inputs are already digital hits)
* gate fanouts (here just wiring of the four gates to every module)
* line drivers and terminations
* power supplies
* trigger logic
* chamber test pulser

The computer is represented only by the handshake in the testbenches.

**Own choices, not from the original system:**

* the one-clock timing model
* the handshake and reset signals
* the address field order
* the count-word layout
* sending a half-filled last word
* reading an unused half as zero
* having both units present behind a select input

## Simulating

All RTL is in `rtl/`, testbenches in `tb/`. The package `rtl/pwc_pkg.sv` must
come first. Testbenches that compare whole word streams also need
`tb/pwc_tb_pkg.sv`. This package is a reference model: it works out, from a
512-word chamber image, the exact stream and scan time each unit must produce.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/pwc_pkg.sv tb/pwc_tb_pkg.sv tb/tb_pwc_system.sv --top-module tb_pwc_system
./obj_dir/Vtb_pwc_system
```

Every testbench ends with `TB_RESULT checks=N failures=M` and has a watchdog.
The testbenches are `tb_octo_4bit_latch`, `tb_crate_controller`,
`tb_camac_crate`, `tb_branch_highway`, `tb_scan_address_counter`,
`tb_scanner`, `tb_mp_memory`, `tb_memory_processor` and `tb_pwc_system`.

`tb_pwc_system` runs the whole system at full size with default parameters,
in a few seconds. It covers:

* beam pulses with one to four events
* scanner and processor read-outs, sparse and dense
* overflow in both units
* thumbwheel-limited scans
* automatic and external reset, each followed by an empty scan that proves all
  128 modules were cleared
* switching between the two units

It counts each of these mechanisms and fails if one never happens. The scanner
and processor testbenches also check the clock counts given above.
