# VME radar interface: PAL logic in SystemVerilog

This interface takes a stream of radar samples, keeps 16, 8, 4, 2 or 1 bits of
each, and packs them into 16-bit words. It writes each full word into one of
two FIFO channels. A companion board then moves the words onto the VME bus as a
bus master. It can move them as a block ("movem") transfer or one word at a
time. It tells the VME interface controller (VIC) when a block starts and ends,
and it raises an interrupt when a transfer is finished.

The original board was built from small programmable logic devices (PALs), each
described by a few Boolean equations. Here each PAL is one SystemVerilog
module, named after the part (`ripal00` … `ripal37`). There are three additions:

- `packer16` joins the four packer slices.
- `vme_radar_interface` wires the parts together.
- `ri_pkg` holds the shared mode and command encodings.

The FIFO memories, the VIC and the local processor are bought-in parts. They are
not modelled. Their pins are ports of the top.

## How the parts fit together

```
 sample ─► packer16 (4 × ripal00/01) ── fifo_wdata ─────────────────────► FIFOs (external)
 sample_clk ─► ripal09 word clock ── word_clk ─► ripal32 ── fifo_wclk ──►
                                                    ▲  │ EF/FF/HF, FFLtch
 local bus ─► ripal36 decoder ── ComWd ─► ripal35 command latch
               │ SoftFifoWrt ───────────────────────┘  │ Movem/WordX, SelCh, TestMode, CLR
               │ WrtAdr/WrtWC                          ▼
               │                         ripal31 transfer state machine (clk = ~udsack_n)
               │                           │ MvInit/MvExit/Inter      │ Master
               │                           ▼                          ▼
               │                        ripal30 VIC write         ripal33 strobes, FIFO reads,
               └─────────────────────────────────────────────────► channel alternation
                                                                      │ AdrClk
                                                                      ▼
                                                                   ripal37 address counter UA[7:2]
 stand-alone: ripal02 / ripal17 test pattern generators, ripal06 serial transmitter,
              ripal03 / 04 / 05 / 18 counters
```

Parts are connected where their equations share a signal name: Master, UBG,
CLR, SelCh1/2, PrCh1, TESTMODE, FFLtch, WrtAdr, WrtWC, SoftFifoWrt, AltAck,
Inter, MvInit and MvExit. The remaining links are this design's own choices:

- The command word strobe clocks the command latch.
- The selected channel's EF flag is the state machine's "FIFO empty" input.
- The board clear also clears the word clock generator.
- The word clock generator's pulse input is the inverted sample clock.
- The state machine advances on the falling edge of the local bus acknowledge
  `udsack_n`.

The test pattern generators, the serial transmitter and the four counters are
not tied to anything in any of the part descriptions. In the top they stand
beside the rest, with their own ports.

## Sample packing and the word clock

This is the least obvious part of the design. Four 4-bit slices make up the
16-bit word. Slice 0 (`ripal00`) holds `word[15:12]`. The three `ripal01`
slices hold the lower nibbles. All four share the mode `P[2:0]`. Each
`ripal01` has three inputs:

- `a`: its own nibble of the sample (used in 16-bit mode).
- `b`: the nibble two slices up (a shift by 8).
- `c`: the nibble one slice up (a shift by 4, 2 or 1).

Slice 0 always takes its new bits from the sample. With that wiring, each clock
shifts the kept top bits of the new sample in from the top of the word:

| P   | mode                   | word after a clock           | samples / word | word clock reload |
|-----|------------------------|------------------------------|----------------|-------------------|
| 000 | 16 bits, sign extended | `{{4{s[11]}}, s[11:0]}`      | 1              | 0                 |
| 001 | 8 bits                 | `{s[11:4], word[15:8]}`      | 2              | 1                 |
| 010 | 4 bits                 | `{s[11:8], word[15:4]}`      | 4              | 3                 |
| 011 | 2 bits                 | `{s[11:10], word[15:2]}`     | 8              | 7                 |
| 111 | 1 bit                  | `{s[11], word[15:1]}`        | 16             | 15                |
| other | unused               | 0                            | –              | –                 |

The oldest sample ends up in the lowest bits. The part descriptions fix the
mode table and the bit movements inside a slice. The slice-to-slice wiring and
the 12-bit sample width are inferred from them:

- Slice 0 replicates its input's top bit in 16-bit mode.
- The lower slices take their own nibble.

So the sample is taken to be a 12-bit two's-complement value. A different
sample width would change only `packer16`.

`ripal09` marks the word boundaries. It is a 4-bit down counter. When it reaches
zero (`rco`), it reloads with `{P2, P1·P0, P1, P0+P1+P2}`, which gives the
reload values in the table above. So `rco` is high on one clock in 1, 2, 4, 8
or 16. `gated_out = rco & in_clk & clr_n & en_gate` passes one pulse in that
clock, and that pulse is the FIFO write clock. `en_gate` is a flip-flop set by
the first clock after a clear. It keeps a write pulse from slipping out before
any sample has been packed.

Timing with `in_clk = ~sample_clk`, as in the top:

```
sample_clk  _|‾|_|‾|_|‾|_|‾|_     (8-bit mode, clear released before edge 1)
edge            1   2   3   4
word           s1  s2s1 s3 s4s3
rco          ‾‾|___|‾‾‾|___|‾‾
word_clk     ______|‾|_____|‾|     pulse in the low half after edges 2, 4
```

The pulse must fall inside the clock's stable half. If `in_clk` were the sample
clock itself, the falling `rco` would race the rising clock and let a glitch
through. How the original board drives that pin is not known.

`ripal32` chooses what clocks the FIFO. Normally that is `word_clk`. In test mode
(`test_mode_n` low) it is the software write strobe, so the processor can fill
the FIFO with known data.

## Command word

A write to the command register (local address UA[3:2] = 10) latches one
byte. The encoding is in `ri_pkg`. A field of 00 leaves its setting unchanged.

| bits  | 01                      | 10                    | 11                   |
|-------|-------------------------|-----------------------|----------------------|
| [0]   | assert board clear (`1`) | | |
| [2:1] | single word transfer    | block transfer        | transfers off        |
| [4:3] | channel 1               | channel 2             | alternate channels   |
| [6:5] | test mode off           | test mode on          | (no change)          |
| [7]   | clears the IPP latch (in `ripal36`) | | |

The clear (`clr_n` low) lasts until the acknowledge of the bus cycle releases it.
That is `ack_n` normally, or the board's own alternate acknowledge in test mode.
While the clear is active:

- the full-flag latch is cleared;
- the word clock generator is held;
- in alternate mode, channel 1 is preset as the first channel to read.

Reset (`res_n` low) has these effects:

- channel 1 is selected;
- test mode is off;
- transfers are off;
- the state machine returns to Null.

The state machine's interrupt state also drops the transfer mode, so every
transfer must be started again by a command.

## Transfer state machine (`ripal31`)

This is a Moore machine. Its clock is the local bus acknowledge, so it takes
one step per completed bus cycle.

| state      | code (rev 1) | output  | meaning                               |
|------------|--------------|---------|---------------------------------------|
| Null       | 000          | –       | idle                                  |
| MovemEnter | 101          | MvInit  | report "block starts" to the VIC      |
| DataXfer   | 001          | Master  | move data as bus master               |
| MovemExit  | 100          | MvExit  | report "block ends" to the VIC        |
| WrtInter   | 110          | Inter   | write the interrupt vector to the VIC |

The stop test is `stop = WCC | FifoEmp·FFLtch`. A transfer stops when the word
count is complete, or when the FIFO has run empty after it had once been full.

The moves between states:

- **Block transfer.** Null → MovemEnter → DataXfer. The machine stays in DataXfer
  while it is parked (no stop, no restart). A restart condition
  (`BoundaryX | FELtch`) goes to MovemExit → MovemEnter → DataXfer and re-opens
  the block. A stop goes to MovemExit → WrtInter → Null.
- **Single word transfer.** Null → DataXfer, which repeats while there is no
  stop. A stop goes to WrtInter → Null.

Two revisions of this machine exist. `REV = 1` (the default, the later one)
uses `FELtch` in the restart test. `REV = 0` uses `FifoEmp` there and swaps the
codes of MovemEnter and MovemExit (100/101).

The machine also drives two outputs:

- `ubr_n`: the local bus request. It is active in DataXfer while VBR is high,
  and in every reporting state, unless the board is being cleared.
- `cycle_clk`: the low half of the acknowledge clock, gated by the grant and
  the FIFO state.

Codes the machine never uses go to Null. That choice is this design's.

## Master cycles, VIC writes and the address counter

`ripal33` shapes each master cycle:

- **Strobes.** `uas_n` and `uds_n` go low on the rising `delay` edge. They are
  released when the acknowledge arrives.
- **Read strobes.** `rd_ch1_n` and `rd_ch2_n` read the current FIFO channel in
  the window `Master·Cycle·/Delay`.
- **Channel alternation.** In alternate mode, the current channel `ch1` toggles
  after each acknowledged master cycle. `qmas` is Master sampled at the end of
  the previous cycle.
- **Address and word-count clocks.** `adr_clk` and `wc_clk` clock the address
  and word counters. They tick once per cycle, or when the processor writes
  those registers.

`ripal37` counts the long-word address on UA[7:2] and drives it during master
cycles. It holds UA[1:0] low.

`ripal30` uses the same UA[7:2] lines to write a VIC register. While `reg_in` is
high it also selects the VIC (`uvic_n`):

- MvInit writes 0x20 to address 0xD4.
- MvExit writes 0x00 to address 0xD4.
- Inter writes 0x11 to address 0x80.

An assertion in the top checks that these two never drive UA[7:2] at the same
time.

## Slave register map (`ripal36`)

These accesses decode with FC1 low, VBG low and UDS low.

| access | UA[3:2] | strobe          | used by                              |
|--------|---------|-----------------|--------------------------------------|
| write  | 00      | `wrt_adr_n`     | address counter clock (`ripal33`)    |
| write  | 01      | `wrt_wc_n`      | word counter clock (`ripal33`)       |
| write  | 10      | command word    | command latch (`ripal35`)            |
| write  | 11      | `soft_fifo_wrt` | FIFO write in test mode (`ripal32`)  |
| read   | any     | `rd_status_n`   | status register                      |

The acknowledge (`ack0_n`, `ack1_n`, `alt_ack_n`) goes low on the rising edge
of `delay_slv`. It is released as soon as the access ends. `ipp_reg` is set by
a rising `ipp` edge and cleared by command bit 7.

## Stand-alone parts

- `ripal02` is an 8-bit test pattern generator. Its priority on a clock edge is:
  `toggle_n` low inverts every bit, else `ld_n` low loads, else `enp` counts up.
  `clr_n` clears it asynchronously, and `rco` is high at all ones.
  `ripal17` is the same at 4 bits, without `rco`, plus a buffer, an inverter and
  a 4-input AND/NAND.
- `ripal06` is the serial transmitter. After a clear, a 6-bit counter runs from
  0 to 49 and stops. Each two clocks form one bit cell:
  - the line toggles at the start of every cell;
  - it toggles again in mid-cell for a 1 (bi-phase mark coding; the part was
    labelled a Manchester transmitter);
  - `srclk` advances an external shift register once per cell.

  One run sends 24 bits, and `xmt_ready` rises 50 clocks after the clear.
- `ripal03`, `ripal04`, `ripal05` and `ripal18` are 8-bit counters with a
  synchronous load and the ENT/ENP enables of the 74x161 counter family.
  - `ripal03` counts down and has three-state outputs.
  - `ripal04` counts down and has an asynchronous clear.
  - `ripal05` counts up and has three-state outputs.
  - `ripal18` counts down, and its carry also needs ENP.

## Modelling conventions

- Bit 0 is the least significant bit everywhere. Some original pin lists number
  from 1.
- Signals ending in `_n` are active low.
- A three-state pin becomes a value output plus a drive-enable output (`_oe`).
  Nothing in the RTL drives `z`.
- The original parts used asynchronous sets and resets, and registers clocked by
  board signals (`udsack`, `delay`, `ipp`, `delay_slv`, derived strobes). The
  RTL keeps that structure. It is not converted to a single system clock, so
  simulation reproduces the original event ordering. Where both asynchronous
  controls of one register are active, the one the comments name wins. That
  choice is this design's.
- The full-flag memory in `ripal32` is a real set/reset latch (`always_latch`).
  On the original part it is a register whose clock is tied off.
- `word_clk`, `fifo_wclk` and `cycle_clk` are gated clocks, as on the board.
- Immediate assertions state three bus rules:
  - at most one state output of `ripal31` is active;
  - `ripal33` never reads both FIFO channels at once;
  - in the top, the VIC write and the address counter never drive UA[7:2]
    together.
- The preload and global output-enable pins of the registered PALs are not
  modelled.

## Where this departs from the original, or fills a gap

- **Slice wiring and sample width.** The wiring between packer slices and the
  12-bit sample width are inferred. See *Sample packing*.
- **Board-level links.** All wiring in `vme_radar_interface` beyond shared
  signal names is a reasoned guess. That covers the command latch clock, the
  word clock pulse input, which clear resets the word clock, and the state
  machine's FIFO-empty input.
- **Added resets.** `ripal31` has a power-up reset input (`por_n`). The original
  relied on the device's own power-up state.
- **Merged acknowledge registers.** The three identical acknowledge registers
  of `ripal36` are one register driving three outputs.
- **Operator misprints.** In the descriptions of `ripal03`, `ripal04` and
  `ripal18`, the XOR operator appears as `:+` or `:+ :`. It is read as XOR,
  as in the other counters.

## Files and simulation

- `rtl/ri_pkg.sv` holds the shared enums (packing modes, command fields) and
  `samples_per_word()`.
- `rtl/<part>.sv` has one module per part. `packer16` and `vme_radar_interface`
  are the assemblies.
- `tb/tb_<module>.sv` has one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

To run one testbench, for example the whole interface:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/ri_pkg.sv tb/tb_vme_radar_interface.sv --top-module tb_vme_radar_interface
./obj_dir/Vtb_vme_radar_interface
```

To lint a module: `verilator --lint-only -Wall -Irtl -y rtl rtl/ri_pkg.sv rtl/<module>.sv`.

The top has no parameters. The only parameters are `ripal02.WIDTH` (8),
`ripal06.STOP_COUNT` (49) and `ripal31.REV` (1). Their defaults are the
original values.

## What the testbenches establish

- **Block testbenches.** Each one compares its module with an independent
  reference model after every clock, under random stimulus. Small combinational
  parts are checked against every input combination instead. Directed checks
  add the following:
  - counter carries after the expected number of clocks;
  - the word clock period in each packing mode;
  - the transmitter's line code, decoded bit by bit, and its 50-clock run;
  - every transition of the state machine taken at least once, in both
    revisions.
- **End-to-end testbench.** `tb_vme_radar_interface` plays the processor, the
  bus and the sample source, and checks these mechanisms:
  - all five packing modes, word by word;
  - test-mode software writes;
  - the clear and its release;
  - channel select, alternation and the full-flag latch;
  - a block transfer that parks, restarts and stops on the word count;
  - a block transfer that stops on "empty after full";
  - a single word transfer;
  - all three VIC writes and the address count per cycle;
  - the IPP latch and the stand-alone parts.

  It counts each mechanism and fails if any never occurs.

The parts were checked against their equations, not against the original
hardware. The links between parts that the descriptions do not give (listed
above) are the least certain part of this design.
