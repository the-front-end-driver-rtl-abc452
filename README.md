# FED: front-end driver logic for a silicon strip tracker readout

The CMS silicon strip tracker sends its data off the detector as analogue
samples over optical fibres. Each fibre carries the output of a pair of APV25
readout chips: for every Level-1 trigger, a frame made of a short digital
header and then 2 x 128 strip pulse heights. A Front-End Driver (FED) card
digitises 96 such fibres at the 40 MHz LHC clock, which is roughly 3 GByte/s
of raw input at full trigger rate. It cuts that down to what a DAQ link can
carry by keeping only strips that belong to particle hits ("clusters"). What
is left is sent as one event per trigger over an S-LINK64 port, and the card
tells the central trigger control when it needs the trigger rate reduced.

This repository is the digital logic of such a card, in synthesizable
SystemVerilog. The analogue receivers and ADCs, the TTC receiver chip, the
QDR SRAM, the DAQ mezzanine card and the configuration devices are outside the
logic. Their signals are ports of the top module `fed_top`.

## Structure

```
fed_top
 ├─ vme_slave                   crate bus -> internal register bus
 ├─ fe_module x 8               one per 12 fibres (one front-end FPGA + 3 delay FPGAs)
 │   ├─ delay_fpga x 3          4 fibres each: sample alignment, spy memory
 │   ├─ fe_channel x 12         one fibre
 │   │   ├─ apv_frame_finder    finds a frame, reads the pipeline address
 │   │   ├─ channel_buffer      pedestal subtraction, reordering into strip order
 │   │   ├─ cm_median           median of 128 strips (common mode)
 │   │   ├─ cluster_finder      common mode subtraction, clusters, 8-bit bytes
 │   │   └─ sync_fifo           channel byte FIFO
 │   ├─ fragment_assembler      12 channels -> one fragment per trigger
 │   └─ link_tx                 4-bit link to the back end
 ├─ link_rx x 8                 receive FIFOs in the back end
 ├─ ttc_counters                event number and bunch crossing labels
 ├─ event_builder               8 fragments -> one FED event
 ├─ event_buffer_ctrl           circular event buffer in external QDR SRAM
 ├─ slink64_tx                  S-LINK64 sender
 └─ tcs_feedback                READY/WARN/BUSY/OOS/ERROR state, VME interrupt
```

`fed_pkg` holds the shared constants, types and the strip-order function.

## Clock and timing

Everything runs on one 160 MHz clock. `fed_top` derives `tick`, a strobe on
every fourth clock, which marks the 40 MHz sample of the LHC clock. ADC
samples and the TTC signals (`ttc_l1a`, `ttc_bc0`, `ttc_ecr`, `p0_trig`) are
taken on `tick`. `tick` is brought out so that the sources can line up with
it. The 4-bit links between the front-end modules and the back end move one
nibble per 160 MHz clock. Per-fibre adjustable ADC clock skew is not
modelled: samples are expected already aligned.

## How one fibre is processed

**The APV25 frame.** Both chips on a fibre put out their samples
interleaved: even samples come from APV 0, odd ones from APV 1. A frame opens
with a run of six high samples (three start bits per chip). Then come the
8-bit pipeline address, most significant bit first, and one active-low error
bit per chip. That makes 24 header samples, followed by 256 analogue samples.
Between frames the chips put out "tick marks": two high samples every 70
samples. The frame finder must not mistake these for a header. It
recognises a frame only from six high samples in a row above the per-channel
header threshold (`hdr_thr`, default 768 of 1023).

**Strip order.** An APV25 does not put out its strips in order. Output
sample n (0..127) of one chip belongs to strip
`32*(n%4) + 8*((n/4)%4) + n/16`, which `fed_pkg::apv_phys` gives as a bit
permutation. `channel_buffer` writes each incoming sample straight to its
physical place and subtracts the pedestal of that strip on the way. The
pedestals are 256 values per fibre, loaded over VME. The buffer has two
banks, so that one frame can be received while the previous one is being
processed.

**Common mode.** All strips of a chip move together with noise that is
common to the chip. This offset is estimated per chip as the median of its
128 pedestal-subtracted values. `cm_median` finds the 64th smallest value
without sorting. It is a 12-step binary search over the value bits: at each
step, 128 comparators count how many values lie below the trial value, and
the count decides the next bit. The result comes one clock per bit of the
value width, 13 clocks after the start.

**Clusters.** After the common mode is subtracted, a strip is kept if it is
above `high_thr`, or above `low_thr` with a neighbour on the same chip also
above `low_thr`. This keeps isolated large hits and groups of two or more
neighbouring moderate ones. Clusters do not run across the boundary between
the two chips. Defaults are low 8 and high 24 ADC counts; both can be set per
fibre. Each cluster is written as bytes: the first strip number (0..255), the
number of strips, and then one byte per strip. The pulse height is clipped to
0..255. That is one count per ADC count, which leaves room for about three
MIPs at the expected 80 counts per MIP.

**Raw mode.** With the module's mode register set to 1, no common mode is
subtracted and all 256 pedestal-subtracted strips are sent. Each takes two
bytes (upper bits first), in physical order. This is for low trigger rates,
for example heavy-ion running or commissioning.

## Data formats

All layouts below are this design's own; the published description of the card does not define them.

**Module fragment** (16-bit words, one per trigger and front-end module):

| word | contents |
|---|---|
| 0 | L, the number of words that follow |
| 1 | `{pipeline address [15:8], module id [7:4], raw, any APV error, address mismatch, any overflow}` |
| per fibre c | `{c [15:12], 8'h00, APV0 error, APV1 error, mismatch, overflow}` |
| | number of bytes n |
| | ceil(n/2) words, first byte in bits 15:8 |

The fragment assembler compares the pipeline address of every chip of the 12
fibres with that of fibre 0. All of them must agree in a synchronised
system; otherwise the fibre's mismatch bit and the fragment's mismatch bit
are set.

**Link.** The link is idle at nibble 0. A fragment starts with nibble 0xA,
followed by each word as four nibbles, most significant first. The receiver
uses word 0 to know where the fragment ends.

**FED event** (64-bit words on S-LINK64):

| word | contents |
|---|---|
| header | `{4'h5, 4'h0, event number [55:32], bunch crossing [31:20], 8'h00, FED id [11:0]}` |
| body | the fragments of modules 0..7 back to back, four 16-bit words per 64-bit word, first in bits 63:48, zero-padded at the end |
| trailer | `{4'hA, status [59:56], length in 64-bit words incl. header and trailer [55:32], pipeline address [31:24], module mismatch mask [23:16], 16'h0}` |

The status bits are `{module mismatch, APV error, overflow, raw mode}`. The
header and the trailer are sent with UCTRL# low.

## Back end

**Event building.** Each accepted trigger pushes its labels (24-bit event
number, 12-bit bunch crossing that wraps after 3564) into a 16-deep trigger
queue. For the oldest trigger, the builder writes the header and copies
modules 0 to 7 in turn from their receive FIFOs, one 16-bit word per clock.
It checks every module's pipeline address against module 0, and then writes
the trailer. The trigger source is the TTC input or, when control bit 0 is
set, the P0 test trigger.

**Event buffer.** Events go through a circular buffer in external QDR SRAM:
2^18 64-bit words, which is 2 MByte. The SRAM is used as a write port and a
read port with a 2-clock read latency. A small FIFO of event lengths lets the
reader send whole events. An output FIFO keeps room for every read still in
flight, so that the `LFF#` back-pressure of S-LINK64 can never lose a word.
`occupancy` counts the words held.

**Trigger throttling (TTS).** `tts` has these states, highest priority first:

| state | code | when |
|---|---|---|
| ERROR | 0xC | a link receive FIFO overflowed (sticky) |
| OOS | 0x2 | pipeline addresses disagreed (sticky) |
| BUSY | 0x4 | buffer above `busy_level`, a module full, trigger queue almost full, or a link FIFO too full for one more raw fragment |
| WARN | 0x1 | buffer above `warn_level`, or a module partially full |
| READY | 0x8 | otherwise |

ERROR and OOS last until a write to the clear-errors register. While either
holds and interrupts are enabled, `vme_irq_n` is driven low. The links have
no back-pressure, so the trigger source **must** stop on BUSY. Each busy
condition leaves room for the data of triggers already issued, assuming at
most one raw-mode event in flight. Sending raw events back to back while
ignoring BUSY overflows the link FIFOs. This is reported as ERROR.

## Configuration (VME)

`vme_slave` answers A32/D32 single read and write cycles (address modifiers
0x09 and 0x0D) addressed to its slot. The slot is the inverted geographic
address pins, `addr[31:27] == ~ga_n`. The card responds only when the parity
over `ga_n` and `gap_n` is odd. The 32-bit word address `addr[25:2]` drives
an internal register bus. Reads take a few clocks; DTACK* waits for them.

| addr[23:20] | addr[19:16] | addr[15:12] | low bits | register |
|---|---|---|---|---|
| 0..7 module | fibre 0..11, or 14 = all | 0 | strip [7:0] | pedestal (write) |
| | | 1 | [1:0] 0/1/2 | header / low / high threshold |
| | | 2 | sample [9:0] | spy memory (read) |
| | 15 | - | 0 | mode: 0 zero suppressed, 1 raw |
| | | | 1 | arm spy for N events (write) |
| | | | 2 | module status (read) |
| 15 | as above | | | the same write to all 8 modules |
| 8 | - | - | 0..8 | FED id, warn level, busy level, control `{irq_en, P0 trigger}`, clear errors (write), status `{irq_n, link overflow mask, TTS}`, events built, events sent, buffer occupancy |

**Spy memory.** Each delay FPGA keeps a copy of the raw samples of selected
events. After "arm spy N" (N up to 2), the next N frames seen on its first
fibre are each stored, for all four of its fibres. Each stored segment is
512 samples and starts 31 samples before the sample on which the frame was
recognised, so the whole header is included. The samples can then be read
over VME.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `fed_top.SRAM_AW` | 18 | event buffer address bits (64-bit words): 2 MByte |
| `fed_top.FIFO_DEPTH` | 1024 | bytes per channel FIFO (two raw frames) |
| `fed_top.LINK_DEPTH` | 4096 | words per link receive FIFO (one raw fragment is 3098) |
| `event_builder.TRIG_DEPTH` | 16 | pending triggers |
| `delay_fpga.SPY_EVENTS / SPY_SEG / SPY_PRE` | 2 / 512 / 32 | spy events, samples per event, samples kept before the frame |

The 96 channels, the 10-bit samples, the 2 x 128 strips, the 4-bit links and
the 2 MByte buffer are the real card's numbers. FIFO depths, spy sizes and
thresholds are this design's choices, sized to the block RAM of FPGAs of
that generation.

## Throughput at the defaults

- **Input.** A frame of 280 samples per trigger uses 28 of the 40 Msamples/s
  of a fibre at 100 kHz. The median (13 clocks per chip) and the cluster scan
  (about 256 clocks plus the kept strips) fit in the 1120 clocks of a frame.
- **Links.** A link carries 40 M words/s. At 3 % strip occupancy a module
  fragment is a few hundred words, well under the 400 words per trigger a
  link can carry at 100 kHz.
- **Raw mode.** One raw fragment is 3098 words per module. That limits raw
  readout to about 12 kHz per link, and the event builder (one 16-bit word
  per clock over 8 modules) to about 6 kHz.
- **Output.** The zero-suppressed output is about 50 MByte/s per percent of
  occupancy, 150 MByte/s at 3 %. That is below the 320 MByte/s of the event
  builder and the S-LINK64 sender's one word per clock.

## What is not built, or differs from the real card

- Analogue front end, ADCs, trim DACs, clock-skew DCMs, temperature
  monitoring and power control: not logic, or not described. Samples enter
  as 10-bit words.
- The link is single data rate at 160 MHz rather than a DDR interface.
- VME: no block transfers (D64/MBLT, 2eVME), no CR/CSR space, no interrupt
  acknowledge cycle. Only the request line is driven.
- S-LINK64: the sender's data path only; no test mode, link-down or return
  lines.
- The choice of clock source (on-board oscillator, P0 or VME clock) is left
  to the board. Test triggers from P0 are supported.
- Synchronisation is checked only inside the card: all 192 chips against
  module 0. The trailer carries the pipeline address, so it can be compared
  downstream. The partition-wide check, which compares against an expected
  address broadcast over TTC, is not built: the TTC broadcast data is not a
  port.
- VME is a slave only. There is no VME master or DMA, and events cannot be
  read out over VME; only the spy memory and registers can.
- Real-time header checks are limited to the APV error bits and the
  pipeline-address comparison. Tick-mark timing is not checked.

## Simulation

Every block has a self-checking testbench in `tb/`, named `tb_<block>`
(`tb_link` covers both link ends). Each prints
`TB_RESULT checks=N failures=M` and stops. `tb/tb_apv_pkg.sv` is the shared
reference model: frame generation with tick marks, pedestals, common mode,
the cluster rule and the expected byte stream. `tb/qdr_sram_model.sv` is a
behavioural SRAM. For example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_fed_top \
    rtl/fed_pkg.sv tb/tb_apv_pkg.sv tb/tb_fed_top.sv -y rtl -y tb +libext+.sv
obj_dir/Vtb_fed_top
```

`tb_fed_top` runs the whole card at its default sizes in about a minute,
including the build:

- It loads pedestals over VME and sends frames on all 96 fibres.
- It issues six triggers. Two are zero-suppressed, one of them with a fibre
  out of step; one comes from P0; three are raw, with S-LINK held full
  until the buffer passes its busy level.
- It compares every S-LINK word with events rebuilt from the reference
  model.
- It reads back the spy memory and the counters.
- It prints how often each mechanism occurred and fails if any never did.
