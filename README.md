# RAIMM: a memory manager that moves data out of failing SRAM blocks

On-chip SRAM gets less trustworthy as supply voltage drops, temperature
rises, or a die lands in a bad process corner. RAIMM (Reliability Aware
Intelligent Memory Management) keeps some memory blocks in reserve and
watches sensor readings next to every block. When a block in use starts to
degrade, RAIMM copies its valid data into a healthy reserve block. It then
changes the address decoder so the same addresses reach the new block.
Software sees no change of address, and the processor only waits if it
touches one of the two blocks while the copy runs.

This repository holds synthesizable SystemVerilog for that subsystem:

- the RAIMM controller;
- a small DMA engine;
- a two-master AHB bus matrix with a remappable address decoder;
- the SRAM blocks.

It also holds a self-checking testbench for every module. The default size
has six 16 KB blocks of 32-bit words. Four are in use (M0-M3) and two are
redundant (M4, M5).

```
            APB (pclk)                     AHB (hclk)
 CPU ──────────────┐      CPU ───────────────────────────┐
                   ▼                                      ▼
            ┌─────────────┐  LOCK, REMAP, pair   ┌──────────────────┐
 sensors ──►│    RAIMM    │─────────────────────►│ secondary bus    │──► M0
 (P,V,T per │  (raimm)    │  AHB master          │ matrix           │──► M1
  block)    │             │────────┐             │ (region → block  │ ...
            └──────┬──────┘        ▼             │  table)          │──► M5
                   │ irq     ┌───────────┐ AHB   │                  │
                   ▼         │ RAIMM DMA │──────►│ master 1         │
                             └───────────┘       └──────────────────┘
```

## Reliability status of a block

Each block has four sensor readings, carried in the `pvt_t` struct:

| field | unit |
|---|---|
| supply voltage | mV |
| temperature | 0.1 °C |
| nMOS process corner | 0.1 σ |
| pMOS process corner | 0.1 σ |

The sensors themselves are analog and outside this RTL. Their readings are
ports of the top.

`raimm_rel_template` holds the *reliability template*. It is a ROM with a
"green" (reliable) band and a "blue" (marginal) band for each quantity.
Anything outside both bands is "red". The ROM is loaded by `$readmemh` from
`rtl/raimm_rel_template.hex`, so another technology needs only a new table.
The default values are for a 40 nm memory:

| quantity | green | blue |
|---|---|---|
| voltage | 1020-1320 mV | 980-1019 mV |
| temperature | 0.2-90.0 °C | 90.1-124.9 °C |
| nMOS corner | -2.0..0 σ | -3.0..-2.1 σ |
| pMOS corner | 0..2.0 σ | 2.1..3.0 σ |

`raimm_rel_compute` (one per block) turns readings into a status in two
registered stages:

1. **Colour.** Each reading is coloured against the template. The process
   colour is the worse of the nMOS and pMOS colours.
2. **Rules.** Any red reading gives **Unreliable** (UR, code `010`).
   Otherwise a blue voltage gives **Less Reliable** (LR, `001`). Otherwise
   the status is **Reliable** (R, `000`). A blue process or temperature
   reading alone does not lower the status.

Higher codes are always worse, so later logic compares codes as numbers.
Only this three-level rule set is built. The 3-bit code has room for the
five- and seven-level schemes that RAIMM is meant to support, but their
rule tables are not defined.

`raimm_mem_reg` (one per block) latches the status every clock while RAIMM
is enabled. It also keeps the block's access profile:

- **read counter 1** counts processor reads of the block;
- **read counter 2**, the profiling count, steps each time counter 1 reaches
  the prescaler value, and counter 1 then clears;
- the **warning counter** counts reads made while the block is not Reliable.

The counters saturate.

## Ranking, and which blocks are swapped

`raimm_ranking` sorts the blocks into a ranking table:

- a worse status first;
- then a higher profiling count;
- then the lower index.

It does this with N×N pairwise compares in one clock. The table is
registered and frozen while a remap is in progress.

The controller looks at the best-ranked **usable** block (use bit = 1). If
that block is LR or UR, it is the source. The destination is a redundant
block (use bit = 0) whose status is R. If there are several, the one with
the highest block index is taken; the reference test sequences always pick
so, for example M5 before M4. If no redundant block is Reliable, nothing is
moved. Bit 31 of the interrupt register is set instead, and the controller
tries again as soon as a redundant block recovers.

After a remap the two blocks trade roles. The degraded block becomes
redundant and takes over the reserve block's address region. Its status can
later return to R, and it is then a valid destination again.

## The trigger: S0_IDLE … S4_USRU

`raimm_trigger` is the controller:

| state | stays | does |
|---|---|---|
| S0_IDLE | until an alarm has a destination and the previous update's acknowledge has dropped | ranking live; captures the source/destination pair |
| S1_RU | 1 clock | the remap module loads source address, destination address and size |
| S2_DT | until the DMA's transfer complete | LOCK high; the remap module programs the DMA, then the DMA copies |
| S3_REMAP | 1 clock | REMAP pulse: the bus matrix swaps the two blocks in its table |
| S4_USRU | until the update acknowledge | asks the register module to swap the use bits, source addresses and data sizes of the pair |

LOCK is high from S2 to the end of S4. An alarm raised while a remap is
running is not lost. The status stays latched, and the next remap starts a
few clocks after the controller returns to S0. This is the *queued remap*.

## Two clocks: register module and synchronisation

The processor programs RAIMM over APB. `raimm_regs` runs on `pclk`; the
rest runs on `hclk`. In the reference system `pclk` is half of `hclk`, but
nothing relies on the ratio. `raimm_sync` makes every crossing with
`raimm_bus_sync`:

- two synchroniser flops;
- an output register that accepts a value only when both flops agree, so a
  bus caught while changing is never passed on torn.

Two buses cross:

- **hclk → pclk:** the status vector, the "no reliable redundant block"
  level, and the update request with its block pair. The APB side turns the
  request's rising edge into one `upd_pulse` and raises its acknowledge on
  the same edge.
- **pclk → hclk:** the acknowledge travels in one word with enable,
  prescaler, use bits, source addresses and data sizes.

The trigger therefore sees the acknowledge in the same cycle as the swapped
registers. It cannot pick the same pair again from stale use bits. This is
why S0 also waits for the acknowledge to fall.

The handshake is four-phase: request held until acknowledge, then both drop.
It costs about ten hclk cycles per remap. It relies on the crossed buses
changing rarely: register writes and status changes, not every cycle.

## Moving the data: remap module and DMA

`raimm_remap` holds the three remap registers: source address, destination
address and data size. In S1 it captures them from the chosen pair's
registers. It then writes the DMA's registers with four pipelined AHB-Lite
word writes. With a zero-wait slave this takes 5 clocks:

| offset | register | value |
|---|---|---|
| 0x00 | source | source address |
| 0x04 | destination | destination address |
| 0x08 | control | size in words (rounded up from bytes) and burst code 1 (4 beats) |
| 0x0C | configuration | bit 0 = 1, which starts the copy |

`raimm_dma` is a single-channel memory-to-memory engine:

- it reads one burst into a local buffer (INCR4, or INCR/SINGLE for a short
  tail), then writes it out;
- a 4-beat burst costs 5 clocks to read and 5 to write;
- `tc` pulses once after the last write.

The DMA register layout is this design's own. The original system used a
commercial DMA controller. This engine does not overlap reads with writes.

## The secondary bus matrix: LOCK, stall and re-decode

`raimm_bus_matrix` connects two masters to the blocks:

- master 0: the processor;
- master 1: the DMA.

The address window is cut into regions A0…A(N-1) of one block each, with
region j at `BASE_ADDR + j*16 KB`. A table says which block serves each
region; after reset Aj is served by Mj. A REMAP pulse swaps the two blocks
of the pair in the table. The DMA addresses memory through the same
regions, which is why the source address registers hold region addresses
and are swapped after each remap.

While LOCK is high, a processor transfer whose region maps to either block
of the pair is held in its data phase with HREADY low. Other blocks answer
normally. When LOCK drops, the held transfer is decoded again with the new
table. The processor therefore finishes the same address on the new block,
which already holds the copied data.

Other details:

- Reads are issued in the address phase when possible, so pipelined reads
  have no wait states.
- Writes complete in the data phase.
- Addresses outside the window get a two-cycle ERROR response.
- The DMA is never held. Assertions check that the two masters never use
  one block in the same cycle.

## Register map (APB, byte offsets)

| offset | register | notes |
|---|---|---|
| 0x000 | configuration | bit 0 enables RAIMM |
| 0x004 | prescaler | bits [9:0]; 0 acts as 1 |
| 0x008 | control | stored, no function |
| 0x00C | interrupt enable | bits [N-1:0] and 31 |
| 0x010 | memory status | 3 bits per block, M0 in [2:0]; 0x014 holds blocks 10-15 |
| 0x020 | interrupt | bit i: block i got worse and is LR/UR; bit 31: alarm with no reliable redundant block; write 1 to clear |
| 0x100 + 4i | source address of block i | swapped by hardware after a remap |
| 0x200 + 4i | valid data size of block i | bytes, bits [9:0]; swapped after a remap |
| 0x300 | use register | bit i = 1: block i in use; swapped after a remap |

Other details:

- `irq` is the OR of the enabled interrupt bits.
- APB has no wait states.
- An unmapped offset reads 0 and sets PSLVERR.
- Software sets up the addresses, sizes and use bits, then sets enable.

## Timing

Measured at hclk with zero-wait memories, from the end-to-end testbench:

| step | this RTL | reference design |
|---|---|---|
| sensor change → status register | 3 clocks | 4 |
| sensor change → first DMA register write | 7 clocks (6 if the block was already ranked first) | 7 |
| DMA programming | 5 clocks | 9 |
| copy, W words at burst 4 | 10·⌊W/4⌋ + 2·(t+1) for a tail of t words, plus 1 | bus-dependent |
| transfer complete → REMAP | 1 clock | — |
| transfer complete → IDLE, registers updated | 12-13 clocks | 13 |
| 200-byte remap, sensor change → IDLE | ~151 clocks | ~152 (916 ns at 6.024 ns) |
| 4 KB remap, sensor change → IDLE (`DSR_W` = 13) | 2585 clocks | 2330 (worst-case estimate) |

## Where this RTL departs from the reference design

- **DMA.** The reference used a commercial DMA controller with separate
  read and write masters working in parallel. Here a simple engine
  alternates reads and writes, and its register layout is this design's
  own. Programming it takes 5 clocks instead of 9. A 4 KB move would take
  2561 copy clocks and 2585 clocks in all, against the reference's 2330
  worst-case estimate.
- **Data size register.** Its 10-bit field, as the register description
  gives it, holds at most 1023 bytes. The worst-case estimate assumes 4 KB
  of valid data, which this register cannot express. The register
  description was followed: the field width is the parameter `DSR_W`,
  10 by default. Set it to 13 or more to move a full 4 KB.
- **Rule sets.** Only the three-level rule set exists.
- **Ranking.** Ranking by critical-data priority is not built.
- **Unmapped counters.** Read counter 1 and the warning counter have no
  register offsets, so software cannot read them.
- **Interrupt clearing.** The reference says software can only clear
  interrupt bits, not how. Here a written 1 clears a bit.
- **Control register.** It has no defined bits.
- **Status latency.** The status register updates 3 clocks after a sensor
  change, not 4.

## Modules

| file | role |
|---|---|
| `raimm_pkg` | status codes, template and sensor structs, register offsets, AHB constants |
| `raimm_top` | the subsystem: RAIMM, DMA, bus matrix, N SRAM blocks |
| `raimm` | the controller IP, with everything below except DMA, bus matrix and SRAM |
| `raimm_rel_template`, `raimm_rel_compute`, `raimm_mem_reg` | status path per block |
| `raimm_ranking`, `raimm_trigger`, `raimm_remap` | decision and DMA programming |
| `raimm_regs`, `raimm_sync`, `raimm_bus_sync` | APB registers and clock crossings |
| `raimm_dma`, `raimm_bus_matrix`, `raimm_sram` | data movement and memory |

Top parameters:

| parameter | default |
|---|---|
| `N_MEM` | 6 |
| `DSR_W` | 10 (width of the data size registers) |
| `MEM_WORDS` | 4096 |
| `BASE_ADDR` | 0 |
| `TEMPLATE_FILE` | `"rtl/raimm_rel_template.hex"` |

`TEMPLATE_FILE` is a path relative to the directory the simulator runs in.

## Simulating

Every module has a testbench `tb/<module>_tb.sv`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog. Run them from the
repository root, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/raimm_pkg.sv \
    tb/raimm_top_tb.sv --top-module raimm_top_tb -Mdir obj_top
./obj_top/Vraimm_top_tb
```

`raimm_top_tb` runs the full default configuration in a few seconds. It
replays four sensor scenarios:

1. single remaps M1→M5, then M0→M4 (the unreliable M0 outranks the less
   reliable M3), then M3→M1 once the reserves recover;
2. an alarm raised during a copy is queued and served afterwards;
3. an unreliable block with no reliable reserve raises the interrupt and
   moves nothing, until a reserve recovers;
4. 200 bytes per block with the processor reading region A0 throughout. The
   processor stalls while A0's block is copied, twice, and then continues on
   the new block. A remap of another region does not stall it.

`raimm_top_4k_tb` runs the 4 KB worst case with `DSR_W` = 13. The
processor reads A0 while the 1024 words of A0's block are moved. The
testbench checks each phase and prints the total latency.

After each step the testbench checks:

- the region table;
- the valid data in regions A0-A3;
- registers and interrupts;
- the latencies above.

It also counts remaps, stall cycles, interrupts, queued remaps and "no
reliable reserve" alarms, and fails if any of them never happened.

The block testbenches compare each module with an independent reference
model under random stimulus, with random wait states for the DMA and remap modules.
`raimm_sync_tb` also runs with an unrelated clock ratio.

## How far to trust it

- All modules pass lint and elaborate in two front ends, with no latches.
- Every testbench passes when registers start at random values.
- A deliberately broken copy of each module makes its testbench fail.
- Only six blocks and word-wide AHB transfers were simulated.
- The clock-domain crossings were simulated at two clock ratios but not
  formally checked.
- No timing closure or area numbers exist.
