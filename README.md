# MUCTPI: muon-to-Central-Trigger-Processor interface in SystemVerilog

The ATLAS Level-1 muon trigger splits its chambers into 208 sectors. In every
25 ns bunch crossing (BC), each sector reports up to two muon-track
candidates, and each candidate is tagged with the highest of six programmable
transverse-momentum (pT) thresholds it passed. The Central Trigger Processor
(CTP) does not want candidates. It wants six numbers: how many muons passed
threshold 1, 2, … 6 in this BC, each as a 3-bit count that saturates at 7.
It wants them within 200 ns (8 BCs) of the sector data arriving.

The catch is geometry. Trigger chambers overlap inside the barrel and at the
barrel/end-cap boundary, so one muon can show up in two sectors. Counting it
twice would turn single muons into fake di-muon triggers. The interface
must therefore remove these duplicates before it sums anything.

After a Level-1 Accept (L1A) from the CTP, the interface also has to:
- send the candidates of the accepted BC, sorted by pT, to the Level-2
  trigger as regions of interest (RoIs);
- send all candidates around that BC to data acquisition (DAQ);
- keep selected events for on-line monitoring;
- sustain all this at up to 100 kHz of L1As.

This repository holds synthesizable RTL for the whole interface. It also
holds self-checking testbenches for every block and for the complete system
at full size.

## Structure

```
muctpi_top
├── mioct  x16            octant module: 14 sector inputs each
│   ├── mioct_sector_input x14   edge select, test memory, alignment delay
│   ├── mioct_overlap_sum        BCID check, overlap removal, 6 counts
│   ├── mioct_readout            pipeline, L1A window, zero suppression, FIFOs
│   ├── mibak_token_slave        transfer-bus slave
│   └── ttc_counters             BC and event counters
├── mibak                 backplane: multiplicity sum, transfer bus, READY/BUSY/ERROR
├── mictp                 CTP interface: latched output, fast signals, own fragment
│   └── mibak_token_slave, ttc_counters
└── mirod                 read-out driver
    ├── mirod_token_master       collects fragments with a token
    ├── mirod_extract            headers + candidates, thresholds, sector map
    ├── mirod_sorter → mirod_rod_formatter   Level-2 RoI S-Link
    ├── mirod_rod_formatter                  DAQ S-Link
    ├── mirod_monitor                        monitoring FIFO + interrupt
    ├── mirod_analyser                       time-stamped bus/link recorder
    └── mirod_playback                       replays stored backplane cycles
```

`muctpi_pkg` holds the shared sizes, types and word layouts. `sync_fifo` is
the FIFO used throughout.

There are 16 octant modules. Each covers one octant in φ and one half in η,
so each sees 14 sectors: 4 barrel (BA31, BA32, BA01, BA02), 6 end-cap (EC46,
EC47, EC48, EC01, EC02, EC03) and 4 forward (FW23, FW24, FW01, FW02). That
gives 16 × 14 = 224 inputs for 208 sectors. The difference comes from the
two outer forward sectors of each octant, which feed two octant modules
each (8 × 2 = 16).

## The sector word

Each sector sends one 32-bit word per BC. `muctpi_pkg::sector_word_t`:

| bits  | field | meaning |
|-------|-------|---------|
| 31:29 | spare | |
| 28:16 | c1    | second candidate |
| 15:3  | c0    | first candidate |
| 2:0   | bcid  | low 3 bits of the BC number the sector logic saw |

Each candidate (`cand_t`, 13 bits) holds:
- `pt[2:0]`: the highest threshold passed, 1–6, with 0 meaning no
  candidate;
- `roi[7:0]`;
- `ovl[1:0]`: flags that the sector logic sets when the candidate lies in an
  overlap region. Bit 0 marks a barrel/barrel region and bit 1 a
  barrel/end-cap region.

This layout is this design's own choice. The published system fixes only
the word width and the two-candidate content.

## Counting without double counting (`mioct_overlap_sum`)

This is the core of the trigger path, and the part where this design had
to decide the most for itself. The published system states the goal and
the overlapping sectors, but not the rule. The rule implemented here is:

1. **Best flagged candidate per sector and region.** For each sector and
   each flag, take the highest-pT candidate that carries that flag.
2. **Barrel/barrel.** BA31/BA32 and BA01/BA02 overlap. If both sectors of a
   pair have a flagged candidate, the lower-pT one is not counted. On equal
   pT, the one in the second sector (BA32 or BA02) is dropped.
3. **Barrel/end-cap.** Each barrel sector overlaps a programmable set of
   end-cap sectors (`be_map`, 4 × 6 bits). The default is:

   | barrel | end-cap neighbours |
   |--------|--------------------|
   | BA31 | EC46, EC47 |
   | BA32 | EC47, EC48 |
   | BA01 | EC01, EC02 |
   | BA02 | EC02, EC03 |

   The barrel's best flagged candidate is compared with the best flagged
   candidate among its end-cap neighbours, and the lower is dropped. On
   equal pT the barrel candidate is dropped.
4. **Count.** For threshold k, count the surviving candidates with
   `pt >= k` and saturate at 7.
5. **BCID check.** If any sector's 3-bit `bcid` differs from the module's
   aligned BC counter, all six counts of this octant become zero for that
   BC, and an error counter advances.

Each removal step has its own enable bit.

Candidates are never removed across octants, because octants do not
overlap in φ. Overlaps inside a sector, and between end-cap and forward
sectors, are left to the sector logic upstream, as in the original system.

The logic is purely combinational, with one register at the output. The
prototype used SRAM look-up tables here. Changing the rule means editing
this one module.

## Trigger-path timing

| stage | module | clock edges |
|-------|--------|-------------|
| capture on the rising or falling edge, optional test memory, delay of 0–15 BCs | `mioct_sector_input` | 1 + delay |
| overlap and count | `mioct_overlap_sum` | 1 |
| saturating sum of 16 octants | `mibak` | 1 |
| latch towards the CTP | `mictp` | 1 |

A word sampled on edge n appears on `ctp_mult` after edge n + 4 + delay. The
delays exist to cancel different cable lengths, and the system has been
specified for spreads of up to 10 BCs. The 8-BC budget therefore holds as
long as the largest programmed delay is 4 or less. The full-system test uses
delays of 0–2 and sees exactly 6 edges.

For falling-edge capture, the word is first taken on the falling edge and
then re-registered on the next rising edge. The choice of edge is a
per-sector register bit (`EDGE`). In the original hardware, a TDC measures
the phase of each input to guide that choice. This RTL has no TDC.

Each sector input also has a 256-word test memory. When the sector's
`TEST` bit is set, the memory's content replaces the external data, so the
overlap and counting logic can be exercised with known words. Each octant
module keeps one play-back position for its 14 memories. The *test* fast
signal from the CTP restarts all of these positions at once, so every
module plays back in step: the BC after the signal plays word 0, the next
one word 1, and so on. Play-back wraps after 256 words. A candidate
stored in word 0 reaches the CTP output 6 edges after the test signal
enters, plus the sector's delay.

## Read-out path

### Octant fragment (`mioct_readout`)

All 14 aligned sector words and the BC number enter a 256-deep pipeline
every BC. An L1A refers to the BC `latency` BCs earlier. The window runs
from `win_pre` BCs before that BC to `win_post` BCs after it, each 0–2. A
formatter turns each queued L1A into a fragment in the read-out FIFO. The
backplane word is 36 bits, `{snbr[3:0], data[31:0]}`:

| snbr | data |
|------|------|
| 0xE header | `{mon, bcid[11:0], evid[18:0]}` |
| 0..13 (sector number) | the sector word, for each BC of the window in time order |
| 0xF trailer | `{err[3:0], 0, number of sector words[11:0]}` |

Details:
- With zero suppression on, sector words with both pT fields at zero are
  left out. The reader can still place every word in time, because each
  word keeps its own 3-bit BCID.
- Trailer `err[0]` means a window row was read less than 28 BCs before the
  pipeline would overwrite it. The data are then at risk.
- Trailer `err[1]` means an L1A was lost to a full queue.
- With monitoring on, the same fragment is also copied into a monitoring
  FIFO that is read through registers. The copy is skipped when the FIFO
  lacks room.

BUSY goes up in either of two cases:
- 3 L1As are waiting;
- the read-out FIFO has fewer than 144 free words.

### Transfer bus and token (`mibak`, `mibak_token_slave`, `mirod_token_master`)

The CTP interface and the 16 octant modules are slaves on one bus, chained
by a token. The CTP interface comes first, then octants 0–15. The
backplane forms these lines:

| line | formed as |
|------|-----------|
| READY | AND of all slaves (each is ready while it holds a complete fragment) |
| bus, data valid, ERROR | OR of the slaves (only the token holder drives) |
| BUSY | OR of all 18 modules |

The CTP's fast signals (BCR, ECR, L1A, the monitoring signal and the test
signal) are registered once in the CTP interface and broadcast to every
module, so that all modules see them in the same clock.

The read-out driver checks two conditions:
- READY is high;
- its own buffers can take a worst-case event.

When both hold, it sends the token. Each slave then sends its fragment, one
word per clock, starting two edges after it receives the token. It passes
the token on together with its trailer word. The last slave returns the
token to the read-out driver.

A slave raises ERROR in three cases:
- it gets the token with nothing to send;
- its fragment does not start with a header;
- its FIFO runs dry before the trailer.

The master's event error flags are:

| bit | meaning |
|-----|---------|
| 0 | ERROR line seen |
| 1 | token not back within 4096 clocks |
| 2 | header count differs from 17 |
| 3 | a word outside a header/trailer frame |

An erroneous event is flagged but processed normally, so the data flow
never stops.

### Read-out driver (`mirod`)

`mirod_extract` splits the collected words into two FIFOs:
- an **event header FIFO** holding the event number, BC number,
  multiplicities (from the CTP-interface fragment), monitoring flag and
  errors;
- a **candidate FIFO** holding every non-empty candidate.

Each candidate record carries:
- its sector, mapped through a programmable 224-entry table to an 8-bit
  geometric identifier (default `{octant, sector}`);
- its pT, RoI and overlap flags;
- its candidate index;
- its BC bits;
- an "in triggering BC" bit.

Separate pT thresholds apply to the first and second candidate positions.

A distributor hands each item to three branches in the same clock, and
only when all three can accept it:
1. **Level-2.** `mirod_sorter` keeps the candidates of the triggering BC
   in a register list sorted by descending pT. Equal pT keeps arrival order.
   It forwards at most `limit` (1–16) of them.
2. **DAQ.** Every candidate of the window, in arrival order. The order is
   octant, then BC, then sector, then candidate.
3. **Monitoring.** `mirod_monitor` selects events by five criteria, combined
   with AND or OR:
   - all events;
   - every n-th event;
   - a given BC number;
   - a given event number;
   - the monitoring flag.

   Selected events go into a 4096-word FIFO, read through registers. An
   interrupt fires at a programmable watermark, and events that do not fit
   are counted as dropped.

### Analyser (`mirod_analyser`)

For debugging the transfer protocol and the links, the read-out driver can
record one source in real time:
- the backplane transfer bus: READY, token out, token back, data valid,
  ERROR and the 36-bit word;
- or either S-Link: `lff`, `uwen`, `uctrl` and the data.

Only cycles in which a control line is active are stored. Each entry
carries a 16-bit time stamp counted from the moment capture was enabled,
so the waveform can be redrawn. A rising enable clears the 1024-entry
FIFO. Nothing is stored while the FIFO is full, so disable capture before
reading back. That keeps one unbroken record.

### Play-back memory (`mirod_playback`)

The read-out driver can be tested without octant or CTP modules. A
4096-entry memory holds backplane cycles, one per entry:
{ERROR, token back, data valid, READY, 36-bit word}. When `PBCTRL[0]` is
set, the memory drives the token master and the analyser in place of the
backplane inputs.

Writing `PBCTRL` with bit 1 set starts a replay. The replay uses the length
in bits 28:16 of that same write and puts out one entry per clock from
entry 0. The replay does not react to the token. The stored sequence must
therefore raise READY first and bring the fragments and the token return
at the cycles a real backplane would.

To load an entry, write its low 32 bits to `PBLO` (0x000F). Then write the
top 8 bits to 0x2000 + entry.

### Output event format (`mirod_rod_formatter`)

Both S-Link outputs use a ROD-style event. The Level-2 branch uses source
ID `SRCID` and the DAQ branch uses `SRCID | 1`.

| # | word |
|---|------|
| control | `0xB0F00000` (`uctrl` = 1) |
| 0–8 | `0xEE1234EE`, 9, `0x03000000`, source ID, run number, event number, BC number, 0, `{monitoring flag, errors}` |
| data | status word (the event's error flags), multiplicity word, one word per candidate |
| trailer | 1, number of data words, 0 |
| control | `0xE0F00000` (`uctrl` = 1) |

The candidate word is
`{00, in_trig, cidx, ovl[1:0], pt[2:0], sector_id[7:0], roi[7:0], bc[2:0], 0000}`.

Nothing is written while the link's `lff` (link full) is high. The
published system only says that the ATLAS ROD format is used. The
exact header constants here follow the usual ROD conventions, and any
consumer should check them against the format version it expects.

### CTP interface fragment (`mictp`)

`mictp` keeps its own 256-deep pipeline of `{BC number, multiplicity}`. For
each L1A it sends a three-word fragment:
- header;
- `{00, bcid, mult}`;
- trailer.

This is how the multiplicity that the CTP saw reaches the read-out.

## Registers

All modules share one simple register bus (`cfg_we`, `cfg_re`, `cfg_addr`,
`cfg_wdata`, `cfg_rdata`). It stands in for VME access, and reads are
combinational. `cfg_addr[20:16]` selects the module:

| select | module |
|--------|--------|
| 0–15 | octant modules |
| 16 | CTP interface |
| 17 | read-out driver |

The lower 16 bits are the module's own word address.

**Octant module.**

| address | register | contents |
|---------|----------|----------|
| 0x0000 | CTRL | [0] zero suppression, [1] monitoring copy, [2] BCID check, [3] barrel/barrel, [4] barrel/end-cap, [9:8] window before, [11:10] window after, [23:16] L1A latency |
| 0x0001 | EDGE | per-sector falling-edge select |
| 0x0002 | TEST | per-sector test-memory select |
| 0x0003 | BCOFS | BC offset of the aligned data |
| 0x0004 | BEMAP | barrel/end-cap map |
| 0x0005 | MONDAT | monitoring FIFO data |
| 0x0006 | MONSTAT | status; reading with `cfg_re` pops the FIFO |
| 0x0007 | BCERR | BCID errors |
| 0x0010 + s | DELAY | sector delays |
| 0x8000 \| s<<8 \| w | test memory | word w of sector s |

**CTP interface.**

| address | register |
|---------|----------|
| 0x0000 | L1A latency |
| 0x0001 | BC offset |

**Read-out driver.** See the header of `rtl/mirod.sv`. It covers the control
register, thresholds, monitoring criteria, watermark, source ID, run number,
the monitoring FIFO, the analyser, the play-back memory and the sector map.

Every BC counter in the system is cleared by BCR and wraps after 3564.
Each module compares its data against its counter minus a programmable
offset. This makes it possible to line up the octant data and the CTP data
for the same BC even though they reach the pipelines at different times.

## How far to trust it, and where it departs from the original

These parts follow the published system directly:
- the module set and the connections between modules;
- the sizes: 16 × 14 sectors, six thresholds, 3-bit saturating counts,
  32-bit sector words, a window of ±2 BCs;
- the fast signals: BCR, ECR, L1A, test and monitoring;
- READY as a wired-AND, and BUSY and ERROR as wired-ORs;
- the order of the token protocol;
- the header and trailer codes 0xE and 0xF, with the sector number in the
  top four bits of the bus word;
- the error behaviour: a zero multiplicity on a BCID mismatch, and a
  flagged but processed event on a transfer error;
- the features of the three read-out branches.

These are this design's own choices:
- the sector word layout;
- the exact overlap rule and tie-breaking;
- every fragment and record layout;
- FIFO and pipeline depths;
- the BUSY thresholds;
- the register maps;
- the ROD header constants.

Not implemented:
- the VME controller (replaced by the plain register bus);
- the TDC phase measurement and its JTAG access;
- the S-Link card itself, LVDS receivers, backplane transceivers and
  configuration Flash. These are electrical parts or bought-in parts.

Throughput: the read-out moves one 36-bit word per clock over the transfer
bus. A fully occupied 5-BC window is 16 × 72 + 3 = 1155 words, or about 1200
clocks. A 100 kHz L1A rate allows 400 clocks per event. So the full rate
holds for realistic occupancy with zero suppression, or for a 1-BC window.
Bursts beyond that are throttled through BUSY. In the full-system test, the
fourth of four back-to-back L1As is flagged with `err[0]`.

Synthesized with a generic flow, the top is about 51 k word-level cells,
146 k flip-flop bits and 5.2 Mbit of memory. Most of the memory is the
octant pipelines and the FIFOs.

Lint notes:
- Verilator reports `SYNCASYNCNET` on `rst_n`, because the concurrent
  assertions use it in `disable iff` while the flops use it as an
  asynchronous reset. This is harmless.
- A few unused-bit warnings remain where a field is wider than what one
  consumer uses.

## Simulating

Any testbench runs with plain Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/muctpi_pkg.sv tb/tb_muctpi_top.sv
./obj_dir/Vtb_muctpi_top
```

Each testbench ends with `TB_RESULT checks=N failures=M` and has a
watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_muctpi_top` | The whole system at default sizes (about 10 s). Every BC's CTP multiplicity against a reference, exactly 6 edges after sampling. Both S-Link streams word by word for 28 L1As, including a burst. Monitoring through registers. BUSY. BCID errors after a wrong delay. It counts each mechanism and fails if one never occurs: both overlap kinds, saturation, zero suppression, the Level-2 limit, link full, monitoring, BUSY, the overrun flag and test-memory play-back started by the test signal. |
| `tb_mioct`, `tb_mioct_*` | The octant module and its parts: edge choice, delays and test memory; overlap with hand-worked cases and random words; fragments, windows, zero suppression, BUSY and lost L1As. |
| `tb_mibak`, `tb_mibak_token_slave`, `tb_mictp` | The backplane logic, the bus slave protocol and errors, and the CTP interface. |
| `tb_mirod`, `tb_mirod_*` | The token master with its error cases, extraction, the sorter, the ROD formatter under random link-full, the monitor's criteria and watermark, the analyser's sources, time stamps and full stop, the play-back memory's timing and length, and the read-out driver as a whole, including the analyser and one event replayed from the play-back memory. |

Reading the testbench references: the reference models restate the rules
listed above. They confirm that the RTL implements those rules with the
stated timing. They cannot confirm that the rules match the original
hardware where that hardware's rules are not published, most of all the
overlap rule.
