# SP02 Sector Processor interface logic

The SP02 is the Sector Processor board of a muon track-finder crate for the
cathode strip chambers (CSC). It receives track segments (LCTs) from the
Muon Port Cards (MPC) over optical links, finds tracks in a Main FPGA and
sends the best three muons per bunch crossing to the Muon Sorter (MS). On a
Level-1 Accept (L1A) it reads its inputs and outputs back from a pipeline
and sends them to the DDU readout board. A VME bus configures it. The Clock
and Control Board (CCB) distributes the clock, bunch-crossing resets, L1As
and commands. Four Fast Monitoring (FM) lines report whether the board can
take triggers.

This repository holds the logic around the track finder, i.e. every
interface of the board:

| Interface | What the logic does | Module |
|---|---|---|
| VME (P1/J1) | A24D16 slave, GA/chip/register decode, broadcast writes | `vme_slave`, `sp_regs` |
| CCB | bunch counter, L1A counter, BC0, commands, local-mode trigger | `ccb_rx` |
| MPC links | alignment FIFOs, BC0/BX0/SE validation, synch error counting | `align_fifo`, `mpc_sync_check` |
| L1A readout | pipeline delay, event queue, DDU frames, WOF | `l1a_pipeline`, `ddu_formatter` |
| FM | RDY/BSY/WOF/OSY, ERR coded as RDY = BSY = 1 | `fm_status` |
| Muon Sorter | three muons in two 32-bit frames at 80 MHz | `ms_tx` |

`sp02_top` wires them together. The track finder (Main FPGA and its PT
LUT) and the DT interface are not included. Their signals are ports of the
top: `main_lct`/`main_valid` out, `trk_mu`/`trk_valid`/`osy_main` in, and
`dt_lct` out.

## Data flow

```
 MPC link i ──► align_fifo ──► mpc_sync_check ──┬──► main_lct[i]  (Main FPGA)
 (8 links)      (wait for      (BC0/BX0/SE,     ├──► dt_lct[i]    (ME1 links → DT)
                 Alignment_     VP clear, count, └──► l1a_pipeline ◄── muon word
                 FIFO_Read)     OSY)                      │
                                                          ▼
 CCB ──► ccb_rx ── bxn, BC0, L1A#, cmds ──────────► ddu_formatter ──► DDU link
            └── SP_RESERVED[0] local trigger             │ WOF
 VME ──► vme_slave ── CE*[0] ─► sp_regs                  ▼
                  └── CE*[7:1] ─► ports      fm_status ──► RDY BSY WOF OSY
 Main FPGA muons ──► ms_tx ──► 2 x 32 bits @ 80 MHz ──► Muon Sorter
```

Everything runs on the 40 MHz LHC clock `clk`, one clock per bunch
crossing. Only `ms_tx` also uses `clk80`, which must have its rising edges
on those of `clk`.

## Keeping the links in time

This is the part that needs the most care when integrating or testing the
design.

**The MPC word.** Each link delivers one LCT per crossing as two 16-bit
frames. `sp02_pkg::lct_t` holds them as one 32-bit word, frame 1 in bits
31:16:

```
frame 1: VP | Quality[3:0] | CLCT pattern #[3:0] | Wire group[6:0]
frame 2: CSC ID[3:0] | BC0 | BX0 | SE | L/R | CLCT pattern ID[7:0]
```

The design takes the link as delivering both frames of a crossing together.
How the link serialises them is not covered here.

**Alignment.** The links arrive with different delays. Each link writes
into its own `align_fifo` while its optical receiver reports signal detect.
No FIFO is read until the common Alignment_FIFO_Read pulse. That pulse
comes from CCB command `0x04` or from VME command register bit 1. From
then on every FIFO gives one word per clock, so all links leave in step.
The number of words a FIFO holds at that moment sets the link's delay.
`flowing` goes high once words come out.

**Validation** (`mpc_sync_check`, one per link, one clock of latency).
The board's bunch counter `bxn` (0..3563) is compared with each word as it
leaves the FIFO:

- **BC0.** The word's BC0 flag, and the CCB's BC0, must be set exactly
  when `bxn` = 0. A mismatch of either marks the current word and every
  later word with SE=1. The mark is sticky until a reset.
- **BX0.** The BX0 bit must equal `bxn[0]`. A mismatch sets SE=1 on that
  word only.
- **SE.** A word with SE=1, received or set here, gets VP=0 when the VME
  bit `CTRL[0]` is set (the default). On ME1 links (`ME1_LINKS`, links 0
  and 1 by default) the copy sent to DT also gets Quality=0.
- **Counting.** Every received word with SE=1 increments a saturating
  16-bit counter, readable over VME. OSY is raised while the count is above
  the VME threshold.

**Timing you must meet.** Number the clock periods by the rising edge
that ends them. `ccb_rx` registers its inputs, so a BCNTRES present at the
board pins in clock *c* makes `bxn` = 0 in clock *c*+2. A BC0 sent in the
same clock as BCNTRES lines up with it. Suppose Alignment_FIFO_Read is
issued before the links start sending, so the FIFOs run empty. Then a word
present at the link inputs in clock *n* passes the FIFO's write and
registered read, and is checked against the `bxn` of clock *n*+2. Its
BC0/BX0 therefore have to describe bunch crossing (*n* − *c*) mod 3564. The top-level testbench drives the links exactly
this way.

Before the first BCNTRES the counter runs freely and the CCB BC0 does not
match it. The sticky BC0 error is therefore expected after power-on. The
intended sequence is: BCNTRES and BC0, then an L1 reset, then
Alignment_FIFO_Read. The L1 reset clears the FIFOs, the counters, the
sticky errors, the pipeline fill state and the readout queue.

## When the board is ready: Fast Monitoring

`fm_status` drives four lines: RDY, BSY, WOF and OSY.

- **RDY** is the AND of four conditions:
  - all FPGAs configured (`SP_CFG_DONE`, the AND of the DONE inputs);
  - the VME READY trigger is set (`CTRL[1]`);
  - all links are flowing;
  - LATENCY entries of input data have been written into the L1A pipeline.
- **BSY** is NOT RDY.
- **WOF** comes from the readout (see below).
- **OSY** is the OR of every link's OSY and the Main FPGA's.
- **ERR** means a link lost its signal detect. It has no line of its own
  and is sent as RDY = BSY = 1.

The three reset cases differ in what they clear:

- power-on (`rst_n`) and `SP_HARD_RESET` clear everything, including the
  READY trigger, which must be written again;
- an L1 reset clears only the synchronisation (alignment FIFOs, sticky
  errors, synch error counters), the pipeline fill state and the readout
  queue.

So after an L1 reset RDY comes back by itself. It needs a new
Alignment_FIFO_Read and LATENCY crossings of data.

## L1A readout and the DDU frame

`l1a_pipeline` is a circular buffer of `DEPTH` = 1024 entries. Each clock
it writes one entry: the 8 validated LCTs and the 64-bit Muon Sorter word.
When an L1A arrives, `ddu_formatter` queues the event number, the `bxn`
and the pipeline address `wr_ptr − LATENCY`. The queue holds up to
`EVT_DEPTH` = 8 events. In the top, the first entry read out holds the
LCTs that entered the board LATENCY + 1 clocks before the L1A reached the
pins.

For each queued event the formatter:

1. copies `WINDOW` = 5 consecutive entries into an event buffer (6
   clocks);
2. sends the event as 16-bit words under a valid/ready handshake.

Bit 15 of each word is the control flag, set only on start- and
end-of-frame words. Bits 14:0 carry data.

The frame has up to six sections. Word counts at the default parameters:

| Section | Full | Zero-suppressed | Header only | FM only |
|---|---|---|---|---|
| SOF | 2 | 2 | 2 | 2 |
| Header | 8 | 8 | 8 | – |
| Output block (muons) | 8 | 8 | – | – |
| Input block 1 (links 0–3) | 40 | 4 + 2 per LCT with VP=1 | – | – |
| Input block 2 (links 4–7) | 40 | 4 + 2 per LCT with VP=1 | – | – |
| EOF | 2 | 2 | 2 | 2 |
| Total | 100 | 28 + 2 × valid LCTs | 12 | 4 |

The VME register `CTRL[3:2]` selects the mode (`sp02_pkg::ddu_mode_e`). The
formatter latches the mode, the FM state and the overflow flag when it
takes an event from the queue, so a frame never changes while it waits for
the DDU.

Word contents (`x` = 15 data bits):

```
SOF0  1 100 l1a[11:0]            SOF1  1 101 000000 mode[1:0] fm{rdy,bsy,wof,osy}
HDR0  0 l1a[14:0]                HDR1  0 000000 l1a[23:15]
HDR2  0 000 bxn[11:0]            HDR3  0 000000 ga[4:0] mode[1:0] lost evt_ovf
HDR4  0 0..0 fm[3:0]             HDR5  0 words in input block 1
HDR6  0 words in input block 2   HDR7  0 0000000 LPB[3:0] WINDOW[3:0]
OUT0..5  per muon m: 0 mu[14:0], then 0 0..0 mu[19:15]   (muon_t bit order)
OUT6  0 0..0 bx0 bc0 se spare    OUT7  0
LCT   0 quality clct_pat wg     then   0 vp csc_id se lr hs
      (crossing-major: entry e, link l; BC0 and BX0 are left out)
ZS    0 vpmask[14:0]  0 vpmask[29:15]  0 semask[14:0]  0 semask[29:15]
EOF0  1 110 (number of words before EOF0)[11:0]
EOF1  1 111 XOR of bits 11:0 of all earlier words of the frame
```

`lost` is set when an event waited so long that its pipeline entries may
already have been overwritten. With the defaults that cannot happen while
the DDU takes one word per clock. The eighth queued event waits about 850
clocks, and the pipeline keeps data for 1024 − 128 − 5 = 891.

**WOF.** The formatter counts the L1As it accepted and the events it
finished sending. WOF is high while the difference is at least
`WOF_THRESH` = 6. An L1A that finds the queue full is dropped, and it sets
the sticky `evt_ovf` (STATUS bit 7 and header bit).

**Rates.** At a 100 kHz L1A rate a full event needs 10 M words/s; the
link carries 40 M. Each event costs its words plus about 8 clocks: the
two CCB input registers and the 6-clock buffer load. A full event takes
about 108 clocks, so the formatter keeps up with L1As up to about 370
kHz. Zero suppression adds one clock for each suppressed LCT. With 1 event
in 6 carrying two valid LCTs per block, the average frame is about 29
words and 75 clocks. `tb_ddu_rate` runs each mode at 100 kHz with random
L1A spacing. It measured:

| Mode | Words/s |
|---|---|
| Full | 10.8 M |
| Zero-suppressed | 2.9 M |
| Header only | 1.2 M |
| FM only | 0.38 M |

WOF never rose.

## VME addressing and registers

The board answers A24 address modifiers 0x39, 0x3A, 0x3B, 0x3D, 0x3E and
0x3F, D16 transfers only. The address splits into three fields:

```
A23..A19  geographic address (must equal GA, or 0 = every board, writes only)
A18..A11  chip code, one bit per chip: several bits = write to several chips
A10..A1   register number inside the chip
```

A read needs this board's GA and exactly one chip bit. Cycles that do not
decode get no DTACK. The VME strobes are synchronised into `clk`. A write
gives one clock of `bus_wr_n` low with the chip enables. A read holds the
chip enable for `RD_WAIT` = 2 clocks. DTACK stays low until the master
releases DS*.

Chip 0 is `sp_regs`. Chips 1–7 are the other FPGAs (the Main FPGA and its
LUTs, among others); their bus is brought out as `ext_*` with one read
data input per chip.

| Reg | Name | Access | Bits |
|---|---|---|---|
| 0x000 | CTRL | rw | [0] SE forces VP=0 (reset 1), [1] READY trigger, [3:2] DDU mode |
| 0x001 | OSY_THRESH | rw | synch error count above which OSY is raised (reset 255) |
| 0x002 | CMD | w | [0] L1 reset, [1] Alignment_FIFO_Read |
| 0x003 | STATUS | r | [3:0] FM {rdy,bsy,wof,osy}, [4] CFG_DONE, [5] links flowing, [6] pipeline filled, [7] L1A queue overflow |
| 0x010+i | SE_CNT[i] | r | synch error counter of link i |

## CCB, local trigger and Muon Sorter

`ccb_rx` registers all CCB inputs, which it takes as active-high logic
levels. It keeps:

- the bunch counter (cleared by BCNTRES, wraps at 3563);
- a 24-bit L1A counter (cleared by EVCNTRES);
- the last command and data words.

It decodes command `0x03` as L1 reset and `0x04` as Alignment_FIFO_Read.
For local running, every crossing with a valid track from the Main FPGA
gives a one-clock (25 ns) pulse on `SP_RESERVED[0]`. The backplane
wire-ORs this line with the other SPs, and the CCB can use the result as a
local L1A.

`ms_tx` sends the three muons and four per-SP bits as two 32-bit frames.
Rank arrives from the PT LUT later than the other fields, so it goes in
the second frame:

```
frame 1: phi0 phi1 phi2 eta0 eta1 eta2 bx0 bc0                        (15+15+2)
frame 2: rank0 rank1 rank2 vc0 vc1 vc2 halo0..2 charge0..2 se spare   (21+3+3+3+2)
```

Frame 1 is captured at the `clk80` edge in the middle of a crossing.
Frame 2 is captured at the next edge, at the end of the crossing, from the
same held inputs. So the rank and valid-charge bits have the whole 25 ns
to settle, while the other fields have half of it. `ms_first` is high
during frame 1. BX0 and BC0 come from `bxn`. SE is the OR of the links' sticky BC0
errors.

## Parameters (top level)

| Parameter | Default | Meaning |
|---|---|---|
| `LPB` | 4 | links per DDU input block; the board has 2 × LPB links |
| `ME1_LINKS` | 2 | links 0..ME1_LINKS−1 are ME1 and feed `dt_lct` |
| `WINDOW` | 5 | crossings read out per L1A (2 × LPB × WINDOW = 40 words per full block) |
| `DEPTH` | 1024 | L1A pipeline entries (power of two) |
| `LATENCY` | 128 | L1A latency in crossings |
| `ALIGN_DEPTH` | 16 | words per alignment FIFO |
| `EVT_DEPTH` | 8 | queued L1As |
| `WOF_THRESH` | 6 | pending events that raise WOF |

Zero suppression keeps the VP and SE masks in two 15-bit words each, so
`LPB × WINDOW` must not exceed 30.

## What is fixed by the interface definitions and what is not

These follow the interface definitions:

- the VME address map, the accepted AMs and the broadcast capability;
- the CCB signal list and the 25 ns local trigger;
- the MPC frame layout;
- every validation rule (BC0, BX0, SE, VP, Q=0 to DT, the counter, OSY);
- the RDY/BSY/WOF/OSY/ERR rules and the three reset cases;
- the DDU section sizes in all four modes and the 1+15-bit word
  convention;
- the Muon Sorter field list and the two 32-bit frames at 80 MHz.

These are this design's own choices, and they are what to change first
when matching real boards:

- the broadcast encoding (chip mask, GA 0) and the internal bus timing;
- the register map;
- the CCB command codes;
- the link count and the ME1 link positions;
- the readout window and the contents of every DDU word;
- the pipeline and queue sizes;
- the L1A latency;
- the assignment of Muon Sorter bits to frames.

Known simplifications:

- The muon word stored in the pipeline is the one of the same clock as
  the LCTs. The track finder's latency is not compensated.
- `CCB_CLOCK40_ENABLE`, `CCB_RESERVED` and `CCB_READY` are not used.
  `SP_RESERVED[3:1]` are driven 0.
- The CCB data word and the alignment FIFOs' overflow/underflow flags are
  produced but not yet mapped to registers.
- The DT interface is not defined, beyond the ME1 LCT copy.

## Simulating

Each module in `rtl/` has a self-checking testbench in `tb/` named
`tb_<module>`. Each testbench prints `TB_RESULT checks=N failures=M`.
`tb_sp02_top` runs the whole board at its default parameters through
power-up, synchronisation, readout in all four modes, a stalled DDU, link
errors, an L1 reset and a hard reset. It counts each of these mechanisms
and fails if one never happened.

`tb_ddu_rate` runs the readout at a 100 kHz L1A rate in every mode (see
above), also at the default parameters.

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-lint -Wno-style \
    rtl/sp02_pkg.sv $(ls rtl/*.sv | grep -v sp02_pkg) \
    tb/tb_sp02_top.sv --top-module tb_sp02_top
./obj_dir/Vtb_sp02_top
```

The package must come first and appear only once.

For one block, list the package, the block's file and its testbench, e.g.
`rtl/sp02_pkg.sv rtl/ddu_formatter.sv tb/tb_ddu_formatter.sv`.
The assertions in `vme_slave` (one-clock write strobe, single-chip reads)
and `ddu_formatter` (words held while the DDU is not ready) are checked in
simulation with `--assert`.
