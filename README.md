# Calorimeter trigger real-time data path: processor modules → CMX → topological processor

This is synthesizable SystemVerilog for the real-time data path of two
calorimeter-trigger processor crates, following the Phase-1 upgrade data
formats. Every LHC bunch crossing (BC, 25 ns), each processor module finds
regions of interest (RoIs):

- a **JEM** (jet/energy module) finds jets;
- a **CPM** (cluster processor module) finds electromagnetic (EM) and
  tau/hadron clusters.

The module sends its results over the crate backplane to the merger modules
(**CMX**). A CMX forwards the results of all modules of its crate over optical
fibres to the topological processor (**L1Topo**).

The upgrade runs the same 25-line backplane links four times faster:

- Day-1 sends one 24-bit word per BC at 40 Mbit/s.
- The upgrade sends four 24-bit words per BC at 160 Mbit/s, giving 96 bits per BC.

Day-1 could only send threshold *multiplicities*: how many RoIs passed each
threshold. With 96 bits the upgrade sends the RoIs themselves: where they are
and how much energy they hold. L1Topo can then combine objects by their
geometry. Both modes are built. One input, `legacy_mode`, switches between
them.

```
 JEP crate (N_JEM = 16)                          jet CMX
 ┌──────────────────────────────────────────┐    ┌───────────────────────┐
 │ 7x11 jet elements                        │    │ bp_rx ×16             │
 │  jet_element_sum ×77 → jet_finder        │    │   Day-1 words, errors │
 │   ├ jem_day1_formatter ─┐                │25  │   payloads ─┐         │
 │   └ jem_fmt160 ─────────┴→ bp_tx ────────┼───→│  cmx_topo_tx → 12×32b │→ L1Topo
 └──────────────────────────────────────────┘    └───────────────────────┘
 CP crate (N_CPM = 14)                           EM CMX / hadronic CMX
 ┌──────────────────────────────────────────┐    ┌───────────────────────┐
 │ 7x19 EM + hadronic towers                │    │ bp_rx ×14 (each CMX)  │
 │  cp_cluster                              │    │  cmx_topo_tx → 12×32b │→ L1Topo
 │   ├ cpm_merger ×2 (thr 0-7, 8-15) ─┐     │25×2│                       │
 │   └ cpm_fmt160 ×2 (EM, hadronic) ──┴→ bp_tx ×2 ─→ link 0 → EM CMX,    │
 │                                          │     link 1 → hadronic CMX │
 └──────────────────────────────────────────┘    └───────────────────────┘
```

`l1calo_top` holds both crates and all three CMX modules.

## Clocking and the bunch-crossing phase

Everything runs on one 160 MHz clock, four clocks per BC. `l1calo_top` has a
free-running 2-bit `phase` counter. Phase `k` is the clock in which backplane
word `k` is sent. Every block that works once per crossing takes `phase`, or an
enable decoded from it.

| edge (phase before the edge) | what happens                                                 |
|------------------------------|--------------------------------------------------------------|
| S (phase 3)                  | `jet_finder` and `cp_cluster` register the crossing's inputs |
| S+1 (0)                      | `bp_tx` latches the payload; word 0 on the lines             |
| S+2 … S+4                    | words 1–3                                                    |
| S+3                          | Day-1 word out of the CMX receiver (`day1_valid`)            |
| S+6                          | 96-bit payload out of the CMX receiver (`valid`)             |
| S+8 (phase 3)                | fibre frame word 0 leaves the CMX (`topo_sof`), words 1–3 follow |

Module inputs must be stable across edge S. The testbench changes them just
after it.

## The backplane link (`bp_tx`, `bp_rx`)

Each link has 25 single-ended lines, 24 of them data. How line 24 is used
depends on the mode:

- **Day-1 (`legacy = 1`).** One 24-bit word is held for the whole crossing.
  Line 24 carries its odd parity: the 25 lines hold an odd number of ones.
- **160 Mbit/s.** Payload bits `24k+23..24k` travel in word `k`. Line 24 is a
  40 MHz clock with the parity folded into it. Over the four words it carries
  `1, p, 0, 0`, where `p` is the odd parity of the 96 data bits.

The rising edge of line 24 therefore always marks word 0. Parity changes only
the width of the clock pulse, one or two words. The receiver:

- finds word 0 from that edge alone, without using the local phase;
- takes `p` from word 1;
- checks that line 24 is low in words 2 and 3.

After word 3 it presents the payload with a one-clock `valid`, plus `par_err`
and `frame_err`. A rising edge inside a frame is a framing error, and the
receiver re-aligns on it.

There is one subtlety in this encoding. The line must stay high from word 1
into word 2, or a corrupted pattern with `p = 0` and line 24 high in word 2
would look like a new word 0. The receiver therefore treats a step from 0 to 1
as "new frame" and never as "bad bit". A Day-1 word is sampled at local phase 2,
in the middle of its four clocks.

The specification says only that line 24 carries "a 40 MHz clock encoded with
a parity bit". The `1, p, 0, 0` pattern and the framing checks are this
design's choices.

## Jet finding (`jet_element_sum`, `jet_finder`)

A JEM covers a core of 4×8 jet elements, each 0.2×0.2 in η×φ. It also sees a
surrounding environment copied from its neighbours, which makes a 7×11 array.
The core sits at η 1..4, φ 1..8: one element of environment below and two
above, which is what the core-centred 4×4 window needs.

For each element, `jet_element_sum` zeroes each 9-bit sum (EM and hadronic)
that is below its noise threshold, then adds the two into a 10-bit Et with a
1 GeV least count.

`jet_finder` slides a 2×2 window over all 32 core positions. A window is a
**jet core** when its sum is a local maximum among the eight overlapping 2×2
windows around it. Ties are broken by position: the core must be `>` the four
neighbours later in (η, φ) order and `>=` the four earlier ones. This way a
flat plateau yields exactly one core.

Each of the eight **jet definitions** (`jet_def_t`) gives a window size and a
10-bit threshold. A definition passes when the sum is greater than its
threshold:

- **2×2:** the core window itself.
- **3×3:** the four 3×3 windows that contain the core. Any one of them passing
  is enough.
- **4×4:** the window with the core at its centre.

All sums saturate at 1023.

The core is divided into eight 2×2 **subregions**: subregion
`s = 2·(φ/2) + η/2`. A subregion holds at most one core, because all four of
its positions are neighbours of each other. Each subregion reports:

- `present`: a core that passes at least one definition;
- 8 threshold bits;
- the 2-bit fine position `{φ&1, η&1}`;
- `et_s1`, the 2×2 ("jet size 1") Et, and `et_s2`, the 4×4 ("jet size 2") Et,
  for the 160 Mbit/s format.

The block is built from generate loops: one window-sum table per size, then
one comparator block per core position. Its results are registered on `en`.

## Jet formats

**Day-1 (`jem_day1_formatter`).** There are two layouts, selected by `jem_fwd_mode`:

- `0`: eight 3-bit multiplicities. Threshold *t* is in bits `3t+2..3t`.
- `1`: twelve 2-bit multiplicities. Central definitions CJ0–7 are in bits
  `2t+1..2t`, forward definitions FC0–3 in bits 16–23.

Counts saturate. The forward jet algorithm is not part of this design: its
threshold bits enter on `fcal_hits`, four RoIs of four bits per JEM. The top
registers them together with the jet finder inputs, so both halves of the word
describe the same crossing.

**160 Mbit/s (`jem_fmt160`).** This is the regular one of the two candidate
layouts:

```
payload bits  3..0   presence P0-3      5..4   fp1     7..6   fp2
             11..8   presence P4-7     13..12  fp3    15..14  fp4
             95..16  Et stream, 10 bits each:
                     jet1 size1, jet1 size2, jet2 size1, ... jet4 size2
```

The first four present subregions, in index order, fill the four slots. A
fifth or later RoI keeps only its presence bit and raises `overflow`.

## Cluster finding (`cp_cluster`)

A CPM covers a core of 4×16 trigger towers (0.1×0.1). Its input is a 7×19 EM
array and a 7×19 hadronic array. The block does the work of the CPM's eight
CP chips. A 2×2 window slides over the core, and for each position it forms:

| quantity           | definition                                               |
|--------------------|----------------------------------------------------------|
| cluster Et         | largest sum of two EM towers adjacent in η or φ          |
| EM isolation       | EM sum of the 12-tower ring around the 2×2 (inside 4×4) |
| hadronic isolation | the same ring, hadronic layer                            |
| hadronic core      | the four hadronic towers behind the 2×2                  |

Each of the 16 definitions (`cp_def_t`) holds a cluster threshold and two
maximum isolation sums. What a definition tests depends on its type:

- **EM:** cluster Et > `clus`, EM ring ≤ `em_iso`, hadronic core ≤ `had_iso`.
- **tau/hadron:** Et = cluster Et + hadronic core must exceed `clus`; EM ring ≤
  `em_iso`; hadronic ring ≤ `had_iso`. Only definitions 8–15 can be switched to
  this type, with `tau = 1`.

There are sixteen 2×2 subregions: `s = 2·(φ/2) + η/2`. CP chip *k* owns
subregions *k*L and *k*R, matching the presence order 1L, 1R, … 8R. One RoI per
subregion is chosen: the window whose EM + hadronic 2×2 sum is a local maximum,
with the jet tie rule.

For the 160 Mbit/s format the block also builds one EM and one hadronic
cluster record per subregion (`cp_roi_t`):

- A record is present when its Et exceeds `cfg.roi_min`, with no isolation
  requirement. This is the "lowest Et, weakest isolation" RoI.
- Et saturates at 255.
- `ei`, `hi` and `hv` are 2-bit codes: how many of three programmable levels in
  `cp_roi_cfg_t` the EM ring, hadronic ring or hadronic core stays within.
- `hv` is zero in hadronic records.

The specification names these 2-bit fields but not their coding, so the level
scheme is this design's.

## Cluster formats

**Day-1 (`cpm_merger`).** Each CP chip's 16-bit port carries the 8 threshold
bits of its left subregion in bits 7..0 and of its right subregion in bits
15..8. A merger counts each threshold over all 16 subregions and sends eight
3-bit multiplicities. A CPM has two mergers: thresholds 0–7 on link 0 and 8–15
on link 1.

**160 Mbit/s (`cpm_fmt160`).** Link 0 carries EM clusters and link 1 hadronic
clusters, with `HADRONIC = 1` forcing the hv fields to zero. Each word is
filled from bit 0 up:

```
word 0: presence[15:0]              | ei1 hi1 hv1 fp1
word 1: Et1[7:0]   Et2[7:0]         | ei2 hi2 hv2 fp2
word 2: Et3[7:0]   Et4[7:0]         | ei3 hi3 hv3 fp3
word 3: Et5[7:0]   ei4 hi4 hv4 fp4  | ei5 hi5 hv5 fp5
```

The first five present subregions fill the slots. Beyond five, RoIs keep only
their presence bit and `overflow` is raised.

## CMX to L1Topo (`cmx_topo_tx`)

Each crossing, a CMX gathers the payloads of all modules in its crate:

- Module *i* goes to frame bits `96i+95..96i`.
- Fibre *f* carries frame bits `128f+127..128f`.
- Each fibre goes to its transceiver as four 32-bit words, one per clock. 32
  bits at 160 MHz is the 5.12 Gbit/s payload of a 6.4 Gbit/s 8b/10b line.
- `sof` marks word 0.
- A module whose payload did not arrive in the crossing is sent as zeros. In
  Day-1 mode this means the whole frame is zero.

Sixteen JEMs fill the 12×128 bits exactly. Fourteen CPMs leave 192 bits unused.
The frame layout, the 32-bit width and `sof` are this design's choices. The
transceivers themselves, with their 8b/10b coding and serialisers, are FPGA
vendor blocks and are not included.

## What is not here

- The JEM's second backplane link, for energy sums. Its algorithm and format
  are not specified.
- The forward (FCAL) jet algorithm. Its bits are inputs.
- Any CMX processing beyond receiving and forwarding. For example, summing
  multiplicities over a crate is not included.
- The fibre transceivers and optical modules.
- The muon interface (MIOCT) and L1Topo itself, whose designs are not
  specified.

## Design choices beyond the specification

The specification fixes the sizes, the algorithms' structure and the field
lists. Everything below was chosen here; the header comment of each file says
the same for that block.

- The Day-1 noise cut keeps a value equal to its threshold. Thresholds pass on
  "greater than", isolation on "less or equal".
- The local-maximum tie rule, described above.
- Subregion numbering and the fine-position bit order.
- Jet "size 1" is the 2×2 window and "size 2" the 4×4 window.
- Saturation of all multiplicities and Et fields.
- Slot filling in index order, and the overflow flags.
- How the Et fields of the jet format run on across word boundaries.
- The 1/p/0/0 clock-line encoding and the receiver's framing checks.
- For clusters: the local-maximum quantity (EM + hadronic 2×2), the tau Et sum,
  sums (rather than single towers) for isolation, and the 2-bit isolation
  codes.
- The CMX frame layout and the `sof` sideband.

## Parameters

| module          | parameter     | default | meaning                                |
|-----------------|---------------|---------|----------------------------------------|
| `l1calo_top`    | `N_JEM`       | 16      | JEMs in the JEP crate                  |
|                 | `N_CPM`       | 14      | CPMs in the CP crate                   |
|                 | `N_FIBRE`     | 12      | fibres per CMX                         |
|                 | `JE_ETA/PHI`  | 7 / 11  | jet element array incl. environment    |
|                 | `TT_ETA/PHI`  | 7 / 19  | tower array incl. environment          |
|                 | `N_FCAL_ROI`  | 4       | forward RoIs per JEM                   |
| `cmx_topo_tx`   | `N_LINK`, `N_FIBRE`, `FIBRE_W` | 16, 12, 32 | modules, fibres, transceiver width |
| `cpm_fmt160`    | `HADRONIC`    | 0       | blank hv fields                        |
| `mult_counter`  | `N_ROI`, `N_THR`, `W` | 8, 8, 3 | RoIs, thresholds, field width   |

The window sizes in `jet_finder` and `cp_cluster` follow from `ETA`/`PHI`:
the core is the array minus three. Shared types and constants are in
`rtl/l1calo_pkg.sv`.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference models are in
`tb/l1calo_ref_pkg.sv`. They are written separately from the RTL, using
explicit window tables and bit-by-bit field placement. For example:

```
verilator --binary --timing --assert -Wno-WIDTH -Irtl -Itb -y rtl -y tb \
    rtl/l1calo_pkg.sv tb/l1calo_ref_pkg.sv tb/tb_jet_finder.sv --top-module tb_jet_finder
./obj_dir/Vtb_jet_finder
```

`tb_l1calo_top` runs the whole design at its default size: 16 JEMs, 14 CPMs
and 3 CMX. It runs 240 crossings with new random data in every module, and
alternates Day-1 and 160 Mbit/s segments, and central and forward JEM layouts.
It checks:

- every Day-1 word received by every CMX link;
- every fibre word of every frame, against the reference models;
- no parity or framing errors.

Crossings still in flight when the link mode switches are lost, by design. The
testbench skips the crossings next to each switch.

It also counts jet RoIs, JEM and CPM slot overflow, tau hits, saturated
multiplicities, hadronic clusters, forward-layout crossings and mode switches,
and fails if any of them never occurs. At this size it takes a few minutes to
compile and seconds to run.

## How far to trust it

- All blocks pass their testbenches, and each testbench detects a deliberately
  broken copy of its block.
- The checks compare against reference models that encode the same reading of
  the specification. A misreading of the specification would therefore not be
  caught. The list of choices above is where to look first.
- The design has not been timed in any FPGA technology. `jet_finder` and
  `cp_cluster` are single-cycle combinational trees, which a real 40 MHz
  implementation would likely pipeline.
