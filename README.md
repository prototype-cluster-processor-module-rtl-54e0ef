# Cluster Processor Module (CPM) for a Level-1 calorimeter trigger

A hadron collider produces a bunch crossing every 25 ns. The first trigger level
has to decide, from coarse calorimeter data alone and within about 2 µs, whether
a crossing holds an electron/photon or a tau/hadron candidate. The calorimeter is
summed into trigger towers (TT) of 0.1 × 0.1 in η × φ, one 8-bit energy per
tower in an electromagnetic (e.m.) and a hadronic layer. The Cluster Processor
slides a 4 × 4 tower window over every position of this map. It looks for a narrow
energy deposit that is a local maximum, is above a threshold, and is isolated
from its surroundings. For each of 16 programmable threshold sets it reports how
many windows passed.

This repository holds the RTL of one Cluster Processor Module. A module handles
64 window positions, 4 in η × 16 in φ. It makes a decision every crossing at a
fixed latency. It also keeps its inputs and results in pipelines for readout
after a Level-1 accept. The RTL is written in SystemVerilog and is
synthesizable. A single 160 MHz clock runs all of it.

## What is on the board

| Block | File | Count | Role |
|---|---|---|---|
| SRL chip | `rtl/srl_chip.sv` | 20 | Takes 4 link words per crossing. Sends each one as a 160 MHz 3-bit lane. Also holds the Level-1 pipeline / playback memory and sends the calibration pattern. |
| Level-1 pipeline | `rtl/l1_pipeline.sv` | in every SRL, CP chip and DAQ controller | 128-crossing circular buffer. On an accept it copies one entry into a readout FIFO. |
| CP chip | `rtl/cp_chip.sv` | 8 | 42 input lanes feed lane alignment, then BC demultiplexing, then 8 windows. |
| – lane sync | `rtl/cp_sync.sv` | 42 per chip | Rebuilds the 10-bit word from a lane. Learns the beat skew from the calibration pattern. |
| – BC demux | `rtl/bc_demux.sv` | 42 per chip | Turns BC-multiplexed words back into two tower energies. Checks parity. |
| – window | `rtl/cp_window.sv` | 8 per chip | Cluster, isolation and local-maximum algorithm. Compares against the 16 sets. |
| Hit Merger | `rtl/hit_merger.sv` | 2 | Adds the hits of all 64 windows for 8 threshold sets each. Saturates at 7. |
| DAQ readout controller | `rtl/roc_daq.sv` | 1 | On an accept, sends the tower words and multiplicities as G-link words. |
| RoI readout controller | `rtl/roc_roi.sv` | 1 | On an accept, sends the coordinates and threshold bits of every window that fired (the Level-2 regions of interest). |
| top | `rtl/cpm.sv` | 1 | Wires the above together, including the backplane fan-in and fan-out. |

`rtl/cpm_pkg.sv` holds the shared constants and types: link word, lane,
threshold set and SRL mode.

The LVDS deserialisers, the G-link serialisers, the backplane and the merger
modules are not logic of this board. Their parallel words appear as ports of
`cpm`.

## Geometry: why 280 towers for 64 windows

A window at core position (η, φ) covers towers η−1..η+2 and φ−1..φ+2. So the 4 × 16
core needs a region one tower wider on the low side and two wider on the high
side: 7 η columns × 20 φ rows × 2 layers = 280 towers.

* Columns 1–4 belong to this module. They arrive on its 80 links. One link carries
  a φ-pair of towers, so 4 columns × 10 pairs × 2 layers = 80. Link index =
  `layer*40 + pair*4 + (column-1)`.
* Column 0 comes over the backplane from the lower-η neighbour. Columns 5 and 6
  come from the higher-η neighbour. Both arrive as 160 MHz lanes.
* Mirroring that, the module sends its columns 1 and 2 to the lower-η neighbour and
  column 4 to the higher-η one. That is 120 towers each way.
* SRL `s` serves layer `s/10`, φ-pair `s%10`, and columns 1–4.
* CP chip `k` sees φ-pairs k..k+2 (6 rows × 7 columns × 2 layers = 42 lanes, lane
  index `layer*21 + column*3 + pair`).
  * Its 8 windows are 4 in η × 2 in φ. Window `w` has its core at η = `w%4` and
    φ row = `2k + w/4`.
  * Neighbouring chips therefore share four of their six rows.

## BC multiplexing on the links

A tower's energy is a short pulse. After a crossing with energy, the same tower
is zero in the next crossing. The sender uses that slot to carry the other tower
of the φ-pair, so one link carries two towers.

The link word is 10 bits: `{parity, bcmux_flag, data[7:0]}`. Parity is odd over
the other 9 bits.

* In crossing n the sender sends tower A(n) with flag 0.
* If B(n) is non-zero, it goes out in crossing n+1 with flag 1, in place of
  A(n+1).
* The receiver (`bc_demux`) looks at two consecutive words:
  `A(n) = prev.flag ? 0 : prev.data` and `B(n) = word.flag ? word.data : 0`.

The sender relies on the pulse shape: after a crossing with energy in the pair,
both towers are zero in the next crossing. Data that breaks this rule loses
towers; the testbench model counts such cases. Because the receiver must wait for
the following word, demultiplexing costs a crossing of latency.

## 160 MHz lanes and calibration

Every SRL chip sends each link word as a 3-bit lane at 160 MHz. The 12-bit frame
is sent in four beats, beat 0 first, and the word sits in bits 9:0. The beat
counter 0..3 in the top gives the crossing boundary: `bc_en` is beat 3. Words
on the lanes change at beat 0.

Lanes from the own board and from neighbours can arrive up to three beats late.
Each `cp_sync` keeps the last eight beats. In calibration mode (`srl_mode =
SRL_CALIB`) it searches that history for the fixed frame `12'b111_100_010_001`,
whose four beats are all different. It then stores which of the four offsets
matched and raises `locked`. In normal mode it builds the frame at that offset.
Each lane's output is delayed by a fixed two crossings, so every lane of a chip
lines up whatever its skew. A `cp_chip` reports `locked` once all 42 lanes are
locked.

The four-beat pattern and the fixed two-crossing delay are this design's
choices. The original system states only that the SRL sends a calibration
pattern for the CP chip inputs to align to.

## The window algorithm

`cp_window` sees a 4 × 4 e.m. and a 4 × 4 hadronic block, indexed `[η][φ]`. The
2 × 2 core is `[1..2][1..2]` and the other 12 towers are the ring. It computes:

* **four e.m. clusters**: the sums of two adjacent core e.m. towers (two pairs
  along η, two along φ);
* **e.m. isolation** and **hadronic isolation**: the sums of the 12 ring towers of
  each layer;
* **hadronic core**: the sum of the 2 × 2 core hadronic towers. For e/γ this is a
  veto: hadronic energy behind an electron must be small;
* **four tau clusters**: each e.m. cluster plus the hadronic core;
* **RoI sum**: the 2 × 2 e.m. + hadronic core. It must be a local maximum against
  the eight RoIs shifted by one tower.

A threshold set (`thr_set_t`) has a cluster threshold, an e.m. ring limit, a
hadronic ring limit, a hadronic-core limit, and a `tau` bit. Set t passes when
all of these hold:

* the RoI is a local maximum;
* any of the four clusters is **greater than** the cluster threshold;
* every isolation sum used is **at most** its limit.

Sets 0–7 always use the e/γ clusters. Sets 8–15 use the tau clusters when their
`tau` bit is set, and then the hadronic-core limit is ignored.

Ties between equal neighbouring RoIs are broken by position. A window counts as
a maximum when it is **≥** the RoIs at lower φ (and at lower η in the same row)
and **strictly greater** than the others. Two equal adjacent RoIs are therefore
reported once, not twice or never. In code, neighbour `(a, b)` (η, φ offsets)
needs strict `>` when `b > 1` or `b == 1 && a > 1`.

Sums are 12 bits wide; 16 × 255 fits without overflow.

## Latency

All latencies are counted in crossings (25 ns).

| Stage | Where | Crossings |
|---|---|---|
| Link word → lane | SRL frame register | 1 |
| Lane sync / deserialisation | `cp_sync` | 2 |
| BC demux (waits for the next word) | `bc_demux` | 2 |
| Algorithm | `cp_window`, 1st register | 1 |
| Threshold compare / clock out | `cp_window`, 2nd register | 1 |
| Hit Merger | `hit_merger` | 2 clocks (½ crossing) |

From its input lanes to its outputs, the CP chip takes 6 crossings. That is the
figure the original system quotes. Counted from the link inputs of the board, hits
for crossing n appear in crossing n+7 and the multiplicities half a crossing later.
The top exposes the 7 as `CP_LAT_OFS`.

## Level-1 readout

Every SRL, every CP chip and the DAQ controller keeps a 128-deep `l1_pipeline`
(128 > 80 crossings of a 2 µs Level-1 latency). Each crossing writes one entry.

On `l1a` (sampled with `bc_en`), each pipeline copies the entry written
`latency` crossings ago into an 8-deep FIFO. A full FIFO sets a sticky
`ro_overflow`. The top gives the SRLs `l1a_latency` and the CP chips and DAQ
controller `l1a_latency − 7`, so all readout refers to the same crossing of link
data. `l1a_latency` must therefore be at least 8.

Both controllers send one 16-bit G-link word per crossing, with `gl_dav` marking
valid words and `gl_cntl` marking header and trailer.

* **DAQ** (`roc_daq`): header `{cntl, event#}`; then 80 link words (SRL-major,
  channel-minor, zero-extended); then 3 words holding the 48 multiplicity bits (set
  t at bits 3t+2..3t); then trailer `{cntl, 83}`.
* **RoI** (`roc_roi`): header `{cntl, event#}`. Then, for every window with any hit
  (chip 0 window 0 first), a coordinate word followed by its 16 hit bits. The
  coordinate word is `{8'h00, φ[3:0], 2'b00, η[1:0]}`, with φ = `2*chip + w/4`. Last
  comes the trailer `{cntl, number of RoIs}`.

The frame layouts are this design's own. No G-link format was given.

## Playback and test modes

`srl_mode` selects between three modes:

* `SRL_NORMAL` sends the live link words.
* `SRL_CALIB` sends the calibration frame.
* `SRL_PLAYBACK` stops the live writes into the SRL pipeline and sends its 128
  entries cyclically.

Before playback the host loads the memory through `host_we`, `host_srl`,
`host_addr` and `host_data`. A whole board can therefore be exercised from
stored data without a Preprocessor.

## Where this RTL departs from, or adds to, the original description

* One 160 MHz clock with a beat counter replaces separate 40 and 160 MHz
  clocks. Reset is asynchronous and active low.
* The following are this design's choices:
  * lane width (3 bits), frame layout, calibration pattern and alignment method;
  * meaning of the BC-mux flag and the odd parity bit;
  * the 4 × 2 arrangement of the 8 windows in a CP chip, and which neighbour sends
    one column and which two;
  * comparison senses (`>` for clusters, `<=` for isolation) and the
    local-maximum tie rule;
  * the split of the 16 sets over the two Hit Mergers (0–7, 8–15);
  * pipeline and FIFO depths, the readout frame formats, and one readout slice per
    accept;
  * the readout of hit multiplicities by the DAQ controller.
* The Hit Merger outputs go straight to ports. The merger modules that add them
  over all boards, the backplane, and the optical/LVDS/G-link physical layers are
  not modelled.
* The cp_chip pipeline playback output is unused. CP chips do not replay.
* Some signals are there only for monitoring and are not used inside: per-lane
  offsets, per-window local-maximum flags, Hit Merger saturation. Lint reports them
  as unused.

## Testbenches

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/tb_ref_pkg.sv` holds the
reference models: the window algorithm, a BC-mux sender, and a tower generator
that obeys the pulse-shape rule.

* `tb_cp_window`: random and corner windows against the reference, including ties.
* `tb_bc_demux`, `tb_cp_sync`: random data, flags and skews, and calibration/lock.
* `tb_srl_chip`, `tb_l1_pipeline`: lane timing, calibration, playback, host writes,
  readout at a chosen latency, and overflow.
* `tb_cp_chip`: random data through sync, demux and windows. Checks the 6-crossing
  latency.
* `tb_hit_merger`: counting and saturation, and the two-clock latency.
* `tb_roc_daq`, `tb_roc_roi`: frame contents against models of the pipelines.
* `tb_cpm`: the whole board at its default size. It runs calibration of every lane,
  400 live crossings with random Level-1 accepts, and then playback of loaded data.
  * It checks the multiplicities of each crossing against the reference and the
    fan-out lanes.
  * It decodes both G-link streams and compares them with the expected events.
  * It counts the BC-mux second slots, non-maximal windows, saturated counts,
    isolation vetoes, e/γ and tau hits, events, playback crossings and parity
    errors. It fails if any of these never happened.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/cpm_pkg.sv tb/tb_ref_pkg.sv \
    rtl/l1_pipeline.sv rtl/srl_chip.sv rtl/cp_sync.sv rtl/bc_demux.sv \
    rtl/cp_window.sv rtl/cp_chip.sv rtl/hit_merger.sv rtl/roc_daq.sv \
    rtl/roc_roi.sv rtl/cpm.sv tb/tb_cpm.sv --top-module tb_cpm
./obj_dir/Vtb_cpm
```

For a unit test, replace `tb/tb_cpm.sv` and the top module name. The full-board
test takes about a minute to build and run.
