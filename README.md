# Geometric-hashing probe engine with a bit-level hash table

Geometric hashing recognises known flat objects in a scene by voting. Off-line, every
model is described by its feature points; for every ordered pair of points taken as a
*basis*, the other points are expressed in the basis frame and hashed, and the pair
(model, basis) is recorded in the hash bin each point falls into. On-line, a *probe*
picks a basis pair in the scene, hashes every other scene point the same way, and gives
one vote to every (model, basis) pair recorded in the bins reached. The pair with the
most votes is the candidate match.

On a parallel computer this is slow because bins hold lists of different lengths and
the votes land on arbitrary vote boxes: processors fight over bins and vote boxes. This
design removes the contention by storing each bin as a **bit vector with one bit per
(model, basis) pair** (a "bit-level hash bin"). With M models of n points there are
Mn(n-1)/2 such pairs; each gets a fixed number, its UID, and bit UID of a bin is 1 when
that pair is recorded there. A probe then becomes a perfectly regular job: read the bit
vector of each bin reached and add it, bit by bit, into one counter per UID; finally
take the maximum of all counters.

The default configuration is sized for 1024 models of 16 points (122880 UIDs), a hash
table of 8K bins (8K x 120K bits = 960 Mbit), and scenes of 256 points. It maps onto 30
processing elements (PEs), each an FPGA with 64 vote boxes and two 512K x 32-bit memory
modules, plus one FPGA for the bin-address generation and one for the global maximum.
At 10 MHz a probe takes 16270 cycles, 1.63 ms.

## Sizes and parameters

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `P` | 30 | processing elements |
| `N` | 64 | bits read per PE per cycle = vote boxes per PE |
| `MUX` | 8 | registers per multiplexer in the local-maximum scan |
| `T` | 64 | time slices: UIDs per PE / N |
| `S` | 256 | scene points; S-2 are voted (the basis pair is skipped) |
| `BIN_W` | 13 | hash bin address width (8K bins) |
| `XY_W`, `UV_W` | 8 | width of each scene / basis-relative coordinate |
| `VOTE_W` | 8 | vote counter width (must hold S-2) |
| `ENTRY_W` | 1 | bits per UID in a bin (see *Several copies of a pair in a bin*) |

The UID count is P·N·T = 30·64·64 = 122880 = 1024·16·15/2. The defaults live in
`rtl/gh_pkg.sv`; every module takes them as parameters, so smaller instances (the
testbenches use P = 3, N = 16, T = 4, S = 16) need no code change. Constraints: `N` a
multiple of `MUX` with N/MUX ≥ 2, `MUX` a power of two, S-2 ≥ MUX, and S-2 < 2^VOTE_W.

## Time slices: how 122880 vote boxes become 1920

Only P·N = 1920 vote boxes exist. The UIDs are therefore covered in T = 64 *time
slices*: in slice j, box b of PE p counts UID

    UID = p·N·T + j·N + b

A probe runs slice by slice. Within a slice, every one of the S-2 non-basis scene points
is hashed and its bin read once, one point per clock, so a probe costs (S-2)·T =
16256 voting cycles. Bin addresses are regenerated by table look-up in every slice
rather than stored.

Because the slices follow each other without a gap, finding the maximum of one slice
has to overlap the voting of the next one (see *Inside a PE*). Only the final slice's
scan, the pipeline fill and the global maximum add to the time: 14 cycles in all.

## Hash table layout in a PE's memory

PE p holds the strip of the table with UIDs p·4096 … p·4096+4095: an 8K-bin x 4K-bit
sub-table. Its two 32-bit memory modules sit side by side to give one 64-bit word per
address (`low module = bits 31:0`). The strip is stored **column-major**: word address

    addr = slice · 2^BIN_W + bin        (= {slice, bin})

so the 64-bit column of slice 0 for all 8K bins comes first, then slice 1, and so on;
512K words per PE. During a probe every PE reads the same address, given by the
bin-address bus.

## Inside a PE

`pe_fpga` holds, per bit of the memory word, a `vote_box`: a counter that adds the bit
on every valid word, and a holding register. The word carrying the last scene point of a
slice copies each counter (including that last bit) into its register and restarts the
counter at zero, so voting for the next slice continues without a pause.

The 64 registers are not compared in one 64-input tree. Instead eight `mux8to1`
multiplexers, each over eight adjacent registers, feed an 8-input `comparator_tree`.
In scan cycle k = 0…7, multiplexer g presents register 8g+k; the tree picks the
largest of the eight and its index g; `local_max_update` keeps it if it beats the
running maximum, with local UID `slice·64 + 8g + k`. The scan needs 8 cycles and
the next slice takes S-2 = 254 cycles to vote, so the scan always finishes first (an
assertion checks S-2 ≥ MUX in simulation). This trades a little time, hidden behind
voting, for a much smaller comparator.

Tie rule: the tree keeps the lower input on equal votes and the running maximum is
replaced only by a strictly larger vote. The winner among equal votes is thus the first
in scan order: lowest PE, then lowest slice, then lowest k, then lowest g.

## Pre-processing: scene point to bin address

`preproc_module` contains the scene buffer (S points as {x, y}), the sequencer
`probe_ctrl`, and two look-up tables:

* `coord_transformer`: (x, y) → (u, v), the point in the frame of the chosen basis.
  The table is filled for the current basis before the probe. This replaces a
  subtraction, two products and a division by one memory read.
* `bin_addr_gen`: (u, v) → bin address. The table holds the equalising hash
  (1 − exp(−(u²+v²)/3σ²), atan2(v, u)), quantised to 8K bins. The quantisation is
  whatever the loaded table says.

`probe_ctrl` counts the point number i = 0…S-3 and maps it to a scene index that skips
both basis points without a bubble: add 1 if the index reaches the lower basis point,
then 1 more if it reaches the higher one. Each bin address leaves tagged with its
slice number and two flags: `last` for the final point of a slice and `plast` for the
final point of the probe. `bin_addr_bus` registers the tagged word once and
broadcasts it to all PEs. A shared bus rather than a tree is enough for 30 PEs.

## Global maximum

`global_max_finder` runs a comparator tree over the 30 local maxima (padded to 32 with
zero votes, which never win). It registers the winner when all PEs report `done`
together. The global UID is `{pe_index, local_uid}`, i.e. p·4096 + local UID.

## Several copies of a pair in a bin

The basic table assumes a (model, basis) pair lands in a given bin at most once. If it
can land there several times, each UID needs a small count instead of one bit. Setting
`ENTRY_W` > 1 does this:

* the memory word of a PE widens to N·ENTRY_W bits, with entry b in bits
  `[b·ENTRY_W +: ENTRY_W]`;
* each vote box adds the ENTRY_W-bit entry instead of a single bit.

An entry then records up to 2^ENTRY_W − 1 copies. `VOTE_W` must be raised to hold
(S-2)·(2^ENTRY_W − 1); an assertion reports a counter overflow in simulation. The
default, `ENTRY_W = 1`, is the one-bit table.

## Pipeline and timing

| Stage, after the sequencer issues the last point | Cycles |
|-------|--------|
| issuing S-2 points per slice, T slices (the scene-buffer read of the last point falls in its final cycle) | (S-2)·T |
| coordinate and bin tables | 2 |
| bin-address bus | 1 |
| PE memory read | 1 |
| counters copied to the vote registers | 1 |
| last register scan | MUX = 8 |
| global maximum register | 1 |

Measured from the `start` edge to `done`: (S-2)·T + 14 = 16270 cycles at the default
sizes, 1.627 ms at 10 MHz.

## Interface of `gh_probe_top`

All ports are plain signals; one clock `clk`, asynchronous active-low reset `rst_n`.

* Loading, done before a probe, with no probe running:
  * `scene_we/addr/data` writes scene point `addr` = {x, y}.
  * `ct_we/addr/data` writes coordinate table entry {x, y} → {u, v}.
  * `bg_we/addr/data` writes bin table entry {u, v} → bin.
  * `hm_we/addr/data` writes word `addr` = {slice, bin} of every PE at once,
    `hm_data[p]` for PE p.

  Only the entries a probe will read need to be written.
* Probe: pulse `start` with `basis_a`, `basis_b` (scene indices, different). `busy`
  stays high until `done` pulses for one cycle. `gmax_vote` and `gmax_uid` then hold
  the winner until the next probe. Whether the vote is "high enough", and which basis
  to try next, is left to the host.

## Files

| File | Block |
|------|-------|
| `rtl/gh_pkg.sv` | default sizes |
| `rtl/gh_probe_top.sv` | whole engine |
| `rtl/preproc_module.sv`, `rtl/probe_ctrl.sv`, `rtl/coord_transformer.sv`, `rtl/bin_addr_gen.sv` | pre-processing |
| `rtl/bin_addr_bus.sv` | bin-address broadcast |
| `rtl/pe.sv`, `rtl/sram_module.sv` | processing element and its memory modules |
| `rtl/pe_fpga.sv`, `rtl/vote_box.sv`, `rtl/mux8to1.sv`, `rtl/comparator_tree.sv`, `rtl/local_max_update.sv` | PE FPGA |
| `rtl/global_max_finder.sv` | post-processing |

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one ends with a
line `TB_RESULT checks=<n> failures=<n>`.

* `tb/tb_gh_probe_top.sv` runs three probes end to end at reduced sizes.
* `tb/tb_gh_probe_full.sv` runs the same three probes at the default sizes.
* `tb/tb_pe_multi.sv` tests a PE with 2-bit entries (`ENTRY_W = 2`).
* `tb/tb_gh_recognition.sv` does real recognition at the default sizes (below).
* `tb/tb_gh_recognition_s200.sv` runs the same test with a 200-point scene on an
  engine built with `S = 200`. The body shared by both is `tb/gh_recognition_tb_body.svh`.

The two end-to-end testbenches share `tb/gh_probe_tb_body.svh`. It builds a synthetic scene, tables
and hash-table words. One probe has a planted UID that must win with S-2 votes. It
computes all votes itself and checks:

* every PE's local maximum;
* the global maximum and its UID;
* the probe time.

It also counts basis skips, slice hand-overs, cycles where a register scan overlaps
voting, and local-maximum updates, and fails if any of them never happens.

`tb_gh_recognition` builds a true geometric-hashing table in the testbench. It draws
1024 models of 16 points from a unit Gaussian and takes every unordered point pair
(i < j) as a basis, origin at point i and unit x axis at point j. It quantises (u, v) to
8 bits with a step of 1/32 and hashes them into 64 radial x 128 angular bins with
r = 1 − exp(−(u²+v²)/3), a = atan2(v, u). The scene is one model, rotated, scaled and
shifted onto the 8-bit pixel grid, mixed with 240 Gaussian clutter points. The probe
uses the images of that model's points 0 and 1 as basis. The test checks three things:

* the engine's maximum equals the testbench's own count;
* the winner is the planted model and basis;
* the probe takes 16270 cycles.

Rounding the scene to the pixel grid moves a few points into a neighbouring bin, so the
winner gets 11 of its 14 possible votes; the best wrong pair gets 7. With 200 scene
points the result is 10 against 6, in 12686 cycles. Building
the table takes a few seconds of simulation.

Simulating with Verilator, for example the full-size test (about 30 s to build, 1 s
to run, 130 MB):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_gh_probe_full rtl/gh_pkg.sv tb/tb_gh_probe_full.sv
    ./obj_dir/Vtb_gh_probe_full

Replace the top module and file to run any other testbench.

## Design choices and limits

Beyond the published architecture, this design makes its own choices for:

* the widths of the coordinates and of the vote counters;
* the one-cycle latency of every table and memory;
* the load ports, the start/busy/done handshake and the reset;
* the tie rule;
* the bit order of the two memory modules.

The PE count is 30: 122880 UIDs divided by 64 bits and 64 slices. Together with the
pre- and post-processing FPGAs this makes 32 FPGAs.

Not included:

* Building the hash table (off-line software) and choosing bases or verifying
  candidates (host software).
* The PCI host interface. Plain load ports replace it.
* Trees for spreading the bin address: the bus suits 30 PEs.

The scene length is fixed at synthesis. A build with `S = 256` always votes 254 points,
so a smaller scene needs a matching `S`.

The memory modules are written as plain synchronous RAM arrays. A board would use
commercial SRAM chips with their own timing.
