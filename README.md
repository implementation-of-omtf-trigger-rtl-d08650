# OMTF muon track finder pipeline

This is a SystemVerilog model of the trigger processor of the CMS Overlap Muon
Track Finder (OMTF). The processor estimates the transverse momentum of muons.
It compares the hits a muon leaves in 18 detector layers with a library of
averaged tracks, called golden patterns. Each pattern stands for one momentum
bin.

The matching works relative to a reference hit. The processor picks a hit in
one of the reference layers. It then takes the azimuthal angle φ of every
other hit relative to that hit (Δφ). For each pattern and layer it asks how
likely that Δφ is. Each pattern stores, per layer, a mean Δφ and a table of
log-probabilities (PDF values) indexed by the distance of a hit from that
mean. The pattern with the most layers "fired" (a non-zero PDF value) wins.
Between patterns that fire the same number of layers, the larger PDF sum wins.

Collisions (bunch crossings, BX) come every 25 ns. The pipeline runs 4 clocks
per BX (160 MHz in the original system). It accepts a new reference hit on
every clock (initiation interval II = 1), so it handles up to 4 reference
hits per BX.

## Data flow

```
hits[18][16] ──► reference-hit extractor ──► data selector ──► Δφ subtractors ──► 20 × GPP ──► sorter + ghost-buster ──► muons[4]
   bx_start        (priority encoder)          (φ window)        φ − φref        (52 patterns)   (per BX)
```

| module | what it does | clocks |
|---|---|---|
| `omtf_ref_hit_extractor` | captures the BX; gives the 4 best reference hits, one per clock | 2 to slot 0 |
| `omtf_prior_enc` | 128-bit two-level priority encoder inside the extractor | combinational + state |
| `omtf_data_selector` | keeps the hits within ±511 of φref | 1 |
| `omtf_dphi_sub` | Δφ = φ − φref for every hit | 1 |
| `omtf_gpp` | Golden Pattern Processor: best pattern of one pattern set | 4 |
| `omtf_sorter_ghostbuster` | best over the GPPs, ghost removal, ordering | 4 after the BX's last slot |
| `omtf_top` | all of the above | `bx_start` → `muons_valid`: 15 |

All sizes, types and the pattern formulas are in `omtf_pkg`.

## Interface of `omtf_top`

- `hits[l][h]` is one `hit_t`: a `valid` bit and an 11-bit unsigned `phi`.
  There are 18 layers `l` with 16 hit slots `h` each.
- The hits are sampled on the clock where `bx_start` is high.
- `bx_start` may come at most once every 4 clocks. An assertion in the
  extractor flags a BX that would cut the previous one short. Gaps between
  BXs are allowed.
- Exactly 15 clocks after `bx_start`, `muons_valid` pulses for one clock.
  `muons[0..3]` then hold the muons of that BX, best first. Unused entries
  have `valid = 0`.
- Each muon (`cand_t`) carries:
  - `pattern`: the global pattern number, 0..51, which is the pT code;
  - `quality`: the number of fired layers;
  - `pdf_sum`: the sum of the PDF values;
  - `fired`: the mask of fired layers;
  - `ref_layer`: the reference layer;
  - `phi`: the track's φ extrapolated to layer 0.
- The reset is synchronous and active high. It clears all valid flags.

## Reference-hit selection and the priority encoder

The reference layers are the even layers 0, 2, …, 14. Each has 16 hit slots.
Together their valid flags form a 128-bit vector. Bit `16·r + h` is slot `h`
of reference layer `r`, and a lower bit has higher priority.

`omtf_prior_enc` keeps a copy of this vector. On every clock it reports the
lowest set bit and clears it. On a `load` clock it takes a new vector instead
of clearing a bit. The bit reported on a load clock still comes from the old
vector.

This ordering is the subtle part. The BX loaded at clock t gets its reference
hits on clocks t+1 … t+4. The 4th of them falls on the next BX's load clock.
If the encoder took the new vector first and searched it afterwards, back-to-back
BXs would lose their last reference hit.

The search has two levels so that it fits in one clock:
1. 16 sub-encoders, each covering 8 bits, find their first set bit in parallel.
2. The first group that has a hit wins.

A searched vector that is reloaded every 4 clocks acts as a ranked queue. A
new BX can start every 4 clocks with no stall.

The extractor also keeps a copy of the BX's hits. It sends that copy down the
pipeline alongside every reference hit. The next BX can therefore be captured
while the previous one is still being processed.

Each clock of the stream carries one of the 4 slots of a BX (`refhit_t`):
- `active`: the clock belongs to a BX;
- `valid`: a reference hit was found;
- `slot`: 0..3;
- `last`: set on slot 3.

All 4 slots are always sent, so every later stage sees a regular stream of 4
entries per BX.

## Golden Pattern Processor

Each of the 20 GPPs holds one pattern set. Sets 0–11 hold 3 patterns and sets
12–19 hold 2, which makes 52 patterns. Each pattern has two tables:

- `mean_lut[p][layer][ref_layer]`: the mean Δφ.
- `pdf_lut[p][layer][{ref_layer, d}]`: the PDF value for distance
  `d = |Δφ − mean|`, with d from 0 to 63.

The work is split over four pipeline stages:

1. For each pattern and layer, the nearest valid hit to the mean is chosen. A
   layer with no hit closer than 64 is not looked up.
2. The PDF value for that distance is read. A value of 0 means the layer did
   not fire.
3. For each pattern, the PDF values are summed and the fired layers counted.
4. The best pattern of the set wins: most fired layers, then largest sum, then
   lowest pattern number. The muon φ is computed as φref + mean of layer 0.

All GPPs have the same depth, so their outputs line up with no extra delay.

### Pattern contents

Real patterns come from detector simulation, and that data is not part of
this design. The tables are filled at start-up from two closed formulas in
`omtf_pkg`. Here `g` is the global pattern, `r` the reference layer, `l` the
layer and `d` the distance:

```
mean(g, r, l)   = (l − 2r) · (g − 26)
pdf(g, r, l, d) = max(0, 127 − (d² >> s)),   s = 1 + (g + l + r) mod 3
```

In this model, a track is a straight line in (layer, φ). The pattern number
sets its slope from −26 to +25. The PDF is a downward parabola in d, which is
the logarithm of a Gaussian. It is 127 at d = 0 and reaches 0 at d ≈ 16–32.

To use real patterns, replace the two `initial` loops in `omtf_gpp` with
`$readmemh` of the real tables, or with a different formula. Keep the address
layout `{ref_layer, d}`. Real tables are large: 52 × 18 × 512 entries of 7 bits
come to about 3.4 Mbit.

## Sorter and ghost-buster

The sorter takes one clock's candidates from all 20 GPPs. It first finds the
best within groups of 4, then the best of the 5 group winners. The winner is
stored by slot.

On the BX's last slot, the 4 winners go through ghost removal. A single muon
often produces several reference hits, one per reference layer it crosses, and
so it is found several times. A candidate is dropped when a better candidate of
the same BX has a layer-0 φ within ±8 of it, compared modulo 2¹¹. Ties go to
the earlier slot.

The survivors are then ordered. The same comparison is used throughout: more
fired layers, then larger PDF sum, then the lower index.

## Where this design departs from the original system

The block structure follows the published OMTF processor:
- extractor;
- data selector;
- Σ subtractors;
- GPP₁…GPP_N;
- muon sorter and ghost-buster.

The following sizes are also taken from it:
- 18 layers;
- 4 reference hits per BX;
- 4 clocks per BX and II = 1;
- a 128-bit priority vector searched as 16 × 8;
- 20 pattern sets holding 52 patterns.

Everything below is this design's own choice:

- **Data formats.** The following are all assumed:
  - 11-bit φ;
  - 16 hit slots per layer;
  - 8 reference layers (the even layers);
  - 6-bit distance;
  - 7-bit PDF values.
- **Pattern contents.** These are the synthetic formulas above, not physics
  patterns. The outputs are therefore checked for consistency with those
  formulas, not for physics performance.
- **Data selector.** Only the name of this block is known. Here it applies a
  ±511 φ window around φref.
- **Hit choice per layer.** When a layer has several hits, the one nearest to
  the pattern mean is used.
- **Ghost-busting rule and output count.** Ghosts are found with the φ window
  described above. All 4 slots are output, sorted.
- **Latency.** This pipeline takes 15 clocks from BX to muons. The original
  handwritten implementation takes 38 clocks and a high-level-synthesis version
  takes 54. The difference comes from the stage split and says nothing about
  achievable clock rate: no timing closure at 160 MHz is claimed.
- **Arrow between GPPs.** The original block diagram shows an arrow from GPP₁
  to GPP_N. Its meaning is not known, so there is no connection between GPPs
  here.

## Simulation

Each module has a self-checking testbench in `tb/`. Each one compares the
module's outputs with a behavioural model, `tb/omtf_model_pkg.sv`. That model
shares only the pattern formulas with the RTL. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. Random stimulus, including
track-like hit patterns, comes from `tb/omtf_stim_pkg.sv`.

| testbench | covers |
|---|---|
| `tb_omtf_prior_enc` | empty, single, dense and random vectors; load-clock behaviour with back-to-back loads |
| `tb_omtf_ref_hit_extractor` | priority order, 4-per-BX cut, empty BXs, 2-clock timing, gaps |
| `tb_omtf_data_selector` | window edges (±511, ±512), missing reference hit |
| `tb_omtf_dphi_sub` | signed Δφ at both window edges |
| `tb_omtf_gpp` | sets 4 (3 patterns) and 17 (2 patterns), tracks, noise, no-match cases |
| `tb_omtf_sorter_ghostbuster` | ties between GPPs, ghosts, invalid slots, gaps |
| `tb_omtf_top` | 300 BXs end to end at full size, latency 15 |

`tb_omtf_top` also counts each of the following mechanisms and fails if any of
them never occurs:
- the priority cut (more than 4 reference-layer hits);
- an empty BX;
- window rejections;
- unfired layers;
- ghosts;
- BXs with several muons;
- back-to-back BXs and idle gaps.

To run, for example, the full-size test with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_omtf_top -y rtl -y tb +libext+.sv \
    rtl/omtf_pkg.sv tb/omtf_model_pkg.sv tb/omtf_stim_pkg.sv tb/tb_omtf_top.sv
./obj_dir/Vtb_omtf_top
```

Building the full processor takes a couple of minutes, because the PDF tables
of all 20 GPPs are filled at start-up. Running the 300 BXs takes seconds.
Verilator has only two signal states, so anything a testbench reads is reset
or initialised explicitly.

## Size

The full processor holds 20 × (2 or 3) × 18 PDF tables of 512 × 7 bits, about
3.4 Mbit in all, plus the mean tables. Every clock, each pattern and layer
compares its mean against 16 hits. That is 52 × 18 × 16 ≈ 15 000 subtractors.
Real hardware would reduce this number in the data selector.
