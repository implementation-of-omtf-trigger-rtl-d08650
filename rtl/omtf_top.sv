// omtf_top -- Overlap Muon Track Finder processor.
//
// Finds muon tracks and their transverse momentum from the hits of 18 detector
// layers by comparing them with a set of averaged tracks (golden patterns).
// Once per bunch crossing (BX) the hits of all layers are presented with
// `bx_start`. The pipeline then runs at 4 clocks per BX with II = 1, one
// reference hit per clock:
//   reference-hit extractor  up to 4 highest-priority hits of the reference layers
//   data selector            hits within the phi window of the reference hit
//   delta-phi subtractors    dphi = phi - phi_ref for every selected hit
//   20 GPPs                  best of 52 patterns (PDF lookups, sums, fired layers)
//   sorter + ghost-buster    best pattern per reference hit, ghosts removed, sorted
// This block structure follows the algorithm; the delays of the parallel
// branches are balanced by construction, since every GPP has the same 4-stage
// pipeline.
// Interface: `hits[l][h]` (valid + 11-bit phi) for layer l, slot h, sampled
// with `bx_start`, which may come at most once every 4 clocks. `muons[0..3]`
// are the muons of one BX, best first, valid while `muons_valid` pulses.
// Timing: `muons_valid` comes LATENCY = 15 clocks after `bx_start`.
module omtf_top
  import omtf_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  bx_start,
  input  hit_t  hits  [N_LAYERS][N_HITS],
  output cand_t muons [N_REF_HITS],
  output logic  muons_valid
);
  refhit_t ex_ref, sel_ref, sub_ref;
  hit_t    ex_hits  [N_LAYERS][N_HITS];
  hit_t    sel_hits [N_LAYERS][N_HITS];
  dhit_t   dphi     [N_LAYERS][N_HITS];
  cand_t   cand     [N_GPP];

  omtf_ref_hit_extractor u_extractor (
    .clk, .rst, .bx_start, .hits, .ref_out(ex_ref), .hits_out(ex_hits)
  );

  omtf_data_selector u_selector (
    .clk, .rst, .ref_in(ex_ref), .hits_in(ex_hits), .ref_out(sel_ref), .sel_out(sel_hits)
  );

  omtf_dphi_sub u_sub (
    .clk, .rst, .ref_in(sel_ref), .sel_in(sel_hits), .ref_out(sub_ref), .dphi_out(dphi)
  );

  for (genvar g = 0; g < N_GPP; g++) begin : g_gpp
    omtf_gpp #(.GPP_INDEX(g)) u_gpp (
      .clk, .rst, .ref_in(sub_ref), .dphi_in(dphi), .cand(cand[g])
    );
  end

  omtf_sorter_ghostbuster #(.N(N_GPP)) u_sorter (
    .clk, .rst, .cand_in(cand), .muons, .muons_valid
  );

endmodule
