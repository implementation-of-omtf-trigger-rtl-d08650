// omtf_sorter_ghostbuster -- muon sorter and ghost-buster.
//
// Takes the candidates of all GPPs, one reference hit per clock, and produces
// the muons of a BX once its 4 reference hits are in.
//   L1  hierarchical sort, level 1: best candidate within each group of GROUP GPPs
//   L2  hierarchical sort, level 2: best of the group winners; stored by slot
//   GB  on the BX's last slot the 4 best candidates (one per reference hit) are
//       ghost-busted: a candidate whose layer-0 phi lies within GHOST_DPHI of a
//       better one (modulo the phi range) is the same muon found again from
//       another reference hit and is dropped
//   S   the survivors are sorted (most fired layers, then largest PDF sum,
//       then lowest slot) into muons[0..3]; unused entries are invalid
// "Better" is omtf_pkg::cand_better, ties broken by the lower GPP or slot.
// The algorithm names a hierarchical sorter of the best-matched patterns and a
// ghost-buster; the group size, ghost rule, window and output ordering are this
// design's own.
// Interface: `cand_in[N]` from the GPPs; `muons`/`muons_valid` out, one BX per
// pulse of `muons_valid`.
// Timing: `muons_valid` 4 clocks after the last slot of a BX enters.
module omtf_sorter_ghostbuster
  import omtf_pkg::*;
#(
  parameter int unsigned N     = N_GPP,
  parameter int unsigned GROUP = 4
) (
  input  logic  clk,
  input  logic  rst,
  input  cand_t cand_in [N],
  output cand_t muons   [N_REF_HITS],
  output logic  muons_valid
);
  localparam int unsigned NGRP = (N + GROUP - 1) / GROUP;

  // candidate a beats b: better, or equal and earlier in the list
  function automatic logic beats(cand_t a, cand_t b, int ia, int ib);
    return cand_better(a, b) || (!cand_better(b, a) && a.valid && ia < ib);
  endfunction

  // ---------------------------------------------------------------- L1
  cand_t l1 [NGRP];
  always_ff @(posedge clk) begin
    for (int g = 0; g < NGRP; g++) begin
      cand_t best;
      best = cand_in[g*GROUP];
      for (int k = 1; k < GROUP; k++)
        if (g*GROUP + k < N)
          if (cand_better(cand_in[g*GROUP + k], best)) best = cand_in[g*GROUP + k];
      l1[g] <= rst ? '0 : best;
    end
  end

  // ---------------------------------------------------------------- L2
  cand_t l2;
  always_ff @(posedge clk) begin
    cand_t best;
    best = l1[0];
    for (int g = 1; g < NGRP; g++)
      if (cand_better(l1[g], best)) best = l1[g];
    l2 <= rst ? '0 : best;
  end

  // ---------------------------------------------------------------- GB
  cand_t slot_buf [N_REF_HITS];
  cand_t cur      [N_REF_HITS];
  cand_t gb       [N_REF_HITS];
  logic  gb_valid;

  always_comb begin
    for (int k = 0; k < N_REF_HITS; k++)
      cur[k] = (int'(l2.slot) == k) ? l2 : slot_buf[k];
  end

  always_ff @(posedge clk) begin
    if (l2.active) slot_buf[l2.slot] <= l2;
    for (int i = 0; i < N_REF_HITS; i++) begin
      logic ghost;
      ghost = 1'b0;
      for (int j = 0; j < N_REF_HITS; j++) begin
        logic signed [PHI_W-1:0] d;
        d = $signed(cur[i].phi - cur[j].phi);
        if (j != i && beats(cur[j], cur[i], j, i) &&
            (d <= $signed(PHI_W'(GHOST_DPHI))) && (d >= -$signed(PHI_W'(GHOST_DPHI))))
          ghost = 1'b1;
      end
      gb[i]       <= cur[i];
      gb[i].valid <= cur[i].valid && !ghost;
    end
    gb_valid <= !rst && l2.active && l2.last;
  end

  // ---------------------------------------------------------------- S
  always_ff @(posedge clk) begin
    cand_t sorted [N_REF_HITS];
    for (int k = 0; k < N_REF_HITS; k++) sorted[k] = '0;
    for (int i = 0; i < N_REF_HITS; i++) begin
      int rank;
      rank = 0;
      for (int j = 0; j < N_REF_HITS; j++)
        if (j != i && beats(gb[j], gb[i], j, i)) rank++;
      if (gb[i].valid) sorted[rank] = gb[i];
    end
    if (gb_valid) muons <= sorted;
    if (rst) for (int k = 0; k < N_REF_HITS; k++) muons[k] <= '0;
    muons_valid <= !rst && gb_valid;
  end

endmodule
