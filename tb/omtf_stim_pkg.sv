// omtf_stim_pkg -- stimulus generators shared by the OMTF testbenches.
//
// Produces hit patterns that look like muon tracks: a track follows one of the
// golden patterns (mean delta-phi per layer) with a small random smear, misses
// some layers, and sits among random noise hits.
package omtf_stim_pkg;
  import omtf_pkg::*;
  import omtf_model_pkg::*;

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  // delta-phi array of one track seen from reference layer r, plus noise
  function automatic dphi_arr_t track_dphi(int g, int r, int smear, int noise_pct);
    dphi_arr_t d;
    for (int l = 0; l < N_LAYERS; l++)
      for (int h = 0; h < N_HITS; h++) begin
        d[l][h].valid = ($urandom % 100) < noise_pct;
        d[l][h].dphi  = DPHI_W'(rnd(-int'(SEL_WINDOW), int'(SEL_WINDOW)));
      end
    for (int l = 0; l < N_LAYERS; l++)
      if (($urandom % 100) < 80 || l == 2 * r) begin
        int x = pat_mean(g, r, l) + ((l == 2 * r) ? 0 : rnd(-smear, smear));
        int h = rnd(0, N_HITS - 1);
        if (x > int'(SEL_WINDOW)) x = SEL_WINDOW;
        if (x < -int'(SEL_WINDOW)) x = -int'(SEL_WINDOW);
        d[l][h].valid = 1'b1;
        d[l][h].dphi  = DPHI_W'(x);
      end
    return d;
  endfunction

  // hits of all layers: up to ntrk tracks plus noise in a free-running detector
  function automatic hits_arr_t event_hits(int ntrk, int noise_pct, int smear,
                                           output int n_ref_layer_hits);
    hits_arr_t hs;
    n_ref_layer_hits = 0;
    for (int l = 0; l < N_LAYERS; l++)
      for (int h = 0; h < N_HITS; h++) begin
        hs[l][h].valid = ($urandom % 100) < noise_pct;
        hs[l][h].phi   = PHI_W'(rnd(0, (1 << PHI_W) - 1));
      end
    for (int t = 0; t < ntrk; t++) begin
      int g   = rnd(0, N_PAT_TOTAL - 1);
      int phi0 = rnd(500, 1500);
      for (int l = 0; l < N_LAYERS; l++)
        if (($urandom % 100) < 85) begin
          // hit phi = phi0 + l * slope, i.e. mean(g, r, l) seen from any layer
          int x = phi0 + l * pat_slope(g) + rnd(-smear, smear);
          int h = rnd(0, N_HITS - 1);
          if (x >= 0 && x < (1 << PHI_W)) begin
            hs[l][h].valid = 1'b1;
            hs[l][h].phi   = PHI_W'(x);
          end
        end
    end
    for (int r = 0; r < N_REF_LAYERS; r++)
      for (int h = 0; h < N_HITS; h++) n_ref_layer_hits += hs[2*r][h].valid;
    return hs;
  endfunction
endpackage
