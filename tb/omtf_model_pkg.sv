// omtf_model_pkg -- behavioural reference model of the OMTF pipeline, used by
// the testbenches to work out the expected results.
//
// It evaluates each step directly, one BX at a time, with integer arithmetic:
// reference hits as the first 4 valid slots of the reference layers in priority
// order, the phi window, delta-phi, the nearest-hit distance and PDF of every
// pattern and layer, the best pattern of every set and of all sets, ghost
// removal and the final ordering. Only the pattern definitions (the closed
// formulas of omtf_pkg) are shared with the RTL.
package omtf_model_pkg;
  import omtf_pkg::*;

  typedef hit_t  hits_arr_t [N_LAYERS][N_HITS];
  typedef dhit_t dphi_arr_t [N_LAYERS][N_HITS];
  typedef cand_t muon_arr_t [N_REF_HITS];

  typedef struct {
    bit valid;
    int ref_layer;
    int idx;
    int phi;
  } mref_t;

  function automatic int iabs(int x);
    return (x < 0) ? -x : x;
  endfunction

  // strict "better": more fired layers, then larger PDF sum
  function automatic bit m_better(cand_t a, cand_t b);
    if (!a.valid) return 0;
    if (!b.valid) return 1;
    if (a.quality != b.quality) return a.quality > b.quality;
    return a.pdf_sum > b.pdf_sum;
  endfunction

  function automatic void m_refhits(hits_arr_t hits, output mref_t refs [N_REF_HITS]);
    int n = 0;
    for (int k = 0; k < N_REF_HITS; k++) refs[k] = '{0, 0, 0, 0};
    for (int r = 0; r < N_REF_LAYERS; r++)
      for (int h = 0; h < N_HITS; h++)
        if (n < N_REF_HITS && hits[2*r][h].valid) begin
          refs[n] = '{1, r, r * N_HITS + h, int'(hits[2*r][h].phi)};
          n++;
        end
  endfunction

  function automatic dphi_arr_t m_dphi(hits_arr_t hits, mref_t rf);
    dphi_arr_t d;
    for (int l = 0; l < N_LAYERS; l++)
      for (int h = 0; h < N_HITS; h++) begin
        int x = int'(hits[l][h].phi) - rf.phi;
        d[l][h].valid = rf.valid && hits[l][h].valid && iabs(x) <= int'(SEL_WINDOW);
        d[l][h].dphi  = DPHI_W'(x);
      end
    return d;
  endfunction

  // best pattern of GPP `gpp` for one reference hit
  function automatic cand_t m_gpp(int gpp, bit rvalid, int ref_layer, int ref_phi,
                                  dphi_arr_t d);
    cand_t best;
    best = '0;
    for (int p = 0; p < int'(gpp_n_pat(gpp)); p++) begin
      cand_t c;
      int g = int'(gpp_base(gpp)) + p;
      int sum = 0, q = 0;
      c = '0;
      for (int l = 0; l < N_LAYERS; l++) begin
        int mn = 1 << 20;
        for (int h = 0; h < N_HITS; h++)
          if (d[l][h].valid) begin
            int dst = iabs(int'(d[l][h].dphi) - pat_mean(g, ref_layer, l));
            if (dst < mn) mn = dst;
          end
        if (rvalid && mn < (1 << PDF_ADDR_W)) begin
          int v = int'(pat_pdf(g, ref_layer, l, mn));
          sum += v;
          if (v != 0) begin q++; c.fired[l] = 1'b1; end
        end
      end
      c.valid   = rvalid && q != 0;
      c.pattern = PAT_W'(g);
      c.quality = QUAL_W'(q);
      c.pdf_sum = SUM_W'(sum);
      c.phi     = PHI_W'(ref_phi + pat_mean(g, ref_layer, 0));
      c.ref_layer = REF_LAYER_W'(ref_layer);
      if (p == 0 || m_better(c, best)) best = c;
    end
    return best;
  endfunction

  function automatic bit m_beats(cand_t a, cand_t b, int ia, int ib);
    return m_better(a, b) || (!m_better(b, a) && a.valid && ia < ib);
  endfunction

  // ghost removal and ordering of the 4 per-reference-hit winners
  function automatic muon_arr_t m_sort(muon_arr_t c, output int n_ghosts);
    muon_arr_t out;
    cand_t g [N_REF_HITS];
    n_ghosts = 0;
    for (int i = 0; i < N_REF_HITS; i++) begin
      bit ghost = 0;
      for (int j = 0; j < N_REF_HITS; j++) begin
        int dd = (int'(c[i].phi) - int'(c[j].phi)) & ((1 << PHI_W) - 1);
        if (dd >= (1 << (PHI_W - 1))) dd -= (1 << PHI_W);
        if (j != i && m_beats(c[j], c[i], j, i) && iabs(dd) <= int'(GHOST_DPHI)) ghost = 1;
      end
      g[i] = c[i];
      if (ghost && c[i].valid) n_ghosts++;
      g[i].valid = c[i].valid && !ghost;
    end
    for (int k = 0; k < N_REF_HITS; k++) out[k] = '0;
    for (int i = 0; i < N_REF_HITS; i++) begin
      int rank = 0;
      for (int j = 0; j < N_REF_HITS; j++)
        if (j != i && m_beats(g[j], g[i], j, i)) rank++;
      if (g[i].valid) out[rank] = g[i];
    end
    return out;
  endfunction

endpackage
