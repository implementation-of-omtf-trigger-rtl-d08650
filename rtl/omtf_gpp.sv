// omtf_gpp -- Golden Pattern Processor: matches one reference hit's delta-phi
// values against one set of track patterns.
//
// Each pattern p of the set holds, for every reference layer r and layer l, the
// mean delta-phi of its track (mean_lut) and a PDF lookup table (pdf_lut)
// addressed by {r, d}, where d = |dphi - mean| is the distance of a hit from
// the pattern's mean. Per clock (II = 1), for one reference hit:
//   stage 1  per pattern and layer, the hit nearest to the mean is chosen;
//            a layer with no hit closer than 2**PDF_ADDR_W is not looked up
//   stage 2  the PDF value of that distance is read (0 = layer not fired)
//   stage 3  per pattern, the PDF values are summed and the fired layers counted
//   stage 4  the best pattern of the set wins: most fired layers, then the
//            largest PDF sum, then the lowest pattern number
// The winner is sent out as a muon candidate with its global pattern number
// (the pT code), the fired-layer count (quality), the PDF sum, the fired-layer
// mask and its phi extrapolated to layer 0 (phi_ref + mean of layer 0).
// The distance/PDF-lookup/sum scheme is the algorithm's; the stage split, the
// ordering rule and the pattern contents (closed formulas in omtf_pkg, loaded
// into the tables at start-up) are this design's own.
// Interface: `ref_in`/`dphi_in` from the subtractors; `cand` out.
// Timing: 4 register stages, `cand` 4 clocks after `ref_in`.
module omtf_gpp
  import omtf_pkg::*;
#(
  parameter int unsigned GPP_INDEX = 0   // which of the N_GPP pattern sets
) (
  input  logic    clk,
  input  logic    rst,
  input  refhit_t ref_in,
  input  dhit_t   dphi_in [N_LAYERS][N_HITS],
  output cand_t   cand
);
  localparam int unsigned NPAT   = gpp_n_pat(GPP_INDEX);
  localparam int unsigned BASE   = gpp_base(GPP_INDEX);
  localparam int unsigned DEPTH  = N_REF_LAYERS << PDF_ADDR_W;
  localparam int unsigned DIST_W = DPHI_W + 1;

  // ---------------------------------------------------------------- tables
  logic signed [DPHI_W-1:0] mean_lut [NPAT][N_LAYERS][N_REF_LAYERS];
  logic [PDF_W-1:0]         pdf_lut  [NPAT][N_LAYERS][DEPTH];

  initial begin
    for (int unsigned p = 0; p < NPAT; p++)
      for (int unsigned l = 0; l < N_LAYERS; l++)
        for (int unsigned r = 0; r < N_REF_LAYERS; r++) begin
          mean_lut[p][l][r] = DPHI_W'(pat_mean(BASE + p, r, l));
          for (int unsigned d = 0; d < (1 << PDF_ADDR_W); d++)
            pdf_lut[p][l][(r << PDF_ADDR_W) + d] = PDF_W'(pat_pdf(BASE + p, r, l, d));
        end
  end

  // ---------------------------------------------------------------- stage 1
  refhit_t                  s1_ref;
  logic                     s1_ok   [NPAT][N_LAYERS];
  logic [PDF_ADDR_W-1:0]    s1_dist [NPAT][N_LAYERS];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPAT; p++)
      for (int l = 0; l < N_LAYERS; l++) begin
        logic [DIST_W-1:0] best;
        logic [DIST_W-1:0] d;
        logic signed [DIST_W-1:0] diff;
        best = '1;
        for (int h = 0; h < N_HITS; h++) begin
          diff = DIST_W'(dphi_in[l][h].dphi) - DIST_W'(mean_lut[p][l][ref_in.ref_layer]);
          d    = diff[DIST_W-1] ? DIST_W'(-diff) : DIST_W'(diff);
          if (dphi_in[l][h].valid && d < best) best = d;
        end
        s1_ok[p][l]   <= !rst && ref_in.valid && (best < DIST_W'(1 << PDF_ADDR_W));
        s1_dist[p][l] <= best[PDF_ADDR_W-1:0];
      end
    if (rst) s1_ref <= '0;
    else     s1_ref <= ref_in;
  end

  // ---------------------------------------------------------------- stage 2
  refhit_t          s2_ref;
  logic [PDF_W-1:0] s2_pdf [NPAT][N_LAYERS];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPAT; p++)
      for (int l = 0; l < N_LAYERS; l++)
        s2_pdf[p][l] <= (s1_ok[p][l] && !rst) ?
                        pdf_lut[p][l][{s1_ref.ref_layer, s1_dist[p][l]}] : '0;
    if (rst) s2_ref <= '0;
    else     s2_ref <= s1_ref;
  end

  // ---------------------------------------------------------------- stage 3
  refhit_t             s3_ref;
  logic [SUM_W-1:0]    s3_sum   [NPAT];
  logic [QUAL_W-1:0]   s3_qual  [NPAT];
  logic [N_LAYERS-1:0] s3_fired [NPAT];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPAT; p++) begin
      logic [SUM_W-1:0]  sum;
      logic [QUAL_W-1:0] q;
      sum = '0;
      q   = '0;
      for (int l = 0; l < N_LAYERS; l++) begin
        sum = sum + SUM_W'(s2_pdf[p][l]);
        q   = q + QUAL_W'(s2_pdf[p][l] != '0);
        s3_fired[p][l] <= (s2_pdf[p][l] != '0);
      end
      s3_sum[p]  <= sum;
      s3_qual[p] <= q;
    end
    if (rst) s3_ref <= '0;
    else     s3_ref <= s2_ref;
  end

  // ---------------------------------------------------------------- stage 4
  always_ff @(posedge clk) begin
    cand_t c, best;
    best = '0;
    for (int p = 0; p < NPAT; p++) begin
      c           = '0;
      c.valid     = s3_ref.valid && (s3_qual[p] != '0);
      c.pattern   = PAT_W'(BASE + p);
      c.quality   = s3_qual[p];
      c.pdf_sum   = s3_sum[p];
      c.fired     = s3_fired[p];
      c.phi       = s3_ref.phi + PHI_W'(mean_lut[p][0][s3_ref.ref_layer]);
      if (p == 0 || cand_better(c, best)) best = c;
    end
    best.active    = s3_ref.active;
    best.last      = s3_ref.last;
    best.slot      = s3_ref.slot;
    best.ref_layer = s3_ref.ref_layer;
    if (rst) cand <= '0;
    else     cand <= best;
  end

endmodule
