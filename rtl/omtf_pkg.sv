// omtf_pkg -- constants, data types and pattern-definition formulas shared by
// the Overlap Muon Track Finder (OMTF) pipeline.
//
// The pipeline looks at 18 detector layers. Once per bunch crossing (BX) it picks
// up to 4 reference hits from the reference layers (a 128-bit priority vector)
// and spends 4 clocks per BX (160 MHz for a 40 MHz BX rate), one reference hit
// per clock. 20 golden-pattern processors (GPPs) hold 52 track patterns in
// total. Those numbers come from the algorithm description. The rest is this
// design's own choice: 8 reference layers of 16 hit slots each (8 x 16 = 128),
// 11-bit phi, 6-bit PDF addresses, 7-bit PDF values and the synthetic pattern
// set. The real pattern contents come from physics simulation and are not
// given. They are replaced by two closed formulas:
//   mean delta-phi  mean(g, r, l) = (l - refphys(r)) * (g - 26)
//   PDF value       pdf(g, r, l, d) = max(0, 127 - (d*d >> s)), s = 1 + (g+l+r) mod 3
// where g is the global pattern number, r the reference layer, l the layer and
// d = |dphi - mean| the distance. The PDF is a parabola in d: the logarithm of a
// Gaussian hit distribution.
package omtf_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_LAYERS      = 18;   // detector layers
  localparam int unsigned N_REF_LAYERS  = 8;    // reference layers (assumed)
  localparam int unsigned N_HITS        = 16;   // hit slots per layer (assumed)
  localparam int unsigned REF_BITS      = N_REF_LAYERS * N_HITS; // 128
  localparam int unsigned PE_SUB        = 8;    // width of one sub-encoder
  localparam int unsigned N_REF_HITS    = 4;    // reference hits per BX
  localparam int unsigned CLK_PER_BX    = 4;    // clocks per BX
  localparam int unsigned N_GPP         = 20;   // pattern sets (GPPs)
  localparam int unsigned N_PAT_TOTAL   = 52;   // track patterns in all sets
  localparam int unsigned MAX_PAT       = 3;    // patterns in the largest set

  localparam int unsigned PHI_W         = 11;   // hit phi, unsigned
  localparam int unsigned DPHI_W        = 11;   // delta-phi, signed
  localparam int unsigned PDF_ADDR_W    = 6;    // distance bins per LUT
  localparam int unsigned PDF_W         = 7;    // PDF value
  localparam int unsigned PDF_MAX       = 127;
  localparam int unsigned SUM_W         = 12;   // sum of 18 PDF values
  localparam int unsigned QUAL_W        = 5;    // fired-layer count 0..18
  localparam int unsigned PAT_W         = 6;    // global pattern number 0..51
  localparam int unsigned SEL_WINDOW    = 511;  // data-selector |phi - phi_ref| window
  localparam int unsigned GHOST_DPHI    = 8;    // ghost-buster phi window
  localparam int unsigned LATENCY       = 15;   // bx_start to muons_valid, clocks

  localparam int unsigned REF_IDX_W     = $clog2(REF_BITS);      // 7
  localparam int unsigned REF_LAYER_W   = $clog2(N_REF_LAYERS);  // 3
  localparam int unsigned SLOT_W        = $clog2(N_REF_HITS);    // 2
  localparam int unsigned HIT_W         = $clog2(N_HITS);        // 4

  // ---------------------------------------------------------------- types
  typedef struct packed {
    logic             valid;
    logic [PHI_W-1:0] phi;
  } hit_t;

  // One reference hit travelling down the pipeline (one per clock).
  typedef struct packed {
    logic                   active;  // this clock carries one of the 4 slots of a BX
    logic                   valid;   // a reference hit was found
    logic                   last;    // 4th clock of the BX
    logic [SLOT_W-1:0]      slot;    // 0..3 inside the BX
    logic [REF_LAYER_W-1:0] ref_layer;
    logic [REF_IDX_W-1:0]   ref_idx; // position in the 128-bit priority vector
    logic [PHI_W-1:0]       phi;     // phi_ref
  } refhit_t;

  typedef struct packed {
    logic                     valid;
    logic signed [DPHI_W-1:0] dphi;
  } dhit_t;

  // Best-matched pattern of one reference hit (GPP output, muon candidate).
  typedef struct packed {
    logic                   active;   // one of the 4 slots of a BX
    logic                   last;     // slot 3
    logic                   valid;    // a pattern matched
    logic [SLOT_W-1:0]      slot;
    logic [REF_LAYER_W-1:0] ref_layer;
    logic [PHI_W-1:0]       phi;      // phi extrapolated to layer 0
    logic [PAT_W-1:0]       pattern;  // global pattern number, the pT code
    logic [QUAL_W-1:0]      quality;  // number of fired layers
    logic [SUM_W-1:0]       pdf_sum;
    logic [N_LAYERS-1:0]    fired;
  } cand_t;

  // ---------------------------------------------------------------- patterns
  function automatic int unsigned ref_layer_phys(int unsigned r);
    return 2 * r; // reference layers are the even layers 0..14
  endfunction

  function automatic int unsigned gpp_n_pat(int unsigned gpp);
    return (gpp < 12) ? 3 : 2;  // 12*3 + 8*2 = 52 patterns
  endfunction

  function automatic int unsigned gpp_base(int unsigned gpp);
    return (gpp < 12) ? 3 * gpp : 36 + 2 * (gpp - 12);
  endfunction

  function automatic int pat_slope(int unsigned g);
    return int'(g) - 26;
  endfunction

  function automatic int pat_mean(int unsigned g, int unsigned r, int unsigned l);
    return (int'(l) - int'(ref_layer_phys(r))) * pat_slope(g);
  endfunction

  function automatic int unsigned pat_pdf(int unsigned g, int unsigned r,
                                          int unsigned l, int unsigned d);
    int unsigned s;
    int v;
    s = 1 + ((g + l + r) % 3);
    v = int'(PDF_MAX) - int'((d * d) >> s);
    return (v < 0) ? 0 : v;
  endfunction

  // Candidate ordering: more fired layers first, then larger PDF sum.
  function automatic logic cand_better(cand_t a, cand_t b);
    if (!a.valid) return 1'b0;
    if (!b.valid) return 1'b1;
    if (a.quality != b.quality) return a.quality > b.quality;
    return a.pdf_sum > b.pdf_sum;
  endfunction

endpackage
