// tb_omtf_gpp -- self-checking test of the Golden Pattern Processor.
//
// Two GPPs are tested side by side: set 4 (3 patterns) and set 17 (2 patterns).
// Every clock a new reference hit with a track-like delta-phi array (or pure
// noise, or no reference hit) enters; 4 clocks later each GPP's candidate must
// equal the model's best pattern of that set (pattern number, fired layers,
// mask, PDF sum and layer-0 phi). The test also counts how often a track was
// matched, how often layers went unfired and how often no pattern matched.
module tb_omtf_gpp;
  import omtf_pkg::*;
  import omtf_model_pkg::*;
  import omtf_stim_pkg::*;

  localparam int GA = 4, GB = 17, NCYC = 3000;
  logic clk = 0, rst = 1;
  refhit_t ref_in;
  dphi_arr_t dphi_in;
  cand_t cand_a, cand_b;
  int checks = 0, failures = 0, cyc = 0;
  int n_matched = 0, n_unfired = 0, n_nomatch = 0;

  omtf_gpp #(.GPP_INDEX(GA)) dut_a (.clk, .rst, .ref_in, .dphi_in, .cand(cand_a));
  omtf_gpp #(.GPP_INDEX(GB)) dut_b (.clk, .rst, .ref_in, .dphi_in, .cand(cand_b));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cand_t exp_a [$], exp_b [$];
  int    exp_cyc [$];

  function automatic bit same(cand_t a, cand_t e);
    if (a.valid != e.valid) return 0;
    if (!e.valid) return 1;
    return a.pattern == e.pattern && a.quality == e.quality && a.pdf_sum == e.pdf_sum &&
           a.fired == e.fired && a.phi == e.phi && a.ref_layer == e.ref_layer;
  endfunction

  always @(negedge clk) begin
    if (!rst && exp_cyc.size() > 0 && exp_cyc[0] == cyc) begin
      cand_t ea, eb;
      void'(exp_cyc.pop_front());
      ea = exp_a.pop_front();
      eb = exp_b.pop_front();
      checks += 2;
      if (!same(cand_a, ea)) begin
        failures++;
        $display("FAIL A cyc=%0d got v%0b p%0d q%0d s%0d phi%0d exp v%0b p%0d q%0d s%0d phi%0d",
                 cyc, cand_a.valid, cand_a.pattern, cand_a.quality, cand_a.pdf_sum, cand_a.phi,
                 ea.valid, ea.pattern, ea.quality, ea.pdf_sum, ea.phi);
      end
      if (!same(cand_b, eb)) begin
        failures++;
        $display("FAIL B cyc=%0d got v%0b p%0d q%0d s%0d exp v%0b p%0d q%0d s%0d",
                 cyc, cand_b.valid, cand_b.pattern, cand_b.quality, cand_b.pdf_sum,
                 eb.valid, eb.pattern, eb.quality, eb.pdf_sum);
      end
      if (ea.valid && ea.quality < N_LAYERS) n_unfired++;
      if (ea.valid && ea.quality >= 10) n_matched++;
      if (!ea.valid) n_nomatch++;
    end
  end

  initial begin
    ref_in = '0;
    for (int l = 0; l < N_LAYERS; l++) for (int h = 0; h < N_HITS; h++) dphi_in[l][h] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int t = 0; t < NCYC; t++) begin
      int kind, g;
      kind = $urandom % 10;
      g = (kind < 5) ? int'(gpp_base(kind < 3 ? GA : GB)) + rnd(0, 1) : rnd(0, N_PAT_TOTAL - 1);
      ref_in = '0;
      ref_in.active    = 1'b1;
      ref_in.valid     = (kind != 9);
      ref_in.slot      = SLOT_W'(t);
      ref_in.last      = (t % 4) == 3;
      ref_in.ref_layer = REF_LAYER_W'(rnd(0, N_REF_LAYERS - 1));
      ref_in.phi       = PHI_W'(rnd(0, (1 << PHI_W) - 1));
      dphi_in = track_dphi(g, int'(ref_in.ref_layer), (kind == 8) ? 200 : 10, (kind == 7) ? 30 : 3);
      if (kind == 8) for (int l = 0; l < N_LAYERS; l++) for (int h = 0; h < N_HITS; h++)
        dphi_in[l][h].valid = 1'b0;   // nothing at all: no pattern can match
      exp_a.push_back(m_gpp(GA, ref_in.valid, int'(ref_in.ref_layer), int'(ref_in.phi), dphi_in));
      exp_b.push_back(m_gpp(GB, ref_in.valid, int'(ref_in.ref_layer), int'(ref_in.phi), dphi_in));
      exp_cyc.push_back(cyc + 4);
      @(negedge clk);
    end
    ref_in = '0;
    repeat (8) @(negedge clk);
    checks++;
    if (exp_cyc.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    checks += 3;
    if (n_matched == 0) begin failures++; $display("FAIL no good match seen"); end
    if (n_unfired == 0) begin failures++; $display("FAIL no unfired layer seen"); end
    if (n_nomatch == 0) begin failures++; $display("FAIL no empty candidate seen"); end
    $display("matched=%0d with_unfired_layers=%0d no_match=%0d", n_matched, n_unfired, n_nomatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
