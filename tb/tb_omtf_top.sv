// tb_omtf_top -- end-to-end test of the OMTF processor at its full size.
//
// Generates bunch crossings of muon-like tracks (hits on a straight line in
// layer/phi space whose slope matches one of the 52 patterns, with smear and
// missing layers) in random noise, and feeds them with `bx_start`, mostly back
// to back every 4 clocks (II = 1) and sometimes with idle gaps. A behavioural
// model computes, for each BX, the 4 reference hits, the best pattern over all
// 20 GPPs for each, ghost removal and ordering; the processor's muons must
// match exactly LATENCY clocks after `bx_start`.
// Mechanisms that must each happen at least once (counted, a failure if not):
// more than 4 reference-layer hits (priority cut), a BX with no reference hit,
// hits rejected by the data-selector window, layers left unfired, a ghost
// removed, a BX with several muons, back-to-back BXs and idle gaps.
module tb_omtf_top;
  import omtf_pkg::*;
  import omtf_model_pkg::*;
  import omtf_stim_pkg::*;

  localparam int N_BX = 300;
  logic clk = 0, rst = 1, bx_start = 0;
  hits_arr_t hits;
  cand_t muons [N_REF_HITS];
  logic muons_valid;
  int checks = 0, failures = 0, cyc = 0;
  int n_cut = 0, n_empty = 0, n_rej = 0, n_unfired = 0, n_ghost = 0, n_multi = 0;
  int n_b2b = 0, n_gap = 0, n_pulses = 0;
  cand_t exp_ring [16][N_REF_HITS];
  int expc [$];
  int exp_wr = 0, exp_rd = 0;

  omtf_top dut (.clk, .rst, .bx_start, .hits, .muons, .muons_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (N_BX * 8 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && muons_valid) begin
      n_pulses++;
      checks++;
      if (expc.size() == 0 || expc[0] != cyc) begin
        failures++;
        $display("FAIL muons_valid at %0d, expected %0d", cyc, expc.size() ? expc[0] : -1);
      end else begin
        void'(expc.pop_front());
        for (int k = 0; k < N_REF_HITS; k++) begin
          cand_t e;
          e = exp_ring[exp_rd % 16][k];
          checks++;
          if (muons[k].valid != e.valid ||
              (e.valid && (muons[k].pattern != e.pattern || muons[k].quality != e.quality ||
                           muons[k].pdf_sum != e.pdf_sum || muons[k].phi != e.phi ||
                           muons[k].fired != e.fired || muons[k].ref_layer != e.ref_layer))) begin
            failures++;
            $display("FAIL cyc=%0d k=%0d got v%0b p%0d q%0d s%0d phi%0d exp v%0b p%0d q%0d s%0d phi%0d",
                     cyc, k, muons[k].valid, muons[k].pattern, muons[k].quality, muons[k].pdf_sum,
                     muons[k].phi, e.valid, e.pattern, e.quality, e.pdf_sum, e.phi);
          end
        end
        exp_rd++;
      end
    end
  end

  // model of one BX
  task automatic expect_bx(hits_arr_t hs);
    mref_t refs [N_REF_HITS];
    muon_arr_t best, srt;
    int ng, nv, nref;
    m_refhits(hs, refs);
    nref = 0;
    for (int k = 0; k < N_REF_HITS; k++) begin
      dphi_arr_t d;
      d = m_dphi(hs, refs[k]);
      nref += refs[k].valid;
      for (int l = 0; l < N_LAYERS; l++)
        for (int h = 0; h < N_HITS; h++)
          if (refs[k].valid && hs[l][h].valid && !d[l][h].valid) n_rej++;
      best[k] = '0;
      for (int g = 0; g < N_GPP; g++) begin
        cand_t c;
        c = m_gpp(g, refs[k].valid, refs[k].ref_layer, refs[k].phi, d);
        if (g == 0 || m_better(c, best[k])) best[k] = c;
      end
      if (best[k].valid && best[k].quality < N_LAYERS) n_unfired++;
    end
    if (nref == 0) n_empty++;
    srt = m_sort(best, ng);
    n_ghost += ng;
    nv = 0;
    for (int k = 0; k < N_REF_HITS; k++) begin
      exp_ring[exp_wr % 16][k] = srt[k];
      nv += srt[k].valid;
    end
    if (nv > 1) n_multi++;
    exp_wr++;
  endtask

  initial begin
    for (int l = 0; l < N_LAYERS; l++) for (int h = 0; h < N_HITS; h++) hits[l][h] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    @(negedge clk);
    for (int b = 0; b < N_BX; b++) begin
      int nrh, ntrk, noise;
      ntrk  = (b % 10 == 0) ? 0 : rnd(1, 3);
      noise = (b % 10 == 0) ? 0 : rnd(0, 3);
      hits = event_hits(ntrk, noise, 3, nrh);
      if (nrh > N_REF_HITS) n_cut++;
      bx_start = 1'b1;
      expect_bx(hits);
      expc.push_back(cyc + LATENCY);
      @(negedge clk);
      bx_start = 1'b0;
      repeat (3) @(negedge clk);
      if (b % 13 == 12) begin
        n_gap++;
        repeat (rnd(1, 6)) @(negedge clk);
      end else n_b2b++;
    end
    repeat (LATENCY + 5) @(negedge clk);
    checks++;
    if (n_pulses != N_BX) begin failures++; $display("FAIL %0d of %0d BXs came out", n_pulses, N_BX); end
    $display("priority_cut=%0d empty_bx=%0d window_rejects=%0d unfired=%0d ghosts=%0d multi_muon=%0d back_to_back=%0d gaps=%0d",
             n_cut, n_empty, n_rej, n_unfired, n_ghost, n_multi, n_b2b, n_gap);
    checks += 8;
    if (n_cut == 0)     begin failures++; $display("FAIL no priority cut"); end
    if (n_empty == 0)   begin failures++; $display("FAIL no empty BX"); end
    if (n_rej == 0)     begin failures++; $display("FAIL no window reject"); end
    if (n_unfired == 0) begin failures++; $display("FAIL no unfired layer"); end
    if (n_ghost == 0)   begin failures++; $display("FAIL no ghost"); end
    if (n_multi == 0)   begin failures++; $display("FAIL no multi-muon BX"); end
    if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back BX"); end
    if (n_gap == 0)     begin failures++; $display("FAIL no idle gap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
