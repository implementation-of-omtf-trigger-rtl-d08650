// tb_omtf_sorter_ghostbuster -- self-checking test of the sorter and ghost-buster.
//
// Feeds BXs of 4 slots, each slot carrying one candidate from each of the 20
// GPPs (random quality and PDF sum, with frequent ties and frequent invalid
// candidates; phi values often within the ghost window of each other). The
// model takes the best candidate per slot, removes ghosts and orders the rest;
// the block's muons must match 4 clocks after the last slot, with exactly one
// `muons_valid` pulse per BX. Counts ghosts removed and ties resolved.
module tb_omtf_sorter_ghostbuster;
  import omtf_pkg::*;
  import omtf_model_pkg::*;
  import omtf_stim_pkg::*;
  logic clk = 0, rst = 1;
  cand_t cand_in [N_GPP];
  cand_t muons [N_REF_HITS];
  logic muons_valid;
  int checks = 0, failures = 0, cyc = 0, n_ghost = 0, n_ties = 0, n_pulses = 0;
  cand_t exp_ring [16][N_REF_HITS];   // expected muons of the last 16 BXs
  int expc [$];
  int exp_wr = 0, exp_rd = 0;

  omtf_sorter_ghostbuster dut (.clk, .rst, .cand_in, .muons, .muons_valid);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
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
        failures++; $display("FAIL unexpected muons_valid at %0d", cyc);
      end else begin
        cand_t e [N_REF_HITS];
        void'(expc.pop_front());
        for (int k = 0; k < N_REF_HITS; k++) e[k] = exp_ring[exp_rd % 16][k];
        exp_rd++;
        for (int k = 0; k < N_REF_HITS; k++) begin
          checks++;
          if (muons[k].valid != e[k].valid ||
              (e[k].valid && (muons[k].pattern != e[k].pattern || muons[k].quality != e[k].quality ||
                              muons[k].pdf_sum != e[k].pdf_sum || muons[k].phi != e[k].phi))) begin
            failures++;
            $display("FAIL cyc=%0d k=%0d got v%0b p%0d q%0d s%0d exp v%0b p%0d q%0d s%0d", cyc, k,
                     muons[k].valid, muons[k].pattern, muons[k].quality, muons[k].pdf_sum,
                     e[k].valid, e[k].pattern, e[k].quality, e[k].pdf_sum);
          end
        end
      end
    end
  end

  initial begin
    for (int g = 0; g < N_GPP; g++) cand_in[g] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int b = 0; b < 500; b++) begin
      muon_arr_t best;
      int base_phi, ng;
      base_phi = rnd(0, 2047);
      for (int s = 0; s < N_REF_HITS; s++) begin
        for (int g = 0; g < N_GPP; g++) begin
          cand_in[g] = '0;
          cand_in[g].active  = 1'b1;
          cand_in[g].last    = (s == 3);
          cand_in[g].slot    = SLOT_W'(s);
          cand_in[g].valid   = ($urandom % 4) != 0 && (b % 9 != 0 || s < 2);
          cand_in[g].quality = QUAL_W'(rnd(8, 12));
          cand_in[g].pdf_sum = SUM_W'(rnd(1000, 1003));
          cand_in[g].pattern = PAT_W'(g * 2 + rnd(0, 1));
          cand_in[g].phi     = PHI_W'(base_phi + (((b % 3) == 0) ? rnd(-20, 20) : rnd(-600, 600)));
          cand_in[g].fired   = N_LAYERS'($urandom);
        end
        best[s] = cand_in[0];
        for (int g = 1; g < N_GPP; g++) begin
          if (m_better(cand_in[g], best[s])) best[s] = cand_in[g];
          else if (!m_better(best[s], cand_in[g]) && cand_in[g].valid) n_ties++;
        end
        if (s == 3) begin
          muon_arr_t srt;
          srt = m_sort(best, ng);
          for (int k = 0; k < N_REF_HITS; k++) exp_ring[exp_wr % 16][k] = srt[k];
          exp_wr++;
          n_ghost += ng;
          expc.push_back(cyc + 4);
        end
        @(negedge clk);
      end
      if (b % 11 == 10) begin
        for (int g = 0; g < N_GPP; g++) cand_in[g] = '0;
        repeat (3) @(negedge clk);
      end
    end
    for (int g = 0; g < N_GPP; g++) cand_in[g] = '0;
    repeat (10) @(negedge clk);
    checks += 3;
    if (n_pulses != 500) begin failures++; $display("FAIL %0d pulses", n_pulses); end
    if (n_ghost == 0) begin failures++; $display("FAIL no ghost seen"); end
    if (n_ties == 0) begin failures++; $display("FAIL no tie seen"); end
    $display("ghosts=%0d ties=%0d", n_ghost, n_ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
