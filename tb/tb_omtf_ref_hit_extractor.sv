// tb_omtf_ref_hit_extractor -- self-checking test of the reference-hit extractor.
//
// Drives random BXs (empty ones, sparse and crowded reference layers), both
// back to back (a BX every 4 clocks) and with idle gaps. For each BX a model
// lists the valid slots of the reference layers in priority order (reference
// layer, then slot) and expects the first 4 of them on slots 0..3 of `ref_out`,
// exactly 2 clocks after `bx_start`, with the right layer, bit index and phi,
// and the captured hits alongside.
module tb_omtf_ref_hit_extractor;
  import omtf_pkg::*;
  logic clk = 0, rst = 1, bx_start = 0;
  hit_t hits [N_LAYERS][N_HITS];
  refhit_t ref_out;
  hit_t hits_out [N_LAYERS][N_HITS];
  int checks = 0, failures = 0;
  int cyc = 0;

  omtf_ref_hit_extractor dut (.clk, .rst, .bx_start, .hits, .ref_out, .hits_out);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected stream, keyed by the cycle the slot must appear
  typedef struct { int cyc; logic valid; int slot; int idx; int phi; int bx; } exp_t;
  exp_t expq [$];
  hit_t ring [8][N_LAYERS][N_HITS];  // captured inputs of the last 8 BXs
  int   bx_no = 0;

  task automatic make_bx(int kind);
    for (int l = 0; l < N_LAYERS; l++)
      for (int h = 0; h < N_HITS; h++) begin
        hits[l][h].phi = PHI_W'($urandom);
        case (kind)
          0: hits[l][h].valid = 1'b0;
          1: hits[l][h].valid = ($urandom % 40) == 0;
          2: hits[l][h].valid = ($urandom % 4) == 0;
          default: hits[l][h].valid = ($urandom % 2) == 0;
        endcase
      end
  endtask

  task automatic expect_bx(int start_cyc);
    int n = 0;
    for (int i = 0; i < REF_BITS && n < N_REF_HITS; i++) begin
      int l = ref_layer_phys(i / N_HITS);
      if (hits[l][i % N_HITS].valid) begin
        expq.push_back('{start_cyc + 2 + n, 1'b1, n, i, int'(hits[l][i % N_HITS].phi), bx_no});
        n++;
      end
    end
    for (; n < N_REF_HITS; n++) expq.push_back('{start_cyc + 2 + n, 1'b0, n, 0, 0, bx_no});
    for (int l = 0; l < N_LAYERS; l++)
      for (int h = 0; h < N_HITS; h++) ring[bx_no % 8][l][h] = hits[l][h];
    bx_no++;
  endtask

  // monitor
  always @(negedge clk) begin
    if (!rst && ref_out.active) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected output at cycle %0d", cyc);
      end else begin
        e = expq.pop_front();
        if (e.cyc != cyc || ref_out.valid != e.valid || int'(ref_out.slot) != e.slot ||
            ref_out.last != (e.slot == 3) ||
            (e.valid && (int'(ref_out.ref_idx) != e.idx || int'(ref_out.phi) != e.phi ||
                         int'(ref_out.ref_layer) != e.idx / N_HITS))) begin
          failures++;
          $display("FAIL cyc=%0d exp_cyc=%0d valid=%0b/%0b slot=%0d/%0d idx=%0d/%0d phi=%0d/%0d",
                   cyc, e.cyc, ref_out.valid, e.valid, ref_out.slot, e.slot,
                   ref_out.ref_idx, e.idx, ref_out.phi, e.phi);
        end
        checks++;
        begin
          int bad = 0;
          for (int l = 0; l < N_LAYERS; l++)
            for (int h = 0; h < N_HITS; h++)
              if (hits_out[l][h] != ring[e.bx % 8][l][h]) bad++;
          if (bad != 0) begin failures++; $display("FAIL hits_out mismatch cyc=%0d (%0d slots)", cyc, bad); end
        end
      end
    end
  end

  initial begin
    make_bx(0);
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int b = 0; b < 400; b++) begin
      @(negedge clk);
      make_bx($urandom % 4);
      bx_start = 1;
      expect_bx(cyc);
      @(negedge clk); bx_start = 0;
      repeat (2 + ((b % 7 == 6) ? ($urandom % 5) : 0)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d slots never appeared", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
