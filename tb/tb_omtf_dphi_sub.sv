// tb_omtf_dphi_sub -- self-checking test of the delta-phi subtractors.
//
// Random selected hits (phi within the window of phi_ref, including both
// window edges) and reference hits are applied every clock; one clock later
// every slot must carry dphi = phi - phi_ref as a signed value and the same
// valid flag, and the reference hit must follow along.
module tb_omtf_dphi_sub;
  import omtf_pkg::*;
  import omtf_model_pkg::*;
  import omtf_stim_pkg::*;
  logic clk = 0, rst = 1;
  refhit_t ref_in, ref_out, ref_prev;
  hits_arr_t sel_in, prev;
  dphi_arr_t dphi_out;
  int checks = 0, failures = 0, n_neg = 0, n_pos = 0;

  omtf_dphi_sub dut (.clk, .rst, .ref_in, .sel_in, .ref_out, .dphi_out);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_in = '0;
    for (int l = 0; l < N_LAYERS; l++) for (int h = 0; h < N_HITS; h++) sel_in[l][h] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int t = 0; t < 1000; t++) begin
      ref_in = '0;
      ref_in.active = 1'b1;
      ref_in.valid  = 1'b1;
      ref_in.phi    = PHI_W'(rnd(0, 2047));
      ref_in.ref_layer = REF_LAYER_W'(t);
      for (int l = 0; l < N_LAYERS; l++)
        for (int h = 0; h < N_HITS; h++) begin
          int x;
          x = int'(ref_in.phi) + (((t + h) % 5 == 0) ? (((h % 2) != 0) ? 511 : -511) : rnd(-511, 511));
          if (x < 0) x = 0;
          if (x > 2047) x = 2047;
          sel_in[l][h].valid = ($urandom % 2) != 0;
          sel_in[l][h].phi   = PHI_W'(x);
        end
      prev = sel_in;
      ref_prev = ref_in;
      @(negedge clk);
      checks++;
      if (ref_out != ref_prev) begin failures++; $display("FAIL ref_out t=%0d", t); end
      for (int l = 0; l < N_LAYERS; l++)
        for (int h = 0; h < N_HITS; h++) begin
          int e;
          e = int'(prev[l][h].phi) - int'(ref_prev.phi);
          if (e < 0) n_neg++; else n_pos++;
          checks++;
          if (dphi_out[l][h].valid != prev[l][h].valid ||
              (prev[l][h].valid && int'(dphi_out[l][h].dphi) != e)) begin
            failures++;
            $display("FAIL t=%0d l=%0d h=%0d got %0d exp %0d", t, l, h, dphi_out[l][h].dphi, e);
          end
        end
    end
    checks++;
    if (n_neg == 0 || n_pos == 0) begin failures++; $display("FAIL one sign never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
