// tb_omtf_data_selector -- self-checking test of the data selector.
//
// Random hits and reference hits (including hits right at and just past the
// +-SEL_WINDOW edge, and clocks with no reference hit) are applied every clock;
// one clock later every slot must be valid exactly when the hit was valid, a
// reference hit was present and |phi - phi_ref| <= SEL_WINDOW. Counts how many
// hits were passed and rejected by the window.
module tb_omtf_data_selector;
  import omtf_pkg::*;
  import omtf_model_pkg::*;
  import omtf_stim_pkg::*;
  logic clk = 0, rst = 1;
  refhit_t ref_in, ref_out, ref_prev;
  hits_arr_t hits_in, prev, sel_out;
  int checks = 0, failures = 0, n_pass = 0, n_rej = 0;

  omtf_data_selector dut (.clk, .rst, .ref_in, .hits_in, .ref_out, .sel_out);
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
    for (int l = 0; l < N_LAYERS; l++) for (int h = 0; h < N_HITS; h++) hits_in[l][h] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int t = 0; t < 1000; t++) begin
      ref_in = '0;
      ref_in.active = 1'b1;
      ref_in.valid  = ($urandom % 8) != 0;
      ref_in.phi    = PHI_W'(rnd(0, 2047));
      ref_in.slot   = SLOT_W'(t);
      for (int l = 0; l < N_LAYERS; l++)
        for (int h = 0; h < N_HITS; h++) begin
          int x;
          case ($urandom % 4)
            0: x = int'(ref_in.phi) + int'(SEL_WINDOW) + rnd(0, 1);
            1: x = int'(ref_in.phi) - int'(SEL_WINDOW) - rnd(0, 1);
            default: x = rnd(0, 2047);
          endcase
          if (x < 0) x = 0;
          if (x > 2047) x = 2047;
          hits_in[l][h].valid = ($urandom % 3) != 0;
          hits_in[l][h].phi   = PHI_W'(x);
        end
      prev = hits_in;
      ref_prev = ref_in;
      @(negedge clk);
      checks++;
      if (ref_out != ref_prev) begin failures++; $display("FAIL ref_out t=%0d", t); end
      for (int l = 0; l < N_LAYERS; l++)
        for (int h = 0; h < N_HITS; h++) begin
          bit e;
          e = ref_prev.valid && prev[l][h].valid &&
              iabs(int'(prev[l][h].phi) - int'(ref_prev.phi)) <= int'(SEL_WINDOW);
          if (ref_prev.valid && prev[l][h].valid) begin if (e) n_pass++; else n_rej++; end
          checks++;
          if (sel_out[l][h].valid != e || (e && sel_out[l][h].phi != prev[l][h].phi)) begin
            failures++;
            $display("FAIL t=%0d l=%0d h=%0d got %0b exp %0b", t, l, h, sel_out[l][h].valid, e);
          end
        end
    end
    checks += 2;
    if (n_pass == 0) begin failures++; $display("FAIL nothing passed"); end
    if (n_rej == 0)  begin failures++; $display("FAIL nothing rejected"); end
    $display("passed=%0d rejected=%0d", n_pass, n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
