// omtf_data_selector -- selects the hits that go with the current reference hit.
//
// For every layer and hit slot the selector passes a hit on only when the
// clock carries a found reference hit and the hit lies within +-SEL_WINDOW of
// the reference hit's phi; all other slots are marked invalid. The window is
// wide enough for the steepest pattern of the set (17 layers x 26 phi units
// plus the PDF range). The algorithm names this block and places it between the
// captured hit data and the delta-phi subtractors; the window rule is this
// design's own.
// Interface: `ref_in`/`hits_in` from the reference-hit extractor, same clock.
// Timing: one register stage, `ref_out`/`sel_out` one clock later.
module omtf_data_selector
  import omtf_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  refhit_t ref_in,
  input  hit_t    hits_in [N_LAYERS][N_HITS],
  output refhit_t ref_out,
  output hit_t    sel_out [N_LAYERS][N_HITS]
);
  always_ff @(posedge clk) begin
    for (int l = 0; l < N_LAYERS; l++)
      for (int h = 0; h < N_HITS; h++) begin
        logic signed [PHI_W:0] diff;
        diff = $signed({1'b0, hits_in[l][h].phi}) - $signed({1'b0, ref_in.phi});
        sel_out[l][h].phi   <= hits_in[l][h].phi;
        sel_out[l][h].valid <= !rst && ref_in.valid && hits_in[l][h].valid &&
                               (diff <= $signed((PHI_W+1)'(SEL_WINDOW))) &&
                               (diff >= -$signed((PHI_W+1)'(SEL_WINDOW)));
      end
    if (rst) ref_out <= '0;
    else     ref_out <= ref_in;
  end
endmodule
