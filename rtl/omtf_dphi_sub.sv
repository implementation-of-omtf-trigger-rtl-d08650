// omtf_dphi_sub -- the delta-phi subtractors.
//
// Subtracts the reference hit's phi from the phi of every selected hit:
// dphi = phi - phi_ref, a signed DPHI_W-bit value. Only hits inside the data
// selector's window (|dphi| <= 511) are valid, so the difference always fits.
// The subtraction and its place in the pipeline follow the algorithm; the
// widths are this design's own.
// Interface: `ref_in`/`sel_in` from the data selector, same clock.
// Timing: one register stage, `ref_out`/`dphi_out` one clock later.
module omtf_dphi_sub
  import omtf_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  refhit_t ref_in,
  input  hit_t    sel_in   [N_LAYERS][N_HITS],
  output refhit_t ref_out,
  output dhit_t   dphi_out [N_LAYERS][N_HITS]
);
  always_ff @(posedge clk) begin
    for (int l = 0; l < N_LAYERS; l++)
      for (int h = 0; h < N_HITS; h++) begin
        dphi_out[l][h].valid <= !rst && sel_in[l][h].valid;
        dphi_out[l][h].dphi  <= DPHI_W'($signed({1'b0, sel_in[l][h].phi}) -
                                        $signed({1'b0, ref_in.phi}));
      end
    if (rst) ref_out <= '0;
    else     ref_out <= ref_in;
  end
endmodule
