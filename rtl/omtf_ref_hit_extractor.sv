// omtf_ref_hit_extractor -- picks the reference hits of a bunch crossing.
//
// On `bx_start` the hits of all layers are captured. The valid flags of the hit
// slots of the reference layers form a 128-bit priority vector (reference layer
// r, slot h -> bit 16*r + h; a lower bit has priority). The priority encoder
// then hands out the best remaining reference hit on each of the next 4 clocks,
// one per clock, so up to 4 reference hits are processed per BX with II = 1.
//
// Output (registered): `ref_out` describes the reference hit of this clock
// (slot 0..3, `last` on slot 3, `valid` = a hit was found, its reference layer,
// bit index and phi), and `hits_out` carries the captured hits of the BX
// alongside it, for the data selector.
// Timing: `bx_start` at clock t -> slots 0..3 on `ref_out` during t+2 .. t+5.
// `bx_start` may come at most once every 4 clocks (checked by an assertion).
// The choice of reference layers (the even layers 0..14) and the bit ordering
// are this design's own; the 4-per-BX selection by priority is the algorithm's.
module omtf_ref_hit_extractor
  import omtf_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    bx_start,
  input  hit_t    hits     [N_LAYERS][N_HITS],
  output refhit_t ref_out,
  output hit_t    hits_out [N_LAYERS][N_HITS]
);
  logic [REF_BITS-1:0]  ref_bits;
  logic                 pe_found;
  logic [REF_IDX_W-1:0] pe_code;
  hit_t                 bx_hits [N_LAYERS][N_HITS];
  logic [2:0]           cnt;     // slot counter, 4 = idle

  always_comb begin
    for (int r = 0; r < N_REF_LAYERS; r++)
      for (int h = 0; h < N_HITS; h++)
        ref_bits[r*N_HITS + h] = hits[ref_layer_phys(r)][h].valid;
  end

  omtf_prior_enc #(.WIDTH(REF_BITS), .SUB(PE_SUB)) u_pe (
    .clk, .rst, .load(bx_start), .ref_hit_bits(ref_bits),
    .found(pe_found), .code(pe_code)
  );

  always_ff @(posedge clk) begin
    if (rst)           cnt <= 3'd4;
    else if (bx_start) cnt <= 3'd0;
    else if (cnt < 3'd4) cnt <= cnt + 3'd1;
  end

  always_ff @(posedge clk) begin
    if (bx_start) bx_hits <= hits;
  end

  logic [REF_LAYER_W-1:0] cur_layer;
  logic [HIT_W-1:0]       cur_slot;
  assign cur_layer = pe_code[REF_IDX_W-1:HIT_W];
  assign cur_slot  = pe_code[HIT_W-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      ref_out <= '0;
    end else begin
      ref_out.active    <= (cnt < 3'd4);
      ref_out.valid     <= (cnt < 3'd4) && pe_found;
      ref_out.last      <= (cnt == 3'd3);
      ref_out.slot      <= cnt[SLOT_W-1:0];
      ref_out.ref_layer <= cur_layer;
      ref_out.ref_idx   <= pe_code;
      ref_out.phi       <= bx_hits[ref_layer_phys(32'(cur_layer))][cur_slot].phi;
    end
    hits_out <= bx_hits;
  end

  // a new BX must not cut short the 4 slots of the previous one
  a_bx_spacing: assert property (@(posedge clk) disable iff (rst)
                                 bx_start && cnt != 3'd4 |-> cnt == 3'd3);

endmodule
