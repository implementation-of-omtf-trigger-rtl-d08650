// omtf_prior_enc -- reference-hit priority encoder with II = 1.
//
// Holds a copy of the 128-bit reference-hit vector. Every clock it reports the
// lowest set bit of the held vector (bit 0 has the highest priority) and clears
// that bit, so successive clocks hand out the reference hits in priority order.
// A `load` clock replaces the held vector with `ref_hit_bits` instead of
// clearing a bit; the code reported on that clock still belongs to the old
// vector. With a load every 4th clock this gives the 4 best reference hits of a
// BX on the 4 clocks that follow the load.
//
// The search is two-level: REF_BITS/PE_SUB sub-encoders of PE_SUB bits each find
// the first set bit of their group in parallel, then the first group with a hit
// wins. That structure and the load/clear behaviour follow the algorithm's
// reference implementation; the register-level form is this design's own.
//
// Interface: `code` and `found` are combinational from the held vector
// (`code` = index of the hit, `found` = 0 when no bit is set).
// Timing: load at clock t, codes valid during t+1 .. t+4.
module omtf_prior_enc #(
  parameter int unsigned WIDTH = omtf_pkg::REF_BITS,
  parameter int unsigned SUB   = omtf_pkg::PE_SUB
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     load,
  input  logic [WIDTH-1:0]         ref_hit_bits,
  output logic                     found,
  output logic [$clog2(WIDTH)-1:0] code
);
  localparam int unsigned GROUPS = WIDTH / SUB;
  localparam int unsigned SUB_W  = $clog2(SUB);

  logic [WIDTH-1:0]  sdin;
  logic [GROUPS-1:0] sub_found;
  logic [SUB_W-1:0]  sub_code [GROUPS];

  // first level: one small encoder per group of SUB bits
  always_comb begin
    for (int g = 0; g < GROUPS; g++) begin
      sub_found[g] = 1'b0;
      sub_code[g]  = '0;
      for (int i = SUB - 1; i >= 0; i--) begin
        if (sdin[g*SUB + i]) begin
          sub_found[g] = 1'b1;
          sub_code[g]  = SUB_W'(i);
        end
      end
    end
  end

  // second level: first group holding a hit
  always_comb begin
    found = 1'b0;
    code  = '0;
    for (int g = GROUPS - 1; g >= 0; g--) begin
      if (sub_found[g]) begin
        found = 1'b1;
        code  = $clog2(WIDTH)'(g * SUB) + $clog2(WIDTH)'(sub_code[g]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst)       sdin <= '0;
    else if (load) sdin <= ref_hit_bits;
    else if (found) sdin[code] <= 1'b0;
  end

endmodule
