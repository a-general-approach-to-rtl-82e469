// pla: the controller's event table realised as a two-level AND/OR programmable logic array.
//
// The AND plane holds one product term per cube of COVER: a term is true when every input
// literal it cares for matches. The OR plane ORs the output words of the true terms, so an
// output bit is the OR of the terms programmed to drive it. Because all cubes that can be
// true together carry the same output word, the OR gives that word unchanged.
//
// By default COVER is the sum-of-products cover that flc_pkg::pla_cover() derives from the
// default knowledge base by logic minimisation; only its first N_TERMS entries are wired.
// Inputs: {greasiness, dirtiness} as two 4-bit codes; codes above 10 are don't-cares of the
// cover, so callers clamp them first. The array is purely combinational: the answer is
// available one propagation delay after the inputs change. The two-plane structure and the
// 75-term size follow the method; the minimisation algorithm is this design's own.
module pla #(
  parameter flc_pkg::cover_t COVER   = flc_pkg::pla_cover(),
  parameter int              N_TERMS = flc_pkg::pla_term_count(COVER)
) (
  input  logic [3:0]        greasiness,
  input  logic [3:0]        dirtiness,
  output logic [N_TERMS-1:0] term_active,  // AND-plane outputs, one per product term
  output flc_pkg::flc_out_t y              // OR-plane outputs
);
  import flc_pkg::*;

  logic [7:0] in_word;
  assign in_word = {greasiness, dirtiness};

  // AND plane
  always_comb begin
    for (int t = 0; t < N_TERMS; t++)
      term_active[t] = ((in_word ^ COVER[t].val) & COVER[t].care) == 8'h00;
  end

  // OR plane
  always_comb begin
    y = '0;
    for (int t = 0; t < N_TERMS; t++)
      if (term_active[t]) y = y | COVER[t].out;
  end

endmodule
