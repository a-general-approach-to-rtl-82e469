// inference_engine: infers the aggregated $time fuzzy set for one input event.
//
// The fuzzified greasiness and dirtiness are composed (max-min) with the greasiness and
// dirtiness matrices of every rule by 14 detachment operators. A rule's conclusion is the
// pointwise min of its two composed sets, which is the "and" of its two antecedents; the
// conclusions of all rules are then aggregated by pointwise max. With singleton fuzzified
// inputs this gives, for each rule, min(muG(g), muD(d), muT(v)). Purely combinational.
// Max aggregation is the method's own; min as the rule's "and" is this design's reading,
// chosen because it reproduces the published aggregated sets.
module inference_engine
  import flc_pkg::*;
(
  input  in_vec_t              a_g,     // fuzzified greasiness
  input  in_vec_t              a_d,     // fuzzified dirtiness
  input  imat_t [NR-1:0]       g_mat,
  input  imat_t [NR-1:0]       d_mat,
  output out_vec_t [NR-1:0]    rule_out, // each rule's conclusion
  output out_vec_t             agg       // aggregated conclusion
);

  out_vec_t [NR-1:0] bg, bd;

  for (genvar r = 0; r < NR; r++) begin : g_rule
    detachment_operator u_g (.a(a_g), .r(g_mat[r]), .d(bg[r]));
    detachment_operator u_d (.a(a_d), .r(d_mat[r]), .d(bd[r]));
  end

  always_comb begin
    agg = '0;
    for (int r = 0; r < NR; r++)
      for (int v = 0; v < NV; v++) begin
        rule_out[r][v] = (bg[r][v] < bd[r][v]) ? bg[r][v] : bd[r][v];
        if (rule_out[r][v] > agg[v]) agg[v] = rule_out[r][v];
      end
  end

endmodule
