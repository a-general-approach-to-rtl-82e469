// implication_matrices: builds the 14 implication matrices of the rule base.
//
// Each of the seven rules "if greasiness is G and dirtiness is D then time is T" is split
// into two relations, G -> T and D -> T. An antecedent naming several terms, such as
// "or (low_dirtiness, medium_dirtiness)", is their union (pointwise max). Each relation is
// passed through an implication_operator to form its matrix. An out_term naming no time term
// gives an all-zero consequent. Purely combinational; the matrices follow the knowledge base
// without delay.
module implication_matrices
  import flc_pkg::*;
(
  input  in_mf_t               grease_mf,
  input  in_mf_t               dirt_mf,
  input  out_mf_t              time_mf,
  input  rules_t               rules,
  output imat_t [NR-1:0]       g_mat,   // greasiness -> time, one per rule
  output imat_t [NR-1:0]       d_mat    // dirtiness  -> time, one per rule
);

  for (genvar r = 0; r < NR; r++) begin : g_rule
    in_vec_t  ag, ad;
    out_vec_t b;

    always_comb begin
      ag = '0;
      ad = '0;
      for (int t = 0; t < NIT; t++)
        for (int u = 0; u < NU; u++) begin
          if (rules[r].g_terms[t] && grease_mf[t][u] > ag[u]) ag[u] = grease_mf[t][u];
          if (rules[r].d_terms[t] && dirt_mf[t][u]   > ad[u]) ad[u] = dirt_mf[t][u];
        end
      b = '0;
      for (int t = 0; t < NOT; t++)
        if (int'(rules[r].out_term) == t) b = time_mf[t];
    end

    implication_operator u_g (.a(ag), .b(b), .r(g_mat[r]));
    implication_operator u_d (.a(ad), .b(b), .r(d_mat[r]));
  end

endmodule
