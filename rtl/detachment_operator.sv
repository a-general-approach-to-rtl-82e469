// detachment_operator: fuzzy max-min composition of an input set with an implication matrix.
//
// Given the fuzzified input A' over the 11 input codes and the matrix R of a relation
// A -> B, it forms c[u][v] = min(a[u], R[u][v]) and then d[v] = max over u of c[u][v],
// the inferred output set B' over the 14 $time elements. The composition rule is the one
// the method specifies; evaluating all 14 outputs in parallel in one combinational stage is
// this design's choice.
module detachment_operator
  import flc_pkg::*;
(
  input  in_vec_t  a,   // fuzzified input A'
  input  imat_t    r,   // implication matrix of A -> B
  output out_vec_t d    // inferred output B'
);

  always_comb begin
    for (int v = 0; v < NV; v++) begin
      d[v] = '0;
      for (int u = 0; u < NU; u++) begin
        automatic grade_t c = (a[u] < r[u][v]) ? a[u] : r[u][v];
        if (c > d[v]) d[v] = c;
      end
    end
  end

endmodule
