// implication_operator: turns one fuzzy relation "A -> B" into its implication matrix.
//
// The matrix is the cartesian product of A (over the 11 input codes) and B (over the 14
// $time elements): R[u][v] = min(muA(u), muB(v)), the implication the method prescribes.
// Purely combinational; grades are tenths in 4 bits, which is this design's format.
module implication_operator
  import flc_pkg::*;
(
  input  in_vec_t  a,   // antecedent membership over the input universe
  input  out_vec_t b,   // consequent membership over the $time universe
  output imat_t    r    // implication matrix, r[u][v]
);

  always_comb begin
    for (int u = 0; u < NU; u++)
      for (int v = 0; v < NV; v++)
        r[u][v] = (a[u] < b[v]) ? a[u] : b[v];
  end

endmodule
