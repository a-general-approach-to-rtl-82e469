// coa_defuzzifier: centre-of-area defuzzification of the aggregated $time set.
//
// COA = sum(mu_i * m_i) / sum(mu_i), with m_i = i + 1 the value of $time element i.
// time4 is the integer part of the COA; time8 is that integer part multiplied by ten, which
// is how the published 8-bit column relates to the 4-bit one. An empty set (all grades
// zero) gives 0, a choice of this design. Purely combinational: a 14-term weighted sum and
// one integer division. Being a multiple of ten, time8 always has bit 0 clear.
module coa_defuzzifier
  import flc_pkg::*;
(
  input  out_vec_t  agg,
  output logic [10:0] num,   // sum(mu_i * m_i), grades in tenths
  output logic [7:0]  den,   // sum(mu_i)
  output flc_out_t  y
);

  logic [10:0] q;

  always_comb begin
    num = '0;
    den = '0;
    for (int i = 0; i < NV; i++) begin
      num = num + 11'(agg[i]) * 11'(i + 1);
      den = den + 8'(agg[i]);
    end
    q = (den == 8'd0) ? 11'd0 : num / 11'(den);
    y.time4 = q[3:0];
    y.time8 = 8'(q * 11'd10);
  end

endmodule
