// tb_inference_engine: feeds singleton-fuzzified events and reference-built implication
// matrices, and checks the aggregated set for all 121 events against the reference and
// against the published aggregated rows.
module tb_inference_engine;
  import flc_pkg::*;
  import tb_ref_pkg::*;

  in_vec_t           a_g, a_d;
  imat_t [NR-1:0]    g_mat, d_mat;
  out_vec_t [NR-1:0] rule_out;
  out_vec_t          agg;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  inference_engine dut (.*);
  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // published aggregated rows: greasiness, dirtiness, element holding grade p, grade p,
  // element holding grade q, grade q (grades in tenths)
  int pub [12][6] = '{
    '{0, 0, 1, 10, 6, 0}, '{1, 0, 1, 8, 6, 2}, '{2, 0, 1, 6, 6, 4}, '{3, 0, 1, 4, 6, 6},
    '{4, 0, 1, 2, 6, 8}, '{5, 0, 1, 0, 6, 10}, '{5, 10, 9, 10, 12, 0}, '{6, 10, 9, 8, 12, 2},
    '{7, 10, 9, 6, 12, 4}, '{8, 10, 9, 4, 12, 6}, '{9, 10, 9, 2, 12, 8}, '{10, 10, 9, 0, 12, 10}};

  task automatic apply(int g, int d);
    a_g = '0;
    a_d = '0;
    a_g[g] = 4'd10;
    a_d[d] = 4'd10;
    #1;
  endtask

  initial begin
    ref_rules_t rb = laundry_rules();
    for (int r = 0; r < 7; r++)
      for (int u = 0; u < 11; u++)
        for (int v = 0; v < 14; v++) begin
          automatic real mg = 0.0, md = 0.0;
          automatic real b = (v + 1 == time_value(rb[r].out_term)) ? 1.0 : 0.0;
          for (int t = 0; t < 3; t++) begin
            if (rb[r].g_mask[t]) mg = rmax(mg, mu_in(t, u));
            if (rb[r].d_mask[t]) md = rmax(md, mu_in(t, u));
          end
          g_mat[r][u][v] = 4'(tenths(rmin(mg, b)));
          d_mat[r][u][v] = 4'(tenths(rmin(md, b)));
        end
    for (int g = 0; g <= 10; g++)
      for (int d = 0; d <= 10; d++) begin
        apply(g, d);
        for (int v = 0; v < 14; v++)
          check(int'(agg[v]) == tenths(agg_elem(rb, g, d, v)), $sformatf("g=%0d d=%0d v=%0d got %0d", g, d, v, agg[v]));
      end
    for (int k = 0; k < 12; k++) begin
      apply(pub[k][0], pub[k][1]);
      check(int'(agg[pub[k][2]]) == pub[k][3] && int'(agg[pub[k][4]]) == pub[k][5],
            $sformatf("published aggregated row %0d", k));
    end
    // a single rule's conclusion: g=1 d=0 fires rule 1 at 0.8 and rule 4 at 0.2
    apply(1, 0);
    check(rule_out[0][1] == 4'd8 && rule_out[3][6] == 4'd2 && rule_out[2] == '0, "rule conclusions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
