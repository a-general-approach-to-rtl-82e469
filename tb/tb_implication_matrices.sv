// tb_implication_matrices: builds the knowledge base inputs from the reference membership
// functions and checks all 14 matrices, then repeats with random rules and memberships.
module tb_implication_matrices;
  import flc_pkg::*;
  import tb_ref_pkg::*;

  in_mf_t          grease_mf, dirt_mf;
  out_mf_t         time_mf;
  rules_t          rules;
  imat_t [NR-1:0]  g_mat, d_mat;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  implication_matrices dut (.*);
  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(string tag);
    for (int r = 0; r < 7; r++)
      for (int u = 0; u < 11; u++)
        for (int v = 0; v < 14; v++) begin
          automatic int ag = 0, ad = 0, b = 0;
          for (int t = 0; t < 3; t++) begin
            if (rules[r].g_terms[t] && int'(grease_mf[t][u]) > ag) ag = int'(grease_mf[t][u]);
            if (rules[r].d_terms[t] && int'(dirt_mf[t][u]) > ad) ad = int'(dirt_mf[t][u]);
          end
          if (int'(rules[r].out_term) < 5) b = int'(time_mf[int'(rules[r].out_term)][v]);
          check(int'(g_mat[r][u][v]) == ((ag < b) ? ag : b), $sformatf("%s g r=%0d u=%0d v=%0d", tag, r, u, v));
          check(int'(d_mat[r][u][v]) == ((ad < b) ? ad : b), $sformatf("%s d r=%0d u=%0d v=%0d", tag, r, u, v));
        end
  endtask

  initial begin
    ref_rules_t rb = laundry_rules();
    for (int t = 0; t < 3; t++)
      for (int x = 0; x < 11; x++) begin
        grease_mf[t][x] = 4'(tenths(mu_in(t, x)));
        dirt_mf[t][x] = 4'(tenths(mu_in(t, x)));
      end
    time_mf = '0;
    for (int t = 0; t < 5; t++) time_mf[t][time_value(t) - 1] = 4'd10;
    for (int r = 0; r < 7; r++)
      rules[r] = '{g_terms: 3'(rb[r].g_mask), d_terms: 3'(rb[r].d_mask), out_term: time_term_e'(rb[r].out_term)};
    #1;
    check_all("laundry");
    // the first rule's dirtiness matrix: column of very short carries low_dirtiness
    for (int u = 0; u < 11; u++)
      check(int'(d_mat[0][u][1]) == ((u < 5) ? 10 - 2 * u : 0), $sformatf("rule 1 d column u=%0d", u));
    // rule 4 (medium greasiness, low or medium dirtiness -> moderate): union of two terms
    check(d_mat[3][7][6] == 4'd6 && d_mat[3][2][6] == 4'd6 && d_mat[3][5][6] == 4'd10, "union antecedent");
    repeat (20) begin
      for (int t = 0; t < 3; t++)
        for (int x = 0; x < 11; x++) begin
          grease_mf[t][x] = 4'($urandom_range(10));
          dirt_mf[t][x] = 4'($urandom_range(10));
        end
      for (int t = 0; t < 5; t++)
        for (int v = 0; v < 14; v++) time_mf[t][v] = 4'($urandom_range(10));
      for (int r = 0; r < 7; r++)
        rules[r] = '{g_terms: 3'($urandom), d_terms: 3'($urandom), out_term: time_term_e'($urandom_range(5))};
      #1;
      check_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
