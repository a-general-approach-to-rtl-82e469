// tb_implication_operator: random and published checks of R[u][v] = min(A(u), B(v)).
module tb_implication_operator;
  import flc_pkg::*;
  import tb_ref_pkg::*;

  in_vec_t  a;
  out_vec_t b;
  imat_t    r;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  implication_operator dut (.a(a), .b(b), .r(r));

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // low_greasiness -> very_short_time: column of the very short singleton carries
    // 1.0 0.8 0.6 0.4 0.2 then zeros; all other columns are zero.
    for (int u = 0; u < 11; u++) a[u] = 4'(tenths(mu_in(0, u)));
    b = '0;
    b[1] = 4'd10;
    #1;
    for (int u = 0; u < 11; u++)
      for (int v = 0; v < 14; v++) begin
        automatic int exp_g = (v == 1 && u < 5) ? 10 - 2 * u : 0;
        check(int'(r[u][v]) == exp_g, $sformatf("table matrix u=%0d v=%0d got %0d", u, v, r[u][v]));
      end
    repeat (200) begin
      for (int u = 0; u < 11; u++) a[u] = 4'($urandom_range(10));
      for (int v = 0; v < 14; v++) b[v] = 4'($urandom_range(10));
      #1;
      for (int u = 0; u < 11; u++)
        for (int v = 0; v < 14; v++) begin
          automatic int e = (int'(a[u]) < int'(b[v])) ? int'(a[u]) : int'(b[v]);
          check(int'(r[u][v]) == e, $sformatf("random u=%0d v=%0d", u, v));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
