// tb_detachment_operator: max-min composition against a direct reference, including the
// singleton-input case where the result is one row of the matrix.
module tb_detachment_operator;
  import flc_pkg::*;

  in_vec_t  a;
  imat_t    r;
  out_vec_t d;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  detachment_operator dut (.a(a), .r(r), .d(d));

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300) begin
      for (int u = 0; u < 11; u++) begin
        a[u] = 4'($urandom_range(10));
        for (int v = 0; v < 14; v++) r[u][v] = 4'($urandom_range(10));
      end
      #1;
      for (int v = 0; v < 14; v++) begin
        automatic int e = 0;
        for (int u = 0; u < 11; u++) begin
          automatic int c = (int'(a[u]) < int'(r[u][v])) ? int'(a[u]) : int'(r[u][v]);
          if (c > e) e = c;
        end
        check(int'(d[v]) == e, $sformatf("random v=%0d got %0d expected %0d", v, d[v], e));
      end
    end
    // singleton input at x selects row x
    for (int x = 0; x < 11; x++) begin
      a = '0;
      a[x] = 4'd10;
      for (int u = 0; u < 11; u++)
        for (int v = 0; v < 14; v++) r[u][v] = 4'($urandom_range(10));
      #1;
      for (int v = 0; v < 14; v++)
        check(d[v] == r[x][v], $sformatf("singleton x=%0d v=%0d", x, v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
