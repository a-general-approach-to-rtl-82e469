// tb_coa_defuzzifier: centre of area against a floating-point reference on random sets,
// on sets made of the time singletons, and on the published rows.
module tb_coa_defuzzifier;
  import flc_pkg::*;
  import tb_ref_pkg::*;

  out_vec_t    agg;
  logic [10:0] num;
  logic [7:0]  den;
  flc_out_t    y;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  coa_defuzzifier dut (.agg(agg), .num(num), .den(den), .y(y));

  function automatic int ref_q(out_vec_t s);
    real n = 0.0, m = 0.0;
    for (int i = 0; i < 14; i++) begin
      n += real'(s[i]) * (i + 1);
      m += real'(s[i]);
    end
    return (m == 0.0) ? 0 : int'($floor(n / m + 1e-9));
  endfunction

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    agg = '0;
    #1;
    check(y.time4 == 0 && y.time8 == 0, "empty set gives 0");
    repeat (500) begin
      for (int i = 0; i < 14; i++) agg[i] = ($urandom_range(3) == 0) ? 4'($urandom_range(10)) : 4'd0;
      #1;
      check(int'(y.time4) == ref_q(agg) && int'(y.time8) == 10 * ref_q(agg),
            $sformatf("random got %0d/%0d expected %0d", y.time4, y.time8, ref_q(agg)));
    end
    // published rows: aggregated sets built from the reference rule base
    for (int k = 0; k < N_PUB; k++) begin
      for (int i = 0; i < 14; i++)
        agg[i] = 4'(tenths(agg_elem(laundry_rules(), pub_row(k, 0), pub_row(k, 1), i)));
      #1;
      check(int'(y.time4) == pub_row(k, 2) && int'(y.time8) == pub_row(k, 3),
            $sformatf("published row %0d got %0d/%0d", k, y.time4, y.time8));
    end
    // g=1, d=0: 0.8 very short + 0.2 moderate -> (1.6 + 1.4) / 1.0 = 3
    agg = '0;
    agg[1] = 4'd8;
    agg[6] = 4'd2;
    #1;
    check(y.time4 == 4'd3 && num == 11'd30 && den == 8'd10, "worked example");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
