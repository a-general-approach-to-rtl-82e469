// tb_pla: checks the minimised AND/OR array against the reference controller for every
// event, against the published defuzzified rows, and checks the number of product terms.
module tb_pla;
  import flc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NT = pla_term_count(pla_cover());

  logic [3:0]   g, d;
  logic [NT-1:0] act;
  flc_out_t     y;
  int checks = 0, failures = 0;

  pla dut (.greasiness(g), .dirtiness(d), .term_active(act), .y(y));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_rules_t rb = laundry_rules();
    check(NT == 75, $sformatf("product terms %0d, expected 75", NT));
    for (int gi = 0; gi <= 10; gi++)
      for (int di = 0; di <= 10; di++) begin
        int t4;
        g = 4'(gi);
        d = 4'(di);
        #1;
        t4 = ref_time4(rb, gi, di);
        check(int'(y.time4) == t4 && int'(y.time8) == 10 * t4,
              $sformatf("g=%0d d=%0d got %0d/%0d expected %0d", gi, di, y.time4, y.time8, t4));
        check(act != '0, $sformatf("no product term for g=%0d d=%0d", gi, di));
      end
    for (int k = 0; k < N_PUB; k++) begin
      g = 4'(pub_row(k, 0));
      d = 4'(pub_row(k, 1));
      #1;
      check(int'(y.time4) == pub_row(k, 2) && int'(y.time8) == pub_row(k, 3),
            $sformatf("published row %0d: got %0d/%0d", k, y.time4, y.time8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
