// tb_laundry_flc: end-to-end test of the controller at its default parameters.
//
// After reset the event table is built by the hardware inference path; the test measures
// how many clocks that takes, then queries all 121 events back to back (one per clock) and
// checks both the ROM and the PLA answers against the reference controller and the
// published rows. It then queries out-of-range codes (clamped), retunes the knowledge base
// (the first rule now concludes short_time), checks that the table is marked stale, rebuilds
// it and checks that the ROM follows the new knowledge while the PLA keeps the programmed
// one. Each of these mechanisms is counted, and one that never happened is a failure.
module tb_laundry_flc;
  import flc_pkg::*;
  import tb_ref_pkg::*;

  logic       clk = 1'b0, rst_n;
  logic       kb_wr_en;
  kb_sel_e    kb_wr_sel;
  logic [2:0] kb_wr_term;
  logic [3:0] kb_wr_elem;
  logic [8:0] kb_wr_data;
  logic       rebuild, building, table_ready;
  logic       q_valid;
  logic [3:0] q_greasiness, q_dirtiness;
  logic       r_valid;
  flc_out_t   r_pla, r_rom;

  int checks = 0, failures = 0;
  int n_build = 0, n_rebuild = 0, n_stale = 0, n_clamp = 0, n_pla = 0, n_rom = 0, n_pla_kept = 0;

  laundry_flc dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #200000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Wait for table_ready and return the number of clocks it took.
  task automatic wait_ready(output int cycles);
    cycles = 0;
    while (!table_ready && cycles < 1000) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  // Query every event back to back; results are checked one clock after each query.
  task automatic sweep(ref_rules_t rom_rules, ref_rules_t pla_rules, bit count_kept);
    int q = 0;
    int pend_g = -1, pend_d = -1;
    while (q <= 121) begin
      @(negedge clk);
      if (pend_g >= 0) begin
        int er = ref_time4(rom_rules, pend_g, pend_d);
        int ep = ref_time4(pla_rules, pend_g, pend_d);
        check(r_valid, "r_valid one clock after q_valid");
        check(int'(r_rom.time4) == er && int'(r_rom.time8) == 10 * er,
              $sformatf("rom g=%0d d=%0d got %0d expected %0d", pend_g, pend_d, r_rom.time4, er));
        check(int'(r_pla.time4) == ep && int'(r_pla.time8) == 10 * ep,
              $sformatf("pla g=%0d d=%0d got %0d expected %0d", pend_g, pend_d, r_pla.time4, ep));
        n_rom++;
        n_pla++;
        if (count_kept && er != ep) n_pla_kept++;
      end
      if (q < 121) begin
        q_valid = 1'b1;
        q_greasiness = 4'(q % 11);
        q_dirtiness = 4'(q / 11);
        pend_g = q % 11;
        pend_d = q / 11;
      end else begin
        q_valid = 1'b0;
        pend_g = -1;
      end
      q++;
    end
    @(negedge clk);
    check(!r_valid, "r_valid drops after the last query");
  endtask

  task automatic kb_write(kb_sel_e s, int t, int e, int dat);
    @(negedge clk);
    kb_wr_en = 1'b1;
    kb_wr_sel = s;
    kb_wr_term = 3'(t);
    kb_wr_elem = 4'(e);
    kb_wr_data = 9'(dat);
    @(negedge clk);
    kb_wr_en = 1'b0;
  endtask

  initial begin
    ref_rules_t rb = laundry_rules();
    ref_rules_t rb2 = laundry_rules();
    int cyc;
    rb2[0].out_term = 1;
    kb_wr_en = 1'b0;
    kb_wr_sel = KB_GREASE;
    kb_wr_term = '0;
    kb_wr_elem = '0;
    kb_wr_data = '0;
    rebuild = 1'b0;
    q_valid = 1'b0;
    q_greasiness = '0;
    q_dirtiness = '0;
    rst_n = 1'b0;
    #12 rst_n = 1'b1;

    // build after reset: 121 events at one per clock plus the pipeline
    check(!table_ready, "table not ready right after reset");
    wait_ready(cyc);
    $display("table built in %0d clocks", cyc);
    check(table_ready && cyc >= 121 && cyc <= 125, $sformatf("build took %0d clocks", cyc));
    check(!building, "builder idle once ready");
    if (table_ready) n_build++;

    sweep(rb, rb, 1'b0);

    // published rows through both realisations
    for (int k = 0; k < N_PUB; k++) begin
      @(negedge clk);
      q_valid = 1'b1;
      q_greasiness = 4'(pub_row(k, 0));
      q_dirtiness = 4'(pub_row(k, 1));
      @(negedge clk);
      q_valid = 1'b0;
      check(int'(r_rom.time4) == pub_row(k, 2) && int'(r_rom.time8) == pub_row(k, 3)
            && r_pla == r_rom, $sformatf("published row %0d", k));
    end

    // out-of-range codes are clamped to 10
    for (int g = 9; g <= 15; g++) begin
      for (int d = 9; d <= 15; d++) begin
        automatic int eg = (g > 10) ? 10 : g;
        automatic int ed = (d > 10) ? 10 : d;
        @(negedge clk);
        q_valid = 1'b1;
        q_greasiness = 4'(g);
        q_dirtiness = 4'(d);
        @(negedge clk);
        q_valid = 1'b0;
        check(int'(r_rom.time4) == ref_time4(rb, eg, ed) && int'(r_pla.time4) == ref_time4(rb, eg, ed),
              $sformatf("clamped g=%0d d=%0d", g, d));
        if (g > 10 || d > 10) n_clamp++;
      end
    end

    // retune: rule 1 now concludes short_time
    kb_write(KB_RULE, 0, 0, {3'b001, 3'b001, 3'd1});
    check(!table_ready, "knowledge base write marks the table stale");
    if (!table_ready) n_stale++;
    @(negedge clk);
    rebuild = 1'b1;
    @(negedge clk);
    rebuild = 1'b0;
    check(building, "rebuild starts the builder");
    wait_ready(cyc);
    check(table_ready && cyc >= 119 && cyc <= 125, $sformatf("rebuild took %0d clocks", cyc));
    if (table_ready) n_rebuild++;
    sweep(rb2, rb, 1'b1);

    $display("mechanisms: build=%0d rebuild=%0d stale=%0d clamp=%0d pla=%0d rom=%0d pla_kept=%0d",
             n_build, n_rebuild, n_stale, n_clamp, n_pla, n_rom, n_pla_kept);
    check(n_build > 0, "build never happened");
    check(n_rebuild > 0, "rebuild never happened");
    check(n_stale > 0, "stale marking never happened");
    check(n_clamp > 0, "clamp never happened");
    check(n_pla > 0 && n_rom > 0, "queries never happened");
    check(n_pla_kept > 0, "retuned ROM never differed from programmed PLA");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
