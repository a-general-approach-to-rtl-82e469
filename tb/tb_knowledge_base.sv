// tb_knowledge_base: checks the reset contents (membership functions, time singletons and
// rules of the laundry controller) and the write port, including ignored writes.
module tb_knowledge_base;
  import flc_pkg::*;
  import tb_ref_pkg::*;

  logic       clk = 1'b0, rst_n;
  logic       wr_en;
  kb_sel_e    wr_sel;
  logic [2:0] wr_term;
  logic [3:0] wr_elem;
  logic [8:0] wr_data;
  in_mf_t     grease_mf, dirt_mf;
  out_mf_t    time_mf;
  rules_t     rules;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  knowledge_base dut (.*);

  always #5 clk = ~clk;
  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(kb_sel_e s, int t, int e, int dat);
    @(negedge clk);
    wr_en = 1'b1;
    wr_sel = s;
    wr_term = 3'(t);
    wr_elem = 4'(e);
    wr_data = 9'(dat);
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  initial begin
    ref_rules_t rb = laundry_rules();
    wr_en = 1'b0;
    wr_sel = KB_GREASE;
    wr_term = '0;
    wr_elem = '0;
    wr_data = '0;
    rst_n = 1'b0;
    #12 rst_n = 1'b1;
    for (int t = 0; t < 3; t++)
      for (int x = 0; x < 11; x++) begin
        check(int'(grease_mf[t][x]) == tenths(mu_in(t, x)), $sformatf("grease mf t=%0d x=%0d", t, x));
        check(int'(dirt_mf[t][x]) == tenths(mu_in(t, x)), $sformatf("dirt mf t=%0d x=%0d", t, x));
      end
    for (int t = 0; t < 5; t++)
      for (int v = 0; v < 14; v++)
        check(int'(time_mf[t][v]) == ((v + 1 == time_value(t)) ? 10 : 0), $sformatf("time mf t=%0d v=%0d", t, v));
    for (int r = 0; r < 7; r++)
      check(int'(rules[r].g_terms) == rb[r].g_mask && int'(rules[r].d_terms) == rb[r].d_mask
            && int'(rules[r].out_term) == rb[r].out_term, $sformatf("rule %0d", r));
    // writes
    wr(KB_GREASE, 1, 4, 7);
    check(grease_mf[1][4] == 4'd7 && dirt_mf[1][4] == 4'd8, "grease write");
    wr(KB_DIRT, 2, 10, 3);
    check(dirt_mf[2][10] == 4'd3 && grease_mf[2][10] == 4'd10, "dirt write");
    wr(KB_TIME, 4, 13, 9);
    check(time_mf[4][13] == 4'd9 && time_mf[4][12] == 4'd10, "time write");
    wr(KB_RULE, 6, 0, {3'b011, 3'b110, 3'd1});
    check(rules[6].g_terms == 3'b011 && rules[6].d_terms == 3'b110 && rules[6].out_term == T_SHORT, "rule write");
    // ignored writes: element out of range, grade above 1.0, rule index 7, bad term
    wr(KB_GREASE, 0, 11, 5);
    wr(KB_GREASE, 0, 3, 11);
    check(grease_mf[0][3] == 4'd4, "grade above 1.0 ignored");
    wr(KB_RULE, 7, 0, 0);
    wr(KB_RULE, 0, 0, {3'b111, 3'b111, 3'd6});
    check(rules[0].out_term == T_VERY_SHORT && rules[0].g_terms == 3'b001, "bad rule ignored");
    wr(KB_TIME, 5, 0, 5);
    check(time_mf[0][0] == 4'd0, "bad time term ignored");
    // reset restores defaults
    rst_n = 1'b0;
    #1;
    check(grease_mf[1][4] == 4'd8 && rules[6].out_term == T_VERY_LONG, "reset restores");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
