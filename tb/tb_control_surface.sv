// tb_control_surface: reproduces the controller's control surface (wash time over the
// 11 x 11 grid of greasiness and dirtiness) through the complete controller and checks its
// shape: both realisations agree with each other and with the reference, the time never
// falls when greasiness rises, it spans 2 (clean) to 13 (greasy and dirty), and along the
// axes it crosses whole time units where the reference surface does. (Along dirtiness the
// surface is not monotonic: at 30-40 % greasiness the time dips by one unit between 0 and
// 10 % dirtiness, where the medium-greasiness rule takes over from the low-greasiness ones.) The surface is printed
// as a table of 4-bit times.
module tb_control_surface;
  import flc_pkg::*;
  import tb_ref_pkg::*;

  logic       clk = 1'b0, rst_n;
  logic       rebuild, building, table_ready;
  logic       q_valid, r_valid;
  logic [3:0] q_greasiness, q_dirtiness;
  flc_out_t   r_pla, r_rom;
  int         surf [11][11];
  int checks = 0, failures = 0;

  laundry_flc dut (
    .clk, .rst_n, .kb_wr_en(1'b0), .kb_wr_sel(KB_GREASE), .kb_wr_term(3'd0), .kb_wr_elem(4'd0),
    .kb_wr_data(9'd0), .rebuild, .building, .table_ready,
    .q_valid, .q_greasiness, .q_dirtiness, .r_valid, .r_pla, .r_rom
  );

  always #5 clk = ~clk;

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
    string line;
    rebuild = 1'b0;
    q_valid = 1'b0;
    q_greasiness = '0;
    q_dirtiness = '0;
    rst_n = 1'b0;
    #12 rst_n = 1'b1;
    wait (table_ready);
    for (int d = 0; d <= 10; d++)
      for (int g = 0; g <= 10; g++) begin
        @(negedge clk);
        q_valid = 1'b1;
        q_greasiness = 4'(g);
        q_dirtiness = 4'(d);
        @(negedge clk);
        q_valid = 1'b0;
        surf[g][d] = int'(r_rom.time4);
        check(r_valid && r_pla == r_rom, $sformatf("realisations agree at g=%0d d=%0d", g, d));
        check(surf[g][d] == ref_time4(rb, g, d), $sformatf("surface g=%0d d=%0d", g, d));
      end
    $display("time (4-bit) by dirtiness (rows, 100 %% first) and greasiness (columns, 0 %% first)");
    for (int d = 10; d >= 0; d--) begin
      line = $sformatf("%3d %%:", d * 10);
      for (int g = 0; g <= 10; g++) line = {line, $sformatf(" %2d", surf[g][d])};
      $display("%s", line);
    end
    for (int g = 0; g <= 10; g++)
      for (int d = 0; d <= 10; d++) begin
        if (g < 10) check(surf[g + 1][d] >= surf[g][d], $sformatf("rises with greasiness at g=%0d d=%0d", g, d));
      end
    check(surf[0][0] == 2 && surf[10][10] == 13, "span 2 .. 13");
    // along dirtiness = 0 the time grows one unit per 10 % of greasiness up to 50 %
    for (int g = 0; g <= 5; g++) check(surf[g][0] == 2 + g, $sformatf("greasiness axis g=%0d", g));
    // along greasiness = 0: 2 below 30 %, 3 from 30 %, 4 at 50 %, 5 from 70 %, 6 from 90 %
    check(surf[0][2] == 2 && surf[0][3] == 3 && surf[0][5] == 4 && surf[0][7] == 5 && surf[0][9] == 6 && surf[0][10] == 7,
          "dirtiness axis");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
