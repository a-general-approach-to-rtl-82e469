// tb_event_sequencer: checks that one start produces the 121 events once each, one per
// clock, in order (dirtiness outer, greasiness inner), with singleton fuzzified inputs, a
// last marker and a done pulse, and that a start while busy is ignored.
module tb_event_sequencer;
  import flc_pkg::*;

  logic       clk = 1'b0, rst_n, start;
  logic       busy, done, ev_valid, ev_last;
  logic [3:0] ev_g, ev_d;
  in_vec_t    a_g, a_d;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  event_sequencer dut (.*);

  always #5 clk = ~clk;
  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_sweep(bit poke_start);
    int n = 0;
    int first_cycle = -1;
    int cyc = 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && cyc < 300) begin
      if (ev_valid) begin
        if (first_cycle < 0) first_cycle = cyc;
        check(int'(ev_g) == n % 11 && int'(ev_d) == n / 11, $sformatf("event %0d is g=%0d d=%0d", n, ev_g, ev_d));
        check(ev_last == (n == 120), $sformatf("last marker at %0d", n));
        for (int u = 0; u < 11; u++)
          check(a_g[u] == ((u == n % 11) ? 4'd10 : 4'd0) && a_d[u] == ((u == n / 11) ? 4'd10 : 4'd0),
                $sformatf("fuzzified event %0d u=%0d", n, u));
        check(busy, "busy during sweep");
        n++;
      end
      if (poke_start && n == 50) start = 1'b1;
      else start = 1'b0;
      @(negedge clk);
      cyc++;
    end
    start = 1'b0;
    check(n == 121, $sformatf("%0d events", n));
    check(first_cycle == 0 && cyc == 121, $sformatf("one event per clock: %0d cycles", cyc));
    check(done && !busy && !ev_valid, "done pulse ends the sweep");
    @(negedge clk);
    check(!done, "done is a pulse");
  endtask

  initial begin
    start = 1'b0;
    rst_n = 1'b0;
    #12 rst_n = 1'b1;
    check(!busy && !ev_valid, "idle after reset");
    run_sweep(1'b0);
    run_sweep(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
