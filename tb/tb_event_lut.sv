// tb_event_lut: writes the whole table with random words and reads it back, checking the
// one-clock read latency and that a read in the write cycle returns the old word.
module tb_event_lut;
  import flc_pkg::*;

  logic       clk = 1'b0;
  logic       we;
  logic [7:0] waddr, raddr;
  flc_out_t   wdata, rdata;
  flc_out_t   model [256];
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  event_lut dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0;
    raddr = '0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1'b1;
      waddr = 8'(a);
      wdata = 12'($urandom);
      model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int a = 0; a < 256; a++) begin
      raddr = 8'(a);
      @(posedge clk);
      #1;
      check(rdata == model[a], $sformatf("read %0d", a));
    end
    // read-during-write: the old word comes out, the new one the next time
    @(negedge clk);
    we = 1'b1;
    waddr = 8'd17;
    raddr = 8'd17;
    wdata = ~model[17];
    @(posedge clk);
    #1;
    check(rdata == model[17], "read during write returns old word");
    @(negedge clk);
    we = 1'b0;
    @(posedge clk);
    #1;
    check(rdata == ~model[17], "new word after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
