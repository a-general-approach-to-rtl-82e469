// event_sequencer: walks through every input event of the controller and fuzzifies it.
//
// After a start pulse it issues the 121 events (greasiness, dirtiness) in 0..10 x 0..10,
// one per clock, dirtiness in the outer loop and greasiness in the inner one (the order of
// the published tables). With each event it gives the fuzzified inputs: a crisp code x
// becomes the singleton fuzzy set with grade 1.0 at x and 0 elsewhere. ev_last marks the
// final event and done pulses for one cycle after it. A start while busy is ignored.
// Outputs are registered: the first event appears the cycle after start.
module event_sequencer
  import flc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output logic       ev_valid,
  output logic       ev_last,
  output logic [3:0] ev_g,
  output logic [3:0] ev_d,
  output in_vec_t    a_g,
  output in_vec_t    a_d
);

  localparam logic [3:0] LAST_CODE = 4'(NU - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      ev_valid <= 1'b0;
      ev_g     <= '0;
      ev_d     <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          ev_valid <= 1'b1;
          ev_g     <= '0;
          ev_d     <= '0;
        end
      end else if (ev_last) begin
        busy     <= 1'b0;
        ev_valid <= 1'b0;
        done     <= 1'b1;
      end else if (ev_g == LAST_CODE) begin
        ev_g <= '0;
        ev_d <= ev_d + 4'd1;
      end else begin
        ev_g <= ev_g + 4'd1;
      end
    end
  end

  assign ev_last = ev_valid && ev_g == LAST_CODE && ev_d == LAST_CODE;

  always_comb begin
    for (int u = 0; u < NU; u++) begin
      a_g[u] = (int'(ev_g) == u) ? grade_t'(GMAX) : '0;
      a_d[u] = (int'(ev_d) == u) ? grade_t'(GMAX) : '0;
    end
  end

  // Handshake rules: events only while busy, codes stay inside the universe, done ends busy.
  a_valid_busy: assert property (@(posedge clk) disable iff (!rst_n) ev_valid |-> busy);
  a_codes:      assert property (@(posedge clk) disable iff (!rst_n)
                                 ev_valid |-> (ev_g <= LAST_CODE && ev_d <= LAST_CODE));
  a_done:       assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);

endmodule
