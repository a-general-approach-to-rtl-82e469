// laundry_flc: fuzzy logic controller for the wash time of a laundry machine, encoded in
// programmable logic.
//
// Two crisp 4-bit inputs, greasiness and dirtiness (codes 0..10 for 0..100 %), select a
// wash time. The fuzzy heuristics (seven rules over low/medium/high input terms and five
// time terms) are not evaluated per query. Instead they are compiled into an exhaustive
// event table, and a query is a single table access. Two realisations of the table are
// answered side by side:
//   * r_rom: the event look-up table (ROM/EPROM form). It is programmed in hardware: after
//     reset, and on every rebuild request, an event sequencer walks through all 121 events,
//     the implication matrices of the knowledge base are applied by max-min composition,
//     the rule conclusions are aggregated by max, and the centre of area is written to the
//     table, one event per clock. table_ready rises when the sweep has finished. Any
//     write to the knowledge base drops table_ready until the next rebuild.
//   * r_pla: a two-level AND/OR PLA holding the logic-minimised cover of the table built
//     from the default knowledge base at elaboration (75 product terms). Like a programmed
//     PLA it does not follow later knowledge-base writes.
// Query timing: q_* is sampled on a clock edge and r_valid, r_pla and r_rom appear one clock
// later; one query per clock. Codes above 10 are clamped to 10 before the table access
// (the table has no entries for them; the clamp is this design's choice). Output words carry
// time4, the integer part of the centre of area, and time8, that value times ten.
module laundry_flc
  import flc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // knowledge base tuning port
  input  logic       kb_wr_en,
  input  kb_sel_e    kb_wr_sel,
  input  logic [2:0] kb_wr_term,
  input  logic [3:0] kb_wr_elem,
  input  logic [8:0] kb_wr_data,
  // table programming
  input  logic       rebuild,
  output logic       building,
  output logic       table_ready,
  // queries
  input  logic       q_valid,
  input  logic [3:0] q_greasiness,
  input  logic [3:0] q_dirtiness,
  output logic       r_valid,
  output flc_out_t   r_pla,
  output flc_out_t   r_rom
);

  // ---------------- knowledge base and implication matrices ----------------
  in_mf_t          grease_mf, dirt_mf;
  out_mf_t         time_mf;
  rules_t          rules;
  imat_t [NR-1:0]  g_mat, d_mat;

  knowledge_base u_kb (
    .clk, .rst_n,
    .wr_en(kb_wr_en), .wr_sel(kb_wr_sel), .wr_term(kb_wr_term),
    .wr_elem(kb_wr_elem), .wr_data(kb_wr_data),
    .grease_mf, .dirt_mf, .time_mf, .rules
  );

  implication_matrices u_mats (
    .grease_mf, .dirt_mf, .time_mf, .rules, .g_mat, .d_mat
  );

  // ---------------- table build: sequencer -> inference -> COA -> table ----------------
  logic       start_q, seq_start;
  logic       seq_busy, ev_valid, ev_last;
  logic [3:0] ev_g, ev_d;
  in_vec_t    a_g, a_d;

  // Build once after reset, then on each rebuild request.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) start_q <= 1'b1;
    else        start_q <= 1'b0;
  end
  assign seq_start = start_q || rebuild;

  event_sequencer u_seq (
    .clk, .rst_n, .start(seq_start),
    .busy(seq_busy), .done(),
    .ev_valid, .ev_last, .ev_g, .ev_d, .a_g, .a_d
  );

  out_vec_t          agg;
  flc_out_t          coa_y;

  inference_engine u_inf (
    .a_g, .a_d, .g_mat, .d_mat, .rule_out(), .agg
  );

  coa_defuzzifier u_coa (.agg, .num(), .den(), .y(coa_y));

  logic       tbl_we;
  logic [7:0] tbl_waddr;
  flc_out_t   tbl_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tbl_we    <= 1'b0;
      tbl_waddr <= '0;
      tbl_wdata <= '0;
    end else begin
      tbl_we    <= ev_valid;
      tbl_waddr <= {ev_g, ev_d};
      tbl_wdata <= coa_y;
    end
  end

  // table_ready: set when the last event has been written, cleared by a knowledge base
  // write or a new build.
  logic last_wr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_wr     <= 1'b0;
      table_ready <= 1'b0;
    end else begin
      last_wr <= ev_last;
      if (kb_wr_en || seq_start)  table_ready <= 1'b0;
      else if (last_wr)           table_ready <= 1'b1;
    end
  end

  assign building = seq_busy || tbl_we;

  // ---------------- queries ----------------
  logic [3:0] qg, qd;
  assign qg = (q_greasiness > 4'(NU - 1)) ? 4'(NU - 1) : q_greasiness;
  assign qd = (q_dirtiness  > 4'(NU - 1)) ? 4'(NU - 1) : q_dirtiness;

  event_lut u_lut (
    .clk, .we(tbl_we), .waddr(tbl_waddr), .wdata(tbl_wdata),
    .raddr({qg, qd}), .rdata(r_rom)
  );

  flc_out_t pla_y;

  pla u_pla (.greasiness(qg), .dirtiness(qd), .term_active(), .y(pla_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
      r_pla   <= '0;
    end else begin
      r_valid <= q_valid;
      r_pla   <= pla_y;
    end
  end

  // An answer follows each query after exactly one clock; the table is never ready while
  // it is being written.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n) q_valid |=> r_valid);
  a_ready:   assert property (@(posedge clk) disable iff (!rst_n) tbl_we |-> !table_ready);

endmodule
