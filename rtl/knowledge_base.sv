// knowledge_base: the controller's tunable fuzzy knowledge, held in registers.
//
// It stores the three membership functions (low, medium, high) of each input variable
// sampled at the 11 input codes, the five $time membership functions over the 14-element
// output universe, and the seven rules. Reset loads the laundry controller's knowledge
// (triangular input terms, singleton time terms at values 2, 4, 7, 10 and 13, and the
// seven rules). A single write port lets a tuning agent change one entry per cycle, which
// is how the optional tuning loop of the design flow reaches the hardware; the write port
// and its encoding are this design's own.
//
// Write port: wr_sel picks the table (greasiness terms, dirtiness terms, time terms or
// rules), wr_term the term or rule, wr_elem the universe element, wr_data the new grade in
// tenths (bits 3:0) or the new rule {g_terms, d_terms, out_term} (bits 8:0). Writes to
// entries that do not exist are ignored. New contents are visible on the outputs the cycle
// after the write.
module knowledge_base
  import flc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  kb_sel_e         wr_sel,
  input  logic [2:0]      wr_term,
  input  logic [3:0]      wr_elem,
  input  logic [8:0]      wr_data,
  output in_mf_t          grease_mf,
  output in_mf_t          dirt_mf,
  output out_mf_t         time_mf,
  output rules_t          rules
);

  logic grade_ok;
  assign grade_ok = wr_data[3:0] <= 4'(GMAX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grease_mf <= default_in_mfs();
      dirt_mf   <= default_in_mfs();
      time_mf   <= default_out_mfs();
      rules     <= default_rules();
    end else if (wr_en) begin
      unique case (wr_sel)
        KB_GREASE: if (int'(wr_term) < NIT && int'(wr_elem) < NU && grade_ok)
                     grease_mf[wr_term][wr_elem] <= wr_data[3:0];
        KB_DIRT:   if (int'(wr_term) < NIT && int'(wr_elem) < NU && grade_ok)
                     dirt_mf[wr_term][wr_elem] <= wr_data[3:0];
        KB_TIME:   if (int'(wr_term) < NOT && int'(wr_elem) < NV && grade_ok)
                     time_mf[wr_term][wr_elem] <= wr_data[3:0];
        KB_RULE:   if (int'(wr_term) < NR && int'(wr_data[2:0]) < NOT)
                     rules[wr_term] <= rule_t'(wr_data);
      endcase
    end
  end

endmodule
