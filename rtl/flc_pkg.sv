// flc_pkg: types, sizes and default knowledge of the laundry fuzzy logic controller.
//
// The controller maps two crisp 4-bit input codes, $greasiness and $dirtiness, to a wash
// time. An input code x in 0..10 stands for x*10 percent; codes 11..15 are outside the
// universe. Membership grades are held as tenths (0..10 meaning 0.0..1.0) in 4 bits, which
// represents every grade of the triangular input terms exactly.
//
// Input terms (low, medium, high) are the triangles of the membership plots: low falls from
// 1.0 at 0 % to 0.0 at 50 %, medium peaks at 50 %, high rises from 50 % to 100 %.
// The $time universe has NV = 14 elements whose values are 1..14 (element i has value i+1);
// the five time terms are singletons at the values 2, 4, 7, 10 and 13. Those positions are
// this design's reading of the published aggregated and defuzzified tables and of the
// contour plot of the control surface.
//
// The package also carries the default rule base (seven rules) and two constant functions
// used at elaboration: table_entry() evaluates the default controller for one event, and
// pla_cover() derives a sum-of-products cover of the whole event table for the PLA by a
// greedy cube expansion. Both are only evaluated at elaboration time.
package flc_pkg;

  localparam int NU  = 11;  // input universe: codes 0..10
  localparam int NV  = 14;  // output universe: elements with values 1..14
  localparam int NIT = 3;   // input terms per variable
  localparam int NOT = 5;   // output ($time) terms
  localparam int NR  = 7;   // rules
  localparam int GW  = 4;   // grade width (tenths)
  localparam int GMAX = 10; // grade 1.0
  localparam int MAX_TERMS = 121; // upper bound of PLA product terms (one per event)

  typedef logic [GW-1:0] grade_t;
  typedef logic [NU-1:0][GW-1:0] in_vec_t;             // fuzzy set over the input universe
  typedef logic [NV-1:0][GW-1:0] out_vec_t;            // fuzzy set over the $time universe
  typedef logic [NU-1:0][NV-1:0][GW-1:0] imat_t;       // implication matrix, [u][v]
  typedef logic [NIT-1:0][NU-1:0][GW-1:0] in_mf_t;     // the three terms of one input variable
  typedef logic [NOT-1:0][NV-1:0][GW-1:0] out_mf_t;    // the five $time terms

  typedef enum logic [1:0] {T_LOW = 2'd0, T_MEDIUM = 2'd1, T_HIGH = 2'd2} in_term_e;
  typedef enum logic [2:0] {
    T_VERY_SHORT = 3'd0, T_SHORT = 3'd1, T_MODERATE = 3'd2, T_LONG = 3'd3, T_VERY_LONG = 3'd4
  } time_term_e;

  // One rule: "if greasiness is (OR of g_terms) and dirtiness is (OR of d_terms) then time
  // is out_term". A term mask bit i selects input term i (bit 0 low, 1 medium, 2 high).
  typedef struct packed {
    logic [NIT-1:0] g_terms;
    logic [NIT-1:0] d_terms;
    time_term_e     out_term;
  } rule_t;
  typedef rule_t [NR-1:0] rules_t;

  // Knowledge base write port: which table, which entry, which element, and the data.
  typedef enum logic [1:0] {KB_GREASE = 2'd0, KB_DIRT = 2'd1, KB_TIME = 2'd2, KB_RULE = 2'd3} kb_sel_e;

  // Event-table word: the 8-bit time (x10 scale) over the 4-bit time.
  typedef struct packed {
    logic [7:0] time8;
    logic [3:0] time4;
  } flc_out_t;

  // One PLA product term: input literals that are cared for, their values, and the output
  // word the term drives onto the OR plane.
  typedef struct packed {
    logic [7:0] care;
    logic [7:0] val;
    flc_out_t   out;
  } cube_t;
  typedef cube_t [MAX_TERMS-1:0] cover_t;

  // Element index of each time singleton (value = index + 1).
  function automatic int time_pos(int term);
    case (term)
      0: return 1;   // very_short_time, value 2
      1: return 3;   // short_time,      value 4
      2: return 6;   // moderate_time,   value 7
      3: return 9;   // long_time,       value 10
      default: return 12; // very_long_time, value 13
    endcase
  endfunction

  // Default membership grade (tenths) of input term `term` at code x.
  function automatic grade_t default_in_mf(int term, int x);
    int g;
    case (term)
      0: g = (x < 5) ? 10 - 2 * x : 0;
      1: g = (x <= 5) ? 2 * x : 20 - 2 * x;
      default: g = (x > 5) ? 2 * x - 10 : 0;
    endcase
    if (g < 0) g = 0;
    return grade_t'(g);
  endfunction

  function automatic in_mf_t default_in_mfs();
    in_mf_t m;
    for (int t = 0; t < NIT; t++)
      for (int x = 0; x < NU; x++) m[t][x] = default_in_mf(t, x);
    return m;
  endfunction

  function automatic out_mf_t default_out_mfs();
    out_mf_t m = '0;
    for (int t = 0; t < NOT; t++) m[t][time_pos(t)] = grade_t'(GMAX);
    return m;
  endfunction

  // The seven rules of the laundry controller, in the order they are listed.
  function automatic rules_t default_rules();
    rules_t r;
    r[0] = '{g_terms: 3'b001, d_terms: 3'b001, out_term: T_VERY_SHORT};
    r[1] = '{g_terms: 3'b001, d_terms: 3'b010, out_term: T_SHORT};
    r[2] = '{g_terms: 3'b001, d_terms: 3'b100, out_term: T_MODERATE};
    r[3] = '{g_terms: 3'b010, d_terms: 3'b011, out_term: T_MODERATE};
    r[4] = '{g_terms: 3'b010, d_terms: 3'b100, out_term: T_LONG};
    r[5] = '{g_terms: 3'b100, d_terms: 3'b011, out_term: T_LONG};
    r[6] = '{g_terms: 3'b100, d_terms: 3'b100, out_term: T_VERY_LONG};
    return r;
  endfunction

  function automatic grade_t gmin(grade_t a, grade_t b);
    return (a < b) ? a : b;
  endfunction

  function automatic grade_t gmax(grade_t a, grade_t b);
    return (a > b) ? a : b;
  endfunction

  // Centre of area of an aggregated set: 4-bit integer part, and that integer times ten.
  function automatic flc_out_t coa(out_vec_t agg);
    int num = 0;
    int den = 0;
    int q;
    flc_out_t o;
    for (int i = 0; i < NV; i++) begin
      num += int'(agg[i]) * (i + 1);
      den += int'(agg[i]);
    end
    q = (den == 0) ? 0 : num / den;
    o.time4 = 4'(q);
    o.time8 = 8'(q * 10);
    return o;
  endfunction

  // Default controller evaluated for one event (g, d in 0..10): max-min inference over the
  // seven rules followed by centre of area.
  function automatic flc_out_t table_entry(int g, int d);
    in_mf_t   mf = default_in_mfs();
    out_mf_t  tm = default_out_mfs();
    rules_t   rb = default_rules();
    out_vec_t agg = '0;
    for (int r = 0; r < NR; r++) begin
      grade_t ag = '0;
      grade_t ad = '0;
      for (int t = 0; t < NIT; t++) begin
        if (rb[r].g_terms[t]) ag = gmax(ag, mf[t][g]);
        if (rb[r].d_terms[t]) ad = gmax(ad, mf[t][d]);
      end
      for (int v = 0; v < NV; v++)
        agg[v] = gmax(agg[v], gmin(gmin(ag, ad), tm[int'(rb[r].out_term)][v]));
    end
    return coa(agg);
  endfunction

  // Greedy sum-of-products cover of the event table. Inputs are {greasiness, dirtiness};
  // codes above 10 are don't-cares. Each uncovered event seeds a cube that is widened one
  // literal at a time (dirtiness LSB first) as long as every valid event inside it has the
  // seed's output word.
  function automatic cover_t pla_cover();
    cover_t     c = '0;
    logic [255:0][11:0] tab;
    logic [255:0]       dc;
    logic [255:0]       cov;
    int         n = 0;
    for (int m = 0; m < 256; m++) begin
      dc[m]  = (m[7:4] > 4'd10) || (m[3:0] > 4'd10);
      tab[m] = dc[m] ? '0 : table_entry(int'(m[7:4]), int'(m[3:0]));
      cov[m] = 1'b0;
    end
    for (int m = 0; m < 256; m++) begin
      if (!dc[m] && !cov[m]) begin
        logic [7:0] care = 8'hFF;
        for (int b = 0; b < 8; b++) begin
          logic [7:0] tc = care;
          logic       ok = 1'b1;
          tc[b] = 1'b0;
          for (int k = 0; k < 256; k++)
            if (((8'(k) ^ 8'(m)) & tc) == 8'h00 && !dc[k] && tab[k] != tab[m]) ok = 1'b0;
          if (ok) care = tc;
        end
        for (int k = 0; k < 256; k++)
          if (((8'(k) ^ 8'(m)) & care) == 8'h00) cov[k] = 1'b1;
        c[n].care = care;
        c[n].val  = 8'(m) & care;
        c[n].out  = tab[m];
        n++;
      end
    end
    return c;
  endfunction

  // Number of product terms in pla_cover(): the terms with a non-empty care set or a
  // non-zero output. (A term with no care bits cannot occur for this table.)
  function automatic int pla_term_count(cover_t c);
    int n = 0;
    for (int i = 0; i < MAX_TERMS; i++)
      if (c[i].care != 8'h00) n++;
    return n;
  endfunction

endpackage
