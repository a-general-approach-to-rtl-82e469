// tb_ref_pkg: floating-point reference model of the laundry fuzzy controller, written
// independently of the RTL for the testbenches.
//
// Membership functions are evaluated from their geometric definition in percent
// (low: 1 - p/50 up to 50 %, medium: triangle peaking at 50 %, high: (p - 50)/50 above 50 %),
// the time terms are singletons at 2, 4, 7, 10 and 13, rules combine their antecedents by
// min and are aggregated by max, and the output is the centre of area. Also holds the rows of
// the published defuzzified table, which are checked verbatim.
package tb_ref_pkg;

  typedef struct {
    int g_mask;   // bit t: greasiness term t (0 low, 1 medium, 2 high)
    int d_mask;
    int out_term; // 0 very short .. 4 very long
  } ref_rule_t;

  typedef ref_rule_t ref_rules_t [7];

  function automatic ref_rules_t laundry_rules();
    ref_rules_t r;
    r[0] = '{1, 1, 0};
    r[1] = '{1, 2, 1};
    r[2] = '{1, 4, 2};
    r[3] = '{2, 3, 2};
    r[4] = '{2, 4, 3};
    r[5] = '{4, 3, 3};
    r[6] = '{4, 4, 4};
    return r;
  endfunction

  function automatic real rmax(real a, real b); return (a > b) ? a : b; endfunction
  function automatic real rmin(real a, real b); return (a < b) ? a : b; endfunction

  // membership of term t at code x (x*10 percent)
  function automatic real mu_in(int t, int x);
    real p = 10.0 * x;
    case (t)
      0: return rmax(0.0, 1.0 - p / 50.0);
      1: return rmax(0.0, 1.0 - ((p > 50.0) ? p - 50.0 : 50.0 - p) / 50.0);
      default: return rmax(0.0, (p - 50.0) / 50.0);
    endcase
  endfunction

  // value (on the 1..14 $time scale) of time term t
  function automatic int time_value(int t);
    int v [5] = '{2, 4, 7, 10, 13};
    return v[t];
  endfunction

  // grade in tenths, rounded
  function automatic int tenths(real m);
    return int'($floor(m * 10.0 + 0.5));
  endfunction

  // aggregated grade of $time element i (value i+1) for event (g, d)
  function automatic real agg_elem(ref_rules_t rb, int g, int d, int i);
    real a = 0.0;
    for (int r = 0; r < 7; r++) begin
      real mg = 0.0, md = 0.0;
      for (int t = 0; t < 3; t++) begin
        if (rb[r].g_mask[t]) mg = rmax(mg, mu_in(t, g));
        if (rb[r].d_mask[t]) md = rmax(md, mu_in(t, d));
      end
      if (time_value(rb[r].out_term) == i + 1) a = rmax(a, rmin(mg, md));
    end
    return a;
  endfunction

  function automatic int ref_time4(ref_rules_t rb, int g, int d);
    real num = 0.0, den = 0.0;
    for (int i = 0; i < 14; i++) begin
      real a = agg_elem(rb, g, d, i);
      num += a * (i + 1);
      den += a;
    end
    if (den == 0.0) return 0;
    return int'($floor(num / den + 1e-9));
  endfunction

  // Published defuzzified rows: {greasiness, dirtiness, 4-bit time, 8-bit time}
  localparam int N_PUB = 12;
  function automatic int pub_row(int k, int field);
    int rows [N_PUB][4] = '{
      '{0, 0, 2, 20}, '{1, 0, 3, 30}, '{2, 0, 4, 40}, '{3, 0, 5, 50}, '{4, 0, 6, 60},
      '{5, 0, 7, 70}, '{5, 10, 10, 100}, '{6, 10, 10, 100}, '{7, 10, 11, 110},
      '{8, 10, 11, 110}, '{9, 10, 12, 120}, '{10, 10, 13, 130}};
    return rows[k][field];
  endfunction

endpackage
