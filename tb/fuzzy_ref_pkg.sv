// fuzzy_ref_pkg -- behavioural reference model of the wash-time controller,
// used only by the testbenches. Written from the controller's specification
// (membership shapes, rule table, centre of gravity) without reusing the RTL
// tables, so the testbenches compare against an independent computation.
package fuzzy_ref_pkg;

  // Input adjective: 0 = Large/Greasy/Heavy, 1 = Medium, 2 = Small/Not Greasy/Light
  function automatic int li_grade(int adj, int x);
    int g;
    if (x < 0 || x > 100 || (x % 10) != 0) return 0;
    case (adj)
      0:       g = (x - 50) / 5;
      1:       g = 10 - ((x > 50) ? (x - 50) : (50 - x)) / 5;
      default: g = 10 - x / 5;
    endcase
    return (g < 0) ? 0 : g;
  endfunction

  // Output adjective k = 0 (Very Low) .. 4 (Very High) at counter value i
  function automatic int lo_grade(int k, int i);
    int d;
    d = i - 3 * k;
    if (d < 0) d = -d;
    case (d)
      0: return 10;
      1: return 7;
      2: return 3;
      default: return 0;
    endcase
  endfunction

  // Rule table: dirtiness (L/M/S), type of dirt (G/M/N), mass (H/M/L),
  // wash time 1..5 = Very Low .. Very High, rules 1..27 in order.
  localparam string RULE_TXT =
    "LGH5LGM4LMH4LGL3LNH4LNL3LMM3LML2LNM2MGH4MGL2MNH3MNL2MNM2MML2MGM3MMH3MMM3SNL1SNH3SGL2SNM2SML2SMH3SGM3SMM2SGH4";

  function automatic int code(byte c);
    case (c)
      "L", "G", "H": return 0;
      "M":           return 1;
      default:       return 2;   // S, N and the Light of mass
    endcase
  endfunction

  // mass letters: H = heavy(0), M = medium(1), L = light(2)
  function automatic int mass_code(byte c);
    case (c)
      "H": return 0;
      "M": return 1;
      default: return 2;
    endcase
  endfunction

  function automatic void rule(int r, output int d, output int t, output int ms, output int w);
    d  = code(RULE_TXT[4*r]);
    t  = code(RULE_TXT[4*r+1]);
    ms = mass_code(RULE_TXT[4*r+2]);
    w  = RULE_TXT[4*r+3] - "1";
  endfunction

  function automatic int min2(int a, int b); return (a < b) ? a : b; endfunction
  function automatic int max2(int a, int b); return (a > b) ? a : b; endfunction

  // Strength of rule r at counter value i for crisp inputs (xd, xt, xm)
  function automatic int rule_strength(int r, int xd, int xt, int xm, int i);
    int d, t, ms, w;
    rule(r, d, t, ms, w);
    return min2(min2(li_grade(d, xd), li_grade(t, xt)), min2(li_grade(ms, xm), lo_grade(w, i)));
  endfunction

  // Aggregated membership at counter value i
  function automatic int member(int xd, int xt, int xm, int i);
    int m;
    m = 0;
    for (int r = 0; r < 27; r++) m = max2(m, rule_strength(r, xd, xt, xm, i));
    return m;
  endfunction

  // Centre of gravity over i = 0..12, truncated; 0 when nothing fires
  function automatic int ref_wash_time(int xd, int xt, int xm);
    int num, den, m;
    num = 0;
    den = 0;
    for (int i = 0; i <= 12; i++) begin
      m = member(xd, xt, xm, i);
      num += i * m;
      den += m;
    end
    return (den == 0) ? 0 : num / den;
  endfunction

endpackage
