// inference_engine -- MIN-MAX fuzzy inference over the 27-rule base.
//
// For every rule a min4 takes the minimum of the grades of its three premise
// adjectives (dirtiness, type of dirt, mass) and of the grade its conclusion
// adjective has at the wash-time point currently addressed by the counter.
// max_tree27 then takes the maximum over all rules. The result m is the
// membership of the aggregated output fuzzy set at that point; sweeping the
// counter over 0..12 produces the whole set, one point per clock.
// Combinational. li[v][a] is the grade of adjective a (0 = Large/Greasy/Heavy,
// 1 = Medium, 2 = Small/Not Greasy/Light) of variable v (0 = dirtiness,
// 1 = type of dirt, 2 = mass); lo[k] is the grade of wash-time adjective k
// (0 = Very Low .. 4 = Very High). The rule table is fuzzy_pkg::RULES.
module inference_engine
  import fuzzy_pkg::*;
(
  input  grade_t li [3][3],
  input  grade_t lo [5],
  output grade_t m
);
  grade_t strength [NRULES];

  for (genvar r = 0; r < NRULES; r++) begin : g_rule
    localparam rule_t R = RULES[r];
    min4 #(.W(GW)) u_min (
      .in0(li[0][R.dirt]), .in1(li[1][R.kind]), .in2(li[2][R.mass]), .in3(lo[R.wash]),
      .y(strength[r])
    );
  end

  max_tree27 #(.W(GW)) u_max (.in(strength), .y(m));
endmodule
