// fuzzy_wash_controller -- fuzzy-logic wash-time controller.
//
// Three 8-bit crisp sensor readings (dirtiness of the clothes, type of dirt,
// mass of the clothes, each 0..100 in steps of 10) are fuzzified by nine
// membership ROMs, three per input, each behind a falling-edge input
// register and a word-line decoder. A MOD-13 counter sweeps the wash-time
// axis 0..12, one point per clock, and addresses five output membership
// ROMs. The inference engine applies the 27 MIN-MAX rules at every point and
// gives the aggregated membership m; its 4 low bits go to the
// centre-of-gravity defuzzifier, which accumulates sum(i*m_i) and sum(m_i)
// over a full sweep, latches them at count 12 and divides.
//
// Interface: clk (counter and input registers on the falling edge,
// accumulator Register 3/4 on the rising edge), rst_n asynchronous active
// low. wash_time (0..12, multiply by 12 for minutes) is held between sweeps;
// wash_time_valid pulses for one clock every 13 clocks once a full sweep has
// been accumulated. Inputs must be held for a whole sweep: the first valid
// result that reflects a new input set is the second strobe after the change.
module fuzzy_wash_controller
  import fuzzy_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] dirt,
  input  logic [DATA_W-1:0] grease,
  input  logic [DATA_W-1:0] mass,
  output logic [3:0]        wash_time,
  output logic              wash_time_valid,
  output logic [3:0]        count
);
  grade_t li [3][3];
  grade_t lo [5];
  grade_t m;
  logic [DATA_W-1:0] crisp_in [3];

  assign crisp_in[0] = dirt;
  assign crisp_in[1] = grease;
  assign crisp_in[2] = mass;

  mod13_counter u_counter (.clk, .rst_n, .count);

  // 9 input ROMs: [variable][adjective]
  for (genvar v = 0; v < 3; v++) begin : g_li
    fuzzifier #(.ADJ(LI_LARGE),  .REGISTERED(1'b1), .WORDS(LI_WORDS), .STEP(LI_STEP)) u_hi (
      .clk, .rst_n, .crisp(8'(crisp_in[v])), .grade(li[v][0]));
    fuzzifier #(.ADJ(LI_MEDIUM), .REGISTERED(1'b1), .WORDS(LI_WORDS), .STEP(LI_STEP)) u_med (
      .clk, .rst_n, .crisp(8'(crisp_in[v])), .grade(li[v][1]));
    fuzzifier #(.ADJ(LI_SMALL),  .REGISTERED(1'b1), .WORDS(LI_WORDS), .STEP(LI_STEP)) u_lo (
      .clk, .rst_n, .crisp(8'(crisp_in[v])), .grade(li[v][2]));
  end

  // 5 output ROMs addressed by the counter
  for (genvar k = 0; k < 5; k++) begin : g_lo
    fuzzifier #(.ADJ(adj_e'(int'(LO_VLOW) + k)), .REGISTERED(1'b0), .WORDS(LO_WORDS), .STEP(1)) u_rom (
      .clk, .rst_n, .crisp({4'b0, count}), .grade(lo[k]));
  end

  inference_engine u_inf (.li, .lo, .m);

  defuzzifier u_defuzz (
    .clk, .rst_n, .m(m[3:0]), .count, .wash_time, .valid(wash_time_valid)
  );
endmodule
