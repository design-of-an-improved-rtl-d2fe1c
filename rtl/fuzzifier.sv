// fuzzifier -- fuzzification hardware of one adjective: a wordline_select
// decoder driving a membership_rom.
//
// For a linguistic input (REGISTERED=1, 11 words, step 10) the 8-bit sensor
// value is captured on the falling edge and turned into that adjective's
// 8-bit grade, 0..10. For the wash-time output (REGISTERED=0, 13 words,
// step 1) the 4-bit counter value, zero-extended, is decoded directly.
// One instance exists per adjective: 9 for the inputs, 5 for the output.
module fuzzifier
  import fuzzy_pkg::*;
#(
  parameter fuzzy_pkg::adj_e ADJ        = fuzzy_pkg::LI_SMALL,
  parameter bit              REGISTERED = 1'b1,
  parameter int unsigned     WORDS      = 11,
  parameter int unsigned     STEP       = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  crisp,
  output grade_t      grade
);
  logic [WORDS-1:0] wl;

  wordline_select #(.IN_W(8), .WORDS(WORDS), .STEP(STEP), .REGISTERED(REGISTERED)) u_sel (
    .clk, .rst_n, .crisp, .wl
  );
  membership_rom #(.ADJ(ADJ), .WORDS(WORDS)) u_rom (.wl, .grade);
endmodule
