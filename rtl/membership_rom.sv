// membership_rom -- mask-programmed ROM holding one adjective's membership
// function.
//
// WORDS words of 8 bits, selected by one-hot word lines. In the transistor
// circuit the bit lines are precharged high and an NMOS at a crossing pulls a
// bit line low when its word line rises; an inverter per bit line turns that
// into a 1. Here each word is a constant and the output is the OR of the
// words whose word line is high, so no word line high reads 0, exactly as
// the precharged array does. Contents come from fuzzy_pkg::rom_word for the
// adjective ADJ. Combinational.
module membership_rom
  import fuzzy_pkg::*;
#(
  parameter fuzzy_pkg::adj_e ADJ   = fuzzy_pkg::LI_SMALL,
  parameter int unsigned     WORDS = 11
) (
  input  logic [WORDS-1:0] wl,
  output grade_t           grade
);
  grade_t masked [WORDS];

  for (genvar k = 0; k < WORDS; k++) begin : g_word
    localparam grade_t CONTENT = rom_word(ADJ, k);
    assign masked[k] = CONTENT & {GW{wl[k]}};
  end

  always_comb begin
    grade = '0;
    for (int k = 0; k < WORDS; k++) grade |= masked[k];
  end
endmodule
