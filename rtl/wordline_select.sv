// wordline_select -- word-line decoder in front of a membership ROM.
//
// With REGISTERED=1 the crisp input is first captured in IN_W D flip-flops on
// the falling clock edge. One AND gate per ROM word then compares the held
// value with the constant k*STEP (inputs inverted where the constant has a
// 0), so word line k is high only when the input equals k*STEP exactly; any
// other value leaves every word line low and the ROM reads 0.
// Defaults: 8-bit input, 11 words for crisp values 0,10,...,100.
// With REGISTERED=0 the input is decoded directly; the wash-time ROMs use
// this because the counter that drives them is already a register.
// Timing: wl changes one falling edge after crisp (REGISTERED=1).
module wordline_select #(
  parameter int unsigned IN_W       = 8,
  parameter int unsigned WORDS      = 11,
  parameter int unsigned STEP       = 10,
  parameter bit          REGISTERED = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IN_W-1:0]  crisp,
  output logic [WORDS-1:0] wl
);
  logic [IN_W-1:0] s;

  if (REGISTERED) begin : g_reg
    always_ff @(negedge clk or negedge rst_n) begin
      if (!rst_n) s <= '0;
      else        s <= crisp;
    end
  end else begin : g_comb
    assign s = crisp;
  end

  for (genvar k = 0; k < WORDS; k++) begin : g_word
    localparam logic [IN_W-1:0] PATTERN = IN_W'(k * STEP);
    // AND of the bits, each taken inverted where PATTERN has a 0
    assign wl[k] = &(~(s ^ PATTERN));
  end
endmodule
