// defuzzifier -- centre-of-gravity defuzzification of the swept output set.
//
// Wash time = sum(i * m_i) / sum(m_i) over the 13 counter values i = 0..12,
// where m_i is the final membership output of the inference engine while
// the counter shows i. dividend_unit and divisor_unit accumulate the two
// sums one term per clock and latch them in their Register 4 on the rising
// edge during count 12; cas_divider divides the latched pair. The quotient,
// 0..12, is the wash time in units of 12 minutes.
// valid is a registered strobe, high for one clock from the rising edge
// that latches a result; it is suppressed for the first latch after reset
// because that sweep started in mid-flight. wash_time holds between strobes.
module defuzzifier (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] m,
  input  logic [3:0] count,
  output logic [3:0] wash_time,
  output logic       valid
);
  logic [10:0] dividend;
  logic [7:0]  divisor;
  logic        primed;

  dividend_unit #(.ACC_W(11)) u_dividend (.clk, .rst_n, .m, .count, .dividend);
  divisor_unit  #(.ACC_W(8))  u_divisor  (.clk, .rst_n, .m, .count, .divisor);
  cas_divider   #(.DW(11), .VW(8), .QW(4)) u_div (
    .dividend, .divisor, .quotient(wash_time)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      primed <= 1'b0;
      valid  <= 1'b0;
    end else begin
      valid <= (count == 4'd12) && primed;
      if (count == 4'd12) primed <= 1'b1;
    end
  end
endmodule
