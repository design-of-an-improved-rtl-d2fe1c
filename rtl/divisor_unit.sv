// divisor_unit -- accumulates the centre-of-gravity denominator, sum(m_i),
// over one sweep of the wash-time counter.
//
// Same register structure as dividend_unit without the multiplier: Register
// 1 (4 bits) takes the final membership on the falling edge, Register 2
// (8 bits) takes Register 3 or zero on the edge that ends count 11,
// Register 3 (8 bits) takes Register 1 + Register 2 on the rising edge and
// Register 4 (8 bits) loads Register 3 on the rising edge while the count is
// 12. Max sum is 13*10 = 130, which fits 8 bits.
module divisor_unit #(
  parameter int unsigned ACC_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       m,
  input  logic [3:0]       count,
  output logic [ACC_W-1:0] divisor
);
  logic [3:0]       reg1;
  logic [ACC_W-1:0] reg2, reg3, sum;
  logic             unused_cout;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg1 <= '0;
      reg2 <= '0;
    end else begin
      reg1 <= m;
      reg2 <= (count == 4'd11) ? '0 : reg3;
    end
  end

  ripple_adder #(.WIDTH(ACC_W)) u_add (
    .a(ACC_W'(reg1)), .b(reg2), .cin(1'b0), .sum(sum), .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg3    <= '0;
      divisor <= '0;
    end else begin
      reg3 <= sum;
      if (count == 4'b1100) divisor <= reg3;
    end
  end
endmodule
