// dividend_unit -- accumulates the centre-of-gravity numerator, sum(i * m_i),
// over one sweep of the wash-time counter.
//
// The 4-bit final membership m is multiplied by the count in an
// array_multiplier. On each falling edge Register 1 takes the product and
// Register 2 takes Register 3 (or zero on the edge that ends count 11, which
// starts a new sweep). On each rising edge Register 3 takes Register 1 +
// Register 2 from a ripple adder, so the running sum advances by one term
// per clock. Register 4, also on the rising edge, loads Register 3 while the
// count decodes to 1100 (12); at that moment Register 3 holds the complete
// 13-term sum of counts 11, 12, 0, ..., 10, and Register 4 keeps it until
// the next sweep. Register widths are 11 bits (max 10*(1+...+12) = 780).
// The sweep start at count 11 and the use of the 1100 decode as a load
// enable are this design's choices; the register structure and clock edges
// follow the original design.
module dividend_unit #(
  parameter int unsigned ACC_W = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       m,
  input  logic [3:0]       count,
  output logic [ACC_W-1:0] dividend
);
  logic [7:0]       prod;
  logic [ACC_W-1:0] reg1, reg2, reg3, sum;
  logic             unused_cout;

  array_multiplier #(.WIDTH(4)) u_mul (.m(m), .q(count), .s(prod));

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg1 <= '0;
      reg2 <= '0;
    end else begin
      reg1 <= ACC_W'(prod);
      reg2 <= (count == 4'd11) ? '0 : reg3;
    end
  end

  ripple_adder #(.WIDTH(ACC_W)) u_add (
    .a(reg1), .b(reg2), .cin(1'b0), .sum(sum), .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg3     <= '0;
      dividend <= '0;
    end else begin
      reg3 <= sum;
      if (count == 4'b1100) dividend <= reg3;
    end
  end
endmodule
