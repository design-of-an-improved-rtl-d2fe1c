// cas_divider -- parallel non-restoring array divider built from controlled
// add/subtract (CAS) cells, each an XOR gate and a full adder.
//
// Divides a DW-bit unsigned dividend by a VW-bit unsigned divisor and gives
// a QW-bit quotient; the remainder is not used. The partial remainder is kept
// in RW = max(DW, VW+QW-1) + 1 bits, two's complement. Row k (k = QW-1 down
// to 0) adds or subtracts divisor << k: the XORs invert the divisor and the
// row's carry-in is 1 when the row subtracts. The first row subtracts; each
// later row subtracts if the previous partial remainder was non-negative and
// adds otherwise. Quotient bit k is 1 when row k leaves a non-negative
// remainder. The result is exact whenever dividend < divisor * 2**QW, which a
// centre of gravity over counts 0..12 always satisfies. A zero divisor
// (no rule fired) gives quotient 0; that case is this design's choice.
// Combinational; delay is QW ripple rows.
module cas_divider #(
  parameter int unsigned DW = 11,
  parameter int unsigned VW = 8,
  parameter int unsigned QW = 4
) (
  input  logic [DW-1:0] dividend,
  input  logic [VW-1:0] divisor,
  output logic [QW-1:0] quotient
);
  localparam int unsigned SW = (DW > VW + QW - 1) ? DW : VW + QW - 1;
  localparam int unsigned RW = SW + 1;

  logic [RW-1:0] rem [QW+1];   // rem[QW] is the dividend
  logic [QW-1:0] q;

  assign rem[QW] = RW'(dividend);

  for (genvar k = QW - 1; k >= 0; k--) begin : g_row
    logic          sub;   // 1: subtract, 0: add
    logic [RW-1:0] d;
    logic          unused_cout;
    if (k == QW - 1) begin : g_first
      assign sub = 1'b1;
    end else begin : g_next
      assign sub = !rem[k+1][RW-1];
    end
    assign d = (RW'(divisor) << k) ^ {RW{sub}};
    ripple_adder #(.WIDTH(RW)) u_cas (
      .a(rem[k+1]), .b(d), .cin(sub), .sum(rem[k]), .cout(unused_cout)
    );
    assign q[k] = !rem[k][RW-1];
  end

  assign quotient = (divisor == '0) ? '0 : q;
endmodule
