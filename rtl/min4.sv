// min4 -- minimum of four W-bit sets: the three premise grades of a rule and
// the grade of its conclusion at the current wash-time point.
//
// Three two-input MIN units arranged as a balanced tree,
// y = min(min(in0, in1), min(in2, in3)). Combinational.
module min4 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  logic [W-1:0] in3,
  output logic [W-1:0] y
);
  logic [W-1:0] m01, m23;
  minmax_unit #(.W(W), .IS_MAX(1'b0)) u_a (.a(in0), .b(in1), .y(m01));
  minmax_unit #(.W(W), .IS_MAX(1'b0)) u_b (.a(in2), .b(in3), .y(m23));
  minmax_unit #(.W(W), .IS_MAX(1'b0)) u_c (.a(m01), .b(m23), .y(y));
endmodule
