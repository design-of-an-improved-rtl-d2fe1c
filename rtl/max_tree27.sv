// max_tree27 -- maximum of 27 rule strengths in five steps of two-input MAX
// units (28 units in all).
//   step 1: inputs 0..25 in 13 pairs, input 26 paired with 0   -> 14
//   step 2: 7 pairs                                              ->  7
//   step 3: 3 pairs, the 7th result paired with 0                ->  4
//   step 4: 2 pairs                                              ->  2
//   step 5: 1 pair                          -> final membership output
// Pairs are taken in order (0 with 1, 2 with 3, ...). Combinational.
module max_tree27 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] in [27],
  output logic [W-1:0] y
);
  logic [W-1:0] s1 [14];
  logic [W-1:0] s2 [7];
  logic [W-1:0] s3 [4];
  logic [W-1:0] s4 [2];

  for (genvar i = 0; i < 14; i++) begin : g_s1
    minmax_unit #(.W(W), .IS_MAX(1'b1)) u (
      .a(in[2*i]), .b((2*i+1 < 27) ? in[(2*i+1) % 27] : '0), .y(s1[i])
    );
  end
  for (genvar i = 0; i < 7; i++) begin : g_s2
    minmax_unit #(.W(W), .IS_MAX(1'b1)) u (.a(s1[2*i]), .b(s1[2*i+1]), .y(s2[i]));
  end
  for (genvar i = 0; i < 4; i++) begin : g_s3
    minmax_unit #(.W(W), .IS_MAX(1'b1)) u (
      .a(s2[2*i]), .b((2*i+1 < 7) ? s2[(2*i+1) % 7] : '0), .y(s3[i])
    );
  end
  for (genvar i = 0; i < 2; i++) begin : g_s4
    minmax_unit #(.W(W), .IS_MAX(1'b1)) u (.a(s3[2*i]), .b(s3[2*i+1]), .y(s4[i]));
  end
  minmax_unit #(.W(W), .IS_MAX(1'b1)) u_s5 (.a(s4[0]), .b(s4[1]), .y(y));
endmodule
