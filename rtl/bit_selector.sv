// bit_selector -- passes set A or set B to the output, bit by bit.
//
// Each output bit is (A_i AND sel_a) OR (B_i AND sel_b): two AND gates into
// a NOR and an inverter. The selects come from minmax_selector and are
// one-hot; if both were low the output would be 0. Combinational.
module bit_selector #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sel_a,
  input  logic         sel_b,
  output logic [W-1:0] y
);
  assign y = (a & {W{sel_a}}) | (b & {W{sel_b}});
endmodule
