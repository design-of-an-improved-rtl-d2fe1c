// minmax_selector -- decides which of two W-bit sets is the smaller.
//
// With SWAP=0, sel_a is high when A <= B and sel_b when A > B: the high
// output marks the MIN set, the low one the MAX set. SWAP=1 exchanges the
// two outputs, so the high output marks the MAX set. Exactly one output is
// high at any time; ties go to A. Implemented as a magnitude comparator over
// all W bits. Combinational.
module minmax_selector #(
  parameter int unsigned W    = 8,
  parameter bit          SWAP = 1'b0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         sel_a,
  output logic         sel_b
);
  logic a_le_b;
  assign a_le_b = (a <= b);
  assign sel_a  = SWAP ? !a_le_b : a_le_b;
  assign sel_b  = !sel_a;
endmodule
