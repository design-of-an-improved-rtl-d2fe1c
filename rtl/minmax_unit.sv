// minmax_unit -- complete two-input MIN (IS_MAX=0) or MAX (IS_MAX=1)
// calculation hardware.
//
// A minmax_selector finds the smaller set; for MAX its two outputs are
// swapped. A bit_selector then gates the chosen set to the output.
// Combinational. The inference engine uses 81 MIN units (three per rule)
// and 28 MAX units (the 27-input MAX tree).
module minmax_unit #(
  parameter int unsigned W      = 8,
  parameter bit          IS_MAX = 1'b0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  logic sel_a, sel_b;
  minmax_selector #(.W(W), .SWAP(IS_MAX)) u_sel (.a, .b, .sel_a, .sel_b);
  bit_selector    #(.W(W))                u_bit (.a, .b, .sel_a, .sel_b, .y);
endmodule
