// ripple_adder -- WIDTH-bit ripple-carry adder made of full_adder cells.
//
// Bit 0 is the least significant bit. The carry ripples from cell to cell;
// tying cin to 0 turns the bit-0 cell into a half adder, which is how the
// accumulators use it. The controlled add/subtract rows of the divider drive
// cin with the subtract control instead. Combinational, delay grows linearly
// with WIDTH. Default width 11 is the dividend accumulator width.
module ripple_adder #(
  parameter int unsigned WIDTH = 11
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[WIDTH];
endmodule
