// full_adder -- one-bit full adder cell.
//
// Sum is high when an odd number of the three inputs are high; the carry is
// the majority function. Written in the two-XOR / two-AND / one-OR form:
//   sum  = cin ^ (a ^ b)
//   cout = (a & b) | (cin & (a ^ b))
// Purely combinational. It is the building cell of the ripple adders, the
// array multiplier and the controlled add/subtract cells of the divider.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic p;
  assign p    = a ^ b;
  assign sum  = cin ^ p;
  assign cout = (a & b) | (cin & p);
endmodule
