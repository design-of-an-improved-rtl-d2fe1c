// array_multiplier -- unsigned WIDTH x WIDTH array multiplier (default 4x4).
//
// Partial products are AND gates m[j] & q[i]. Row 0 is the first partial
// product; every following row adds the next partial product to the running
// sum shifted right by one, using a WIDTH-bit ripple row of full adders whose
// bit-0 cell is a half adder (carry in grounded). Each row retires one
// product bit; the last row supplies the upper WIDTH bits. This is the
// shift-and-add scheme: each partial product is added as soon as it is
// formed, so no more than two numbers are ever added at once.
// Unsigned only; the controller never multiplies negative numbers.
// Combinational. In the controller it multiplies the 4-bit final membership
// value by the 4-bit count.
module array_multiplier #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0]   m,   // multiplier
  input  logic [WIDTH-1:0]   q,   // multiplicand
  output logic [2*WIDTH-1:0] s    // product
);
  // upper[i]: running sum above the bits already retired, after row i
  logic [WIDTH-1:0] upper [WIDTH];
  logic [WIDTH-1:0] pp    [WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_pp
    assign pp[i] = q & {WIDTH{m[i]}};
  end

  assign s[0]     = pp[0][0];
  assign upper[0] = {1'b0, pp[0][WIDTH-1:1]};

  for (genvar i = 1; i < WIDTH; i++) begin : g_row
    logic [WIDTH-1:0] t;
    logic             c;
    ripple_adder #(.WIDTH(WIDTH)) u_row (
      .a(upper[i-1]), .b(pp[i]), .cin(1'b0), .sum(t), .cout(c)
    );
    assign s[i]     = t[0];
    assign upper[i] = {c, t[WIDTH-1:1]};
  end

  assign s[2*WIDTH-1:WIDTH] = upper[WIDTH-1];
endmodule
