// tb_ripple_adder -- checks the 11-bit ripple adder (default width) on
// corner values and random operands, with carry in 0 and 1.
module tb_ripple_adder;
  localparam int W = 11;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  ripple_adder dut (.a, .b, .cin, .sum, .cout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    logic [W:0] exp;
    a = x; b = y; cin = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + (W+1)'(c);
    checks++;
    if ({cout, sum} != exp) begin
      failures++;
      $display("FAIL %0d + %0d + %0d = %0d, got %0d", x, y, c, exp, {cout, sum});
    end
  endtask

  initial begin
    check('0, '0, 0);
    check('1, 11'd1, 0);
    check('1, '1, 1);
    check(11'd780, 11'd0, 0);
    for (int n = 0; n < 2000; n++) check(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
