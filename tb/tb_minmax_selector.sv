// tb_minmax_selector -- checks both orientations of the selector: with
// SWAP=0 Select A is high exactly when A <= B, with SWAP=1 exactly when
// A > B; the two selects are always complementary. Includes the example
// A = 00000010, B = 00000110 (Select A high for MIN).
module tb_minmax_selector;
  logic [7:0] a, b;
  logic sa_min, sb_min, sa_max, sb_max;
  int checks = 0, failures = 0;

  minmax_selector dut (.a, .b, .sel_a(sa_min), .sel_b(sb_min));
  minmax_selector #(.W(8), .SWAP(1'b1)) u_max (.a, .b, .sel_a(sa_max), .sel_b(sb_max));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] x, input logic [7:0] y);
    a = x; b = y; #1;
    checks++;
    if (sa_min != (x <= y) || sb_min != !(x <= y) || sa_max != (x > y) || sb_max != !(x > y)) begin
      failures++;
      $display("FAIL a=%0d b=%0d min:%b%b max:%b%b", x, y, sa_min, sb_min, sa_max, sb_max);
    end
  endtask

  initial begin
    check(8'b00000010, 8'b00000110);
    check(8'd3, 8'd2);   // differs only in the LSB of A
    check(8'd7, 8'd7);
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) check(8'(i), 8'(j));
    for (int n = 0; n < 2000; n++) check(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
