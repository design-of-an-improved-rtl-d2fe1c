// tb_minmax_unit -- checks the complete MIN unit (default) and a MAX unit
// on the example A = 01000000, B = 01111110 (MAX 01111110, MIN 01000000)
// and on random and exhaustive small operands.
module tb_minmax_unit;
  logic [7:0] a, b, y_min, y_max;
  int checks = 0, failures = 0;

  minmax_unit dut (.a, .b, .y(y_min));
  minmax_unit #(.W(8), .IS_MAX(1'b1)) u_max (.a, .b, .y(y_max));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] x, input logic [7:0] z);
    a = x; b = z; #1;
    checks++;
    if (y_min != ((x < z) ? x : z) || y_max != ((x > z) ? x : z)) begin
      failures++;
      $display("FAIL a=%0d b=%0d min=%0d max=%0d", x, z, y_min, y_max);
    end
  endtask

  initial begin
    a = 8'b01000000; b = 8'b01111110; #1;
    checks++; if (y_max != 8'b01111110) begin failures++; $display("FAIL example MAX"); end
    checks++; if (y_min != 8'b01000000) begin failures++; $display("FAIL example MIN"); end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) check(8'(i), 8'(j));
    for (int n = 0; n < 2000; n++) check(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
