// tb_array_multiplier -- exhaustive check of the 4x4 array multiplier,
// including the worked examples 1101 x 1011 = 10001111 and
// 0010 x 1110 = 00011100.
module tb_array_multiplier;
  logic [3:0] m, q;
  logic [7:0] s;
  int checks = 0, failures = 0;

  array_multiplier dut (.m, .q, .s);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q = 4'b1101; m = 4'b1011; #1;
    checks++; if (s != 8'b10001111) begin failures++; $display("FAIL 13x11 = %b", s); end
    q = 4'b1110; m = 4'b0010; #1;
    checks++; if (s != 8'b00011100) begin failures++; $display("FAIL 14x2 = %b", s); end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        m = 4'(i); q = 4'(j); #1;
        checks++;
        if (int'(s) != i * j) begin
          failures++;
          $display("FAIL %0d x %0d = %0d", i, j, s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
