// tb_cas_divider -- exhaustive check of the 11-bit / 8-bit non-restoring
// array divider over every dividend and divisor whose quotient fits in 4
// bits (dividend < 16 * divisor); a zero divisor must give quotient 0.
module tb_cas_divider;
  logic [10:0] dividend;
  logic [7:0]  divisor;
  logic [3:0]  quotient;
  int checks = 0, failures = 0;

  cas_divider dut (.dividend, .divisor, .quotient);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // centre-of-gravity example: m = 10 at counts 1..12 -> 780 / 120 = 6
    dividend = 11'd780; divisor = 8'd120; #1;
    checks++; if (quotient != 4'd6) begin failures++; $display("FAIL 780/120 = %0d", quotient); end
    // divider example: 800 / 80 = 1010
    dividend = 11'd800; divisor = 8'd80; #1;
    checks++; if (quotient != 4'b1010) begin failures++; $display("FAIL 800/80 = %b", quotient); end
    for (int d = 0; d < 2048; d++) begin
      divisor = 8'd0; dividend = 11'(d); #1;
      checks++; if (quotient != 4'd0) begin failures++; $display("FAIL %0d/0 = %0d", d, quotient); end
      for (int v = 1; v < 256; v++) begin
        if (d < 16 * v) begin
          divisor = 8'(v); #1;
          checks++;
          if (int'(quotient) != d / v) begin
            failures++;
            if (failures < 20) $display("FAIL %0d / %0d = %0d", d, v, quotient);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
