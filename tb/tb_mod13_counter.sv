// tb_mod13_counter -- checks that the counter resets to 0, advances by one on
// every falling clock edge only, runs 0..12 and wraps to 0 (never 13),
// over several full cycles.
module tb_mod13_counter;
  logic clk = 1'b1, rst_n;
  logic [3:0] count;
  int checks = 0, failures = 0, wraps = 0;
  int exp;

  mod13_counter dut (.clk, .rst_n, .count);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    #16 rst_n = 1'b1;
    checks++; if (count != 0) begin failures++; $display("FAIL reset count=%0d", count); end
    exp = 0;
    for (int n = 0; n < 60; n++) begin
      @(posedge clk); #1;
      checks++; if (int'(count) != exp) begin failures++; $display("FAIL rising edge changed count"); end
      @(negedge clk); #1;
      exp = (exp == 12) ? 0 : exp + 1;
      if (exp == 0) wraps++;
      checks++;
      if (int'(count) != exp) begin
        failures++;
        $display("FAIL step %0d: count=%0d exp=%0d", n, count, exp);
      end
    end
    checks++; if (wraps < 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
