// tb_wordline_select -- checks the default (registered, 11-word, step 10)
// word-line decoder for every 8-bit input: exactly word k is high for input
// 10*k, no word is high otherwise, and the word lines change only after a
// falling clock edge.
module tb_wordline_select;
  logic clk = 1'b1, rst_n;
  logic [7:0]  crisp;
  logic [10:0] wl;
  logic [10:0] exp, prev;
  int checks = 0, failures = 0;

  wordline_select dut (.clk, .rst_n, .crisp, .wl);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; crisp = 8'd40;
    #16 rst_n = 1'b1;
    // after reset the register holds 0: word 0
    checks++; if (wl != 11'b1) begin failures++; $display("FAIL reset wl=%b", wl); end
    prev = 11'b1;
    for (int x = 0; x < 256; x++) begin
      @(posedge clk);
      crisp = 8'(x);
      #1;
      // before the falling edge the previous value is still decoded
      checks++;
      if (wl != prev) begin
        failures++; $display("FAIL wl changed before falling edge at x=%0d", x);
      end
      exp = '0;
      if (x % 10 == 0 && x <= 100) exp[x/10] = 1'b1;
      @(negedge clk); #1;
      checks++;
      if (wl != exp) begin
        failures++;
        $display("FAIL x=%0d wl=%b exp=%b", x, wl, exp);
      end
      prev = exp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
