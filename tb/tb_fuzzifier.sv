// tb_fuzzifier -- the default fuzzifier (Small, registered input) is driven
// with every 8-bit value; one falling edge later its grade must match the
// reference membership function. Includes the worked example 40 -> 2.
// A second, unregistered instance for the Medium wash-time adjective is
// driven with counter values 0..12.
module tb_fuzzifier;
  import fuzzy_ref_pkg::*;
  logic clk = 1'b1, rst_n;
  logic [7:0] crisp, cnt;
  logic [7:0] grade, lo_grade_out;
  int checks = 0, failures = 0;

  fuzzifier dut (.clk, .rst_n, .crisp, .grade);
  fuzzifier #(.ADJ(fuzzy_pkg::LO_MED), .REGISTERED(1'b0), .WORDS(13), .STEP(1)) u_lo (
    .clk, .rst_n, .crisp(cnt), .grade(lo_grade_out));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; crisp = 8'd0; cnt = 8'd0;
    #16 rst_n = 1'b1;
    @(posedge clk); crisp = 8'd40;
    @(negedge clk); #1;
    checks++; if (grade != 8'd2) begin failures++; $display("FAIL 40 -> %0d", grade); end
    for (int x = 0; x < 256; x++) begin
      @(posedge clk); crisp = 8'(x);
      @(negedge clk); #1;
      checks++;
      if (int'(grade) != li_grade(2, x)) begin
        failures++; $display("FAIL x=%0d grade=%0d exp=%0d", x, grade, li_grade(2, x));
      end
    end
    for (int i = 0; i < 13; i++) begin
      cnt = 8'(i); #1;
      checks++;
      if (int'(lo_grade_out) != lo_grade(2, i)) begin
        failures++; $display("FAIL LO medium i=%0d grade=%0d", i, lo_grade_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
