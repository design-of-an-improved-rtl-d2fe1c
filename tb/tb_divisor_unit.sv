// tb_divisor_unit -- drives the divisor accumulator with a testbench-side count
// 0..12 changing after each falling edge and a membership value that is a
// random table of the count, renewed at the start of every sweep (count
// 11). At the rising edge during count 12 the output register must hold
// sum(m_i) over the sweep that just ended; it must stay unchanged at other
// rising edges. One result per 13 clocks.
module tb_divisor_unit;
  logic clk = 1'b1, rst_n;
  logic [3:0] m, count;
  logic [8-1:0] divisor;
  int tbl [13];
  int checks = 0, failures = 0, results = 0;
  int exp;
  bit have_exp;
  int sweeps = 0;
  logic [8-1:0] held;

  divisor_unit dut (.clk, .rst_n, .m, .count, .divisor);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sum_tbl();
    int s = 0;
    for (int i = 0; i < 13; i++) s += tbl[i];
    return s;
  endfunction

  // driver: count and m change just after every falling edge
  initial begin
    rst_n = 1'b0; count = 4'd0; have_exp = 1'b0;
    foreach (tbl[i]) tbl[i] = 10;
    m = 4'(tbl[0]);
    #16 rst_n = 1'b1;
    forever begin
      @(negedge clk); #1;
      count = (count == 4'd12) ? 4'd0 : count + 4'd1;
      if (count == 4'd11) begin
        exp = sum_tbl();
        sweeps++;
        have_exp = (sweeps >= 2);
        foreach (tbl[i]) tbl[i] = $urandom_range(0, 10);
        if (results == 3) foreach (tbl[i]) tbl[i] = 0;
        if (results == 4) foreach (tbl[i]) tbl[i] = 10;
      end
      m = 4'(tbl[count]);
    end
  end

  // checker
  initial begin
    @(posedge rst_n);
    repeat (13 * 40) begin
      @(posedge clk); #1;
      if (count == 4'd12) begin
        if (have_exp) begin
          checks++;
          results++;
          if (int'(divisor) != exp) begin
            failures++; $display("FAIL result %0d: got %0d exp %0d", results, divisor, exp);
          end
        end
        held = divisor;
      end else if (have_exp) begin
        checks++;
        if (divisor != held) begin failures++; $display("FAIL output changed outside count 12"); end
      end
    end
    checks++;
    if (results < 35) begin failures++; $display("FAIL only %0d results", results); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
