// tb_defuzzifier -- drives the defuzzifier with a testbench-side count and
// a membership table per sweep (renewed at count 11) and checks, at every
// valid strobe, wash_time = floor(sum(i*m_i) / sum(m_i)) for the sweep just
// finished (0 when every m_i is 0). Directed sweeps: all m_i = 10 for
// i = 1..12 (result 6), all zero (division by zero), a single peak at 12.
// The strobe must come every 13 clocks, during count 12, and not for the
// incomplete first sweep after reset.
module tb_defuzzifier;
  logic clk = 1'b1, rst_n;
  logic [3:0] m, count, wash_time;
  logic valid;
  int tbl [13];
  int checks = 0, failures = 0, results = 0, sweeps = 0;
  int exp, last_valid_cycle, cycle;
  bit have_exp;

  defuzzifier dut (.clk, .rst_n, .m, .count, .wash_time, .valid);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cog();
    int num = 0, den = 0;
    for (int i = 0; i < 13; i++) begin
      num += i * tbl[i];
      den += tbl[i];
    end
    return (den == 0) ? 0 : num / den;
  endfunction

  initial begin
    rst_n = 1'b0; count = 4'd0; have_exp = 1'b0;
    foreach (tbl[i]) tbl[i] = 5;
    m = 4'(tbl[0]);
    #16 rst_n = 1'b1;
    forever begin
      @(negedge clk); #1;
      count = (count == 4'd12) ? 4'd0 : count + 4'd1;
      if (count == 4'd11) begin
        exp = cog();
        sweeps++;
        have_exp = (sweeps >= 2);
        foreach (tbl[i]) tbl[i] = $urandom_range(0, 10);
        case (sweeps)
          2: foreach (tbl[i]) tbl[i] = (i == 0) ? 0 : 10;
          3: foreach (tbl[i]) tbl[i] = 0;
          4: foreach (tbl[i]) tbl[i] = (i == 12) ? 10 : 0;
          default: ;
        endcase
      end
      m = 4'(tbl[count]);
    end
  end

  initial begin
    cycle = 0;
    last_valid_cycle = -1;
    @(posedge rst_n);
    repeat (13 * 60) begin
      @(posedge clk); #1;
      cycle++;
      if (valid) begin
        checks++;
        if (count != 4'd12 || !have_exp) begin
          failures++; $display("FAIL strobe at count %0d (have_exp=%0d)", count, have_exp);
        end
        if (last_valid_cycle >= 0) begin
          checks++;
          if (cycle - last_valid_cycle != 13) begin
            failures++; $display("FAIL strobe spacing %0d", cycle - last_valid_cycle);
          end
        end
        last_valid_cycle = cycle;
        results++;
        checks++;
        if (int'(wash_time) != exp) begin
          failures++; $display("FAIL result %0d: wash_time %0d exp %0d", results, wash_time, exp);
        end
        if (results == 2 && exp != 6) begin failures++; $display("FAIL directed 6.5 case exp %0d", exp); end
      end else if (count == 4'd12 && have_exp) begin
        checks++; failures++; $display("FAIL missing strobe");
      end
    end
    checks++;
    if (results < 55) begin failures++; $display("FAIL only %0d results", results); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
