// tb_fuzzy_wash_controller -- end-to-end test of the controller at its
// default parameters.
//
// Every combination of the three crisp inputs on the 0,10,...,100 grid
// (1331 loads) is applied, plus inputs off the grid. After each change the
// testbench waits for the second valid strobe (the first one may mix old
// and new inputs) and compares wash_time with an independent reference:
// membership functions, 27 MIN-MAX rules and centre of gravity over counts
// 0..12. It also checks the strobe period (13 clocks) and that a reset in
// the middle of a sweep recovers. Mechanism counters, each of which must be
// non-zero: valid strobes, counter wraps 12 -> 0, results with no rule
// firing (zero divisor), loads in which each of the 27 rules fires, and
// every wash-time value that the reference can produce.
module tb_fuzzy_wash_controller;
  import fuzzy_ref_pkg::*;
  logic clk = 1'b1, rst_n;
  logic [7:0] dirt, grease, mass;
  logic [3:0] wash_time, count;
  logic wash_time_valid;
  int checks = 0, failures = 0;
  int n_strobes = 0, n_wraps = 0, n_zero_div = 0, n_resets = 0;
  int rule_fired [27];
  int value_seen_ref [16];
  int value_seen_dut [16];
  int cycle = 0, last_strobe = -1;
  logic [3:0] prev_count;

  fuzzy_wash_controller dut (
    .clk, .rst_n, .dirt, .grease, .mass, .wash_time, .wash_time_valid, .count
  );

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // strobe and wrap monitor
  always @(posedge clk) begin
    cycle++;
    if (rst_n && wash_time_valid) begin
      n_strobes++;
      if (last_strobe >= 0 && cycle - last_strobe != 13) begin
        failures++; $display("FAIL strobe spacing %0d", cycle - last_strobe);
      end
      last_strobe = cycle;
    end
  end
  always @(negedge clk) begin
    #1;
    if (rst_n && prev_count == 4'd12 && count == 4'd0) n_wraps++;
    prev_count = count;
  end

  task automatic wait_strobe();
    @(posedge clk iff wash_time_valid);
    #1;
  endtask

  task automatic run_case(input int xd, input int xt, input int xm);
    int e, f;
    dirt = 8'(xd); grease = 8'(xt); mass = 8'(xm);
    wait_strobe();
    wait_strobe();
    e = ref_wash_time(xd, xt, xm);
    checks++;
    if (int'(wash_time) != e) begin
      failures++;
      $display("FAIL dirt=%0d grease=%0d mass=%0d wash_time=%0d exp=%0d", xd, xt, xm, wash_time, e);
    end
    value_seen_ref[e]++;
    value_seen_dut[wash_time]++;
    f = 0;
    for (int r = 0; r < 27; r++) begin
      int s = 0;
      for (int i = 0; i <= 12; i++) s = max2(s, rule_strength(r, xd, xt, xm, i));
      if (s > 0) begin rule_fired[r]++; f++; end
    end
    if (f == 0) n_zero_div++;
  endtask

  initial begin
    foreach (rule_fired[r]) rule_fired[r] = 0;
    foreach (value_seen_ref[v]) begin value_seen_ref[v] = 0; value_seen_dut[v] = 0; end
    prev_count = '0;
    rst_n = 1'b0; dirt = '0; grease = '0; mass = '0;
    #16 rst_n = 1'b1;
    // no strobe for the first, incomplete sweep: the first one comes at the
    // second count of 12, 13 + 12 clocks after reset
    repeat (20) @(posedge clk);
    checks++;
    if (n_strobes != 0) begin failures++; $display("FAIL strobe before a full sweep"); end

    for (int d = 0; d <= 100; d += 10)
      for (int t = 0; t <= 100; t += 10)
        for (int ms = 0; ms <= 100; ms += 10)
          run_case(d, t, ms);

    // inputs off the 10-step grid decode to no word line: nothing fires
    run_case(45, 50, 50);
    run_case(50, 51, 50);
    run_case(255, 255, 255);
    for (int n = 0; n < 40; n++)
      run_case(10 * $urandom_range(0, 10), $urandom_range(0, 110), 10 * $urandom_range(0, 10));

    // reset in the middle of a sweep, then the same load again
    @(negedge clk); #3;
    rst_n = 1'b0;
    n_resets++;
    #20 rst_n = 1'b1;
    last_strobe = -1;
    checks++;
    if (wash_time != 4'd0) begin failures++; $display("FAIL reset did not clear output"); end
    run_case(90, 80, 70);
    run_case(20, 30, 40);

    // mechanism coverage
    checks++;
    if (n_strobes == 0) begin failures++; $display("FAIL no valid strobes"); end
    checks++;
    if (n_wraps == 0) begin failures++; $display("FAIL counter never wrapped"); end
    checks++;
    if (n_zero_div == 0) begin failures++; $display("FAIL zero divisor never exercised"); end
    checks++;
    if (n_resets == 0) begin failures++; $display("FAIL reset recovery never exercised"); end
    foreach (rule_fired[r]) begin
      checks++;
      if (rule_fired[r] == 0) begin failures++; $display("FAIL rule %0d never fired", r + 1); end
    end
    foreach (value_seen_ref[v]) begin
      if (value_seen_ref[v] != 0) begin
        checks++;
        if (value_seen_dut[v] == 0) begin failures++; $display("FAIL wash time %0d never produced", v); end
      end
    end
    $display("strobes=%0d wraps=%0d zero_divisor=%0d resets=%0d", n_strobes, n_wraps, n_zero_div, n_resets);
    for (int v = 0; v < 16; v++)
      if (value_seen_dut[v] != 0) $display("wash_time %0d: %0d loads", v, value_seen_dut[v]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
