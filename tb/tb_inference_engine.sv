// tb_inference_engine -- drives random LI and LO grades (0..10) into the
// MIN-MAX inference engine and compares the final membership output with a
// reference evaluation of the 27-rule table. Also checks that each rule,
// made the only one with a non-zero strength, reaches the output.
module tb_inference_engine;
  import fuzzy_ref_pkg::*;
  logic [7:0] li [3][3];
  logic [7:0] lo [5];
  logic [7:0] m;
  int checks = 0, failures = 0;

  inference_engine dut (.li, .lo, .m);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_m();
    int best, s, d, t, ms, w;
    best = 0;
    for (int r = 0; r < 27; r++) begin
      rule(r, d, t, ms, w);
      s = min2(min2(int'(li[0][d]), int'(li[1][t])), min2(int'(li[2][ms]), int'(lo[w])));
      best = max2(best, s);
    end
    return best;
  endfunction

  initial begin
    int d, t, ms, w;
    for (int n = 0; n < 5000; n++) begin
      foreach (li[v, a]) li[v][a] = 8'($urandom_range(0, 10));
      foreach (lo[k]) lo[k] = 8'($urandom_range(0, 10));
      #1;
      checks++;
      if (int'(m) != ref_m()) begin
        failures++; $display("FAIL random n=%0d m=%0d exp=%0d", n, m, ref_m());
      end
    end
    // one rule at a time: only its own adjectives are non-zero
    for (int r = 0; r < 27; r++) begin
      rule(r, d, t, ms, w);
      foreach (li[v, a]) li[v][a] = 8'd0;
      foreach (lo[k]) lo[k] = 8'd0;
      li[0][d] = 8'd9; li[1][t] = 8'd8; li[2][ms] = 8'd7; lo[w] = 8'd6;
      #1;
      checks++;
      if (m != 8'd6) begin failures++; $display("FAIL rule %0d alone gives %0d", r + 1, m); end
      lo[w] = 8'd10; #1;
      checks++;
      if (m != 8'd7) begin failures++; $display("FAIL rule %0d premise min gives %0d", r + 1, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
