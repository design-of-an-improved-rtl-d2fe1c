// tb_membership_rom -- reads every word of the default ROM (Small, 11 words)
// and compares with the specified table 0->10, 10->8, 20->6, 30->4, 40->2,
// 50..100->0; checks that no active word line reads 0. Further instances
// check the Large, Medium and the five wash-time ROMs against the
// reference membership functions.
module tb_membership_rom;
  import fuzzy_ref_pkg::*;
  localparam int SMALL_TABLE [11] = '{10, 8, 6, 4, 2, 0, 0, 0, 0, 0, 0};
  logic [10:0] wl;
  logic [12:0] wlo;
  logic [7:0]  g_small, g_large, g_med;
  logic [7:0]  g_lo [5];
  int checks = 0, failures = 0;

  membership_rom dut (.wl, .grade(g_small));
  membership_rom #(.ADJ(fuzzy_pkg::LI_LARGE),  .WORDS(11)) u_large (.wl, .grade(g_large));
  membership_rom #(.ADJ(fuzzy_pkg::LI_MEDIUM), .WORDS(11)) u_med   (.wl, .grade(g_med));
  for (genvar k = 0; k < 5; k++) begin : g_lo_rom
    membership_rom #(.ADJ(fuzzy_pkg::adj_e'(3 + k)), .WORDS(13)) u (.wl(wlo), .grade(g_lo[k]));
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wl = '0; wlo = '0; #1;
    expect_eq(g_small, 0, "no word line");
    expect_eq(g_lo[2], 0, "no LO word line");
    for (int k = 0; k < 11; k++) begin
      wl = 11'(1) << k; #1;
      expect_eq(g_small, SMALL_TABLE[k], $sformatf("small word %0d", k));
      expect_eq(g_large, li_grade(0, 10 * k), $sformatf("large word %0d", k));
      expect_eq(g_med,   li_grade(1, 10 * k), $sformatf("medium word %0d", k));
    end
    for (int i = 0; i < 13; i++) begin
      wlo = 13'(1) << i; #1;
      for (int k = 0; k < 5; k++)
        expect_eq(g_lo[k], lo_grade(k, i), $sformatf("LO %0d word %0d", k, i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
