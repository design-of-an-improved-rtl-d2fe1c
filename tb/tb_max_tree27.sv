// tb_max_tree27 -- checks the 27-input MAX tree: the unique maximum placed
// at every input position in turn (so every branch, including the
// zero-padded ones, is exercised), all-zero input, and random vectors.
module tb_max_tree27;
  logic [7:0] in [27];
  logic [7:0] y;
  int checks = 0, failures = 0;

  max_tree27 dut (.in, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_max();
    int e;
    #1;
    e = 0;
    for (int i = 0; i < 27; i++) if (int'(in[i]) > e) e = int'(in[i]);
    checks++;
    if (int'(y) != e) begin
      failures++;
      $display("FAIL y=%0d exp=%0d", y, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 27; i++) in[i] = '0;
    check_max();
    for (int p = 0; p < 27; p++) begin
      for (int i = 0; i < 27; i++) in[i] = 8'($urandom_range(0, 9));
      in[p] = 8'd10;
      check_max();
      checks++;
      if (y != 8'd10) begin failures++; $display("FAIL max at %0d lost", p); end
    end
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 27; i++) in[i] = 8'($urandom);
      check_max();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
