// tb_min4 -- compares the four-input minimum with a reference on random
// grades, with the minimum placed at each input in turn.
module tb_min4;
  logic [7:0] in0, in1, in2, in3, y;
  int checks = 0, failures = 0;

  min4 dut (.in0, .in1, .in2, .in3, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int n = 0; n < 4000; n++) begin
      in0 = 8'($urandom); in1 = 8'($urandom); in2 = 8'($urandom); in3 = 8'($urandom);
      if (n % 5 == 1) in0 = 8'($urandom_range(0, 3));
      if (n % 5 == 2) in1 = 8'($urandom_range(0, 3));
      if (n % 5 == 3) in2 = 8'($urandom_range(0, 3));
      if (n % 5 == 4) in3 = 8'($urandom_range(0, 3));
      #1;
      e = int'(in0);
      if (int'(in1) < e) e = int'(in1);
      if (int'(in2) < e) e = int'(in2);
      if (int'(in3) < e) e = int'(in3);
      checks++;
      if (int'(y) != e) begin
        failures++;
        $display("FAIL %0d %0d %0d %0d -> %0d exp %0d", in0, in1, in2, in3, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
