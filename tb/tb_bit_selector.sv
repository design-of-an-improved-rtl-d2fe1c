// tb_bit_selector -- checks that the output equals A when Select A is high,
// B when Select B is high, and 0 with neither selected.
module tb_bit_selector;
  logic [7:0] a, b, y;
  logic sel_a, sel_b;
  int checks = 0, failures = 0;

  bit_selector dut (.a, .b, .sel_a, .sel_b, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      a = 8'($urandom); b = 8'($urandom);
      sel_a = 1'b1; sel_b = 1'b0; #1;
      checks++; if (y != a) begin failures++; $display("FAIL selA a=%h y=%h", a, y); end
      sel_a = 1'b0; sel_b = 1'b1; #1;
      checks++; if (y != b) begin failures++; $display("FAIL selB b=%h y=%h", b, y); end
      sel_a = 1'b0; sel_b = 1'b0; #1;
      checks++; if (y != 8'h00) begin failures++; $display("FAIL none y=%h", y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
