// tb_mult2: exhaustive check of the 2-bit by 2-bit multiplier against the
// sixteen products of 0..3 times 0..3.
module tb_mult2;
  int checks = 0;
  int failures = 0;
  logic [1:0] a, b;
  logic [3:0] p;
  mult2 dut (.a(a), .b(b), .p(p));

  initial begin
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d * %0d = %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
