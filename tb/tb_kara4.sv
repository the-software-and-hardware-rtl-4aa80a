// tb_kara4: exhaustive check of the sequential 4-bit Karatsuba multiplier:
// all 256 operand pairs, each product compared with i*j, and the latency
// (12 clock edges from the one that samples start to the one that sets
// done) checked every time. Also checks that reset clears done and c.
module tb_kara4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic       reset, start, done;
  logic [3:0] a, b;
  logic [7:0] c;
  kara4 dut (.clk(clk), .reset(reset), .start(start), .a(a), .b(b), .c(c), .done(done));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    reset = 1'b1; start = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        reset = 1'b1;
        @(posedge clk);
        #1;
        checks++;
        if (done !== 1'b0 || c !== 8'h00) begin
          failures++;
          $display("FAIL reset did not clear outputs");
        end
        reset = 1'b0; start = 1'b1; a = 4'(i); b = 4'(j);
        cyc = 0;
        do begin @(posedge clk); cyc++; #1; end while (!done && cyc < 100);
        start = 1'b0;
        checks++;
        if (int'(c) != i * j) begin
          failures++;
          $display("FAIL %0d * %0d = %0d", i, j, c);
        end
        checks++;
        if (cyc != 12) begin
          failures++;
          $display("FAIL latency %0d", cyc);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
