// tb_in_buffer: writes random 128-bit values as four 32-bit words, one per
// rising edge of en, and checks the assembled register (first word in the
// top 32 bits). Holds en high for several clocks to check that only the
// rising edge takes a word, and checks that rst clears the register.
module tb_in_buffer;
  import crypto_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic             rst, en;
  logic [BUS_W-1:0] data;
  logic [127:0]     q;
  in_buffer dut (.clk(clk), .rst(rst), .en(en), .data(data), .q(q));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] v;
    rst = 1'b1; en = 1'b0; data = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < 20; k++) begin
      v = {$urandom, $urandom, $urandom, $urandom};
      for (int w = 3; w >= 0; w--) begin
        data = v[32*w +: 32];
        en = 1'b1;
        repeat (1 + (k % 3)) @(posedge clk);
        #1;
        data = $urandom;
        en = 1'b0;
        @(posedge clk); #1;
      end
      checks++;
      if (q !== v) begin
        failures++;
        $display("FAIL assembled %h, expected %h", q, v);
      end
    end
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    checks++;
    if (q !== '0) begin
      failures++;
      $display("FAIL reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
