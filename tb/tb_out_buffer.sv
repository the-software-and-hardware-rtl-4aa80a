// tb_out_buffer: loads random 128-bit values and reads each back as four
// 32-bit words, one per rising edge of en (most significant word first),
// holding en high for several clocks at times to check that only the rising
// edge advances; reads a fifth word to check the wrap to the first word.
module tb_out_buffer;
  import crypto_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic             rst, load, en;
  logic [127:0]     d;
  logic [BUS_W-1:0] data;
  out_buffer dut (.clk(clk), .rst(rst), .load(load), .d(d), .en(en), .data(data));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] v;
    rst = 1'b1; load = 1'b0; en = 1'b0; d = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < 20; k++) begin
      v = {$urandom, $urandom, $urandom, $urandom};
      d = v; load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0; d = '0;
      for (int r = 0; r < 5; r++) begin
        en = 1'b1;
        repeat (1 + (k % 3)) @(posedge clk);
        #1;
        en = 1'b0;
        checks++;
        if (data !== v[32*(3 - (r % 4)) +: 32]) begin
          failures++;
          $display("FAIL read %0d: %h", r, data);
        end
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
