// tb_dh_peripheral: drives the Diffie-Hellman peripheral the way its
// processor does: operands written as 32-bit words into the three input
// buffers, start, wait for finish, result read back as four words. Runs the
// example 670^5 mod 53 = 8, then (after reset) a random 128-bit case checked
// against a reference square-and-multiply on the simulator's 256-bit
// arithmetic, then re-reads the result to check the output buffer wraps.
module tb_dh_peripheral;
  import crypto_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic             rst, start, reset, finish, rd_en;
  word_wr_t         wr;
  logic [BUS_W-1:0] rd_data;
  dh_peripheral dut (.clk(clk), .rst(rst), .wr(wr), .start(start), .reset(reset),
                     .finish(finish), .rd_en(rd_en), .rd_data(rd_data));

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] ref_pow(input logic [127:0] a, input logic [127:0] b,
                                           input logic [127:0] p);
    logic [255:0] r, base;
    r = 256'(1) % 256'(p);
    base = 256'(a) % 256'(p);
    for (int i = 0; i < 128; i++) begin
      if (b[i]) r = (r * base) % 256'(p);
      base = (base * base) % 256'(p);
    end
    return r[127:0];
  endfunction

  task automatic write128(input logic [1:0] sel, input logic [127:0] v);
    for (int w = 3; w >= 0; w--) begin
      wr = '{en: 1'b1, sel: sel, data: v[32*w +: 32]};
      @(posedge clk); #1;
      wr.en = 1'b0;
      @(posedge clk); #1;
    end
  endtask

  task automatic read128(output logic [127:0] v);
    for (int w = 3; w >= 0; w--) begin
      rd_en = 1'b1;
      @(posedge clk); #1;
      rd_en = 1'b0;
      v[32*w +: 32] = rd_data;
      @(posedge clk); #1;
    end
  endtask

  task automatic run(input logic [127:0] a, input logic [127:0] b, input logic [127:0] p);
    logic [127:0] got, exp;
    exp = ref_pow(a, b, p);
    reset = 1'b1;
    write128(2'd0, a);
    write128(2'd1, b);
    write128(2'd2, p);
    reset = 1'b0; start = 1'b1;
    do @(posedge clk); while (!finish);
    #1 start = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    read128(got);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %h ^ %h mod %h = %h, expected %h", a, b, p, got, exp);
    end
    read128(got);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL second read %h", got);
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; reset = 1'b0; rd_en = 1'b0; wr = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    run(128'd670, 128'd5, 128'd53);
    run({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom},
        {$urandom | 32'h8000_0000, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
