// tb_karatsuba_mult: self-checking test of the sequential Karatsuba
// multiplier at its default width (128 bits) and at 8 bits (the level built
// directly on kara4). Operands are random plus corner values (0, 1, all
// ones, and values whose half sums carry, which exercises the correction
// states); each product is compared with the simulator's own wide
// multiplication. The latency of every 128-bit product is checked against
// the recursion T(N) = 3*T(N/2) + 12 with T(4) = 12 (4368 at 128 bits), the
// number of clock edges from the one that samples start until done is high.
module tb_karatsuba_mult;
  localparam int unsigned N = 128;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic           reset, start;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] c;
  logic           done;
  karatsuba_mult #(.N(N)) dut (.clk(clk), .reset(reset), .start(start), .a(a), .b(b), .c(c), .done(done));

  logic         reset8, start8;
  logic [7:0]   a8, b8;
  logic [15:0]  c8;
  logic         done8;
  karatsuba_mult #(.N(8)) dut8 (.clk(clk), .reset(reset8), .start(start8), .a(a8), .b(b8), .c(c8), .done(done8));

  function automatic int lat(int n);
    if (n == 4) return 12;
    return 3 * lat(n / 2) + 12;
  endfunction

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mul128(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] exp;
    int cyc;
    exp = (2*N)'(x) * (2*N)'(y);
    reset = 1'b1; start = 1'b0;
    @(posedge clk);
    #1;
    reset = 1'b0; a = x; b = y; start = 1'b1;
    cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!done);
    start = 1'b0;
    checks++;
    if (c !== exp) begin
      failures++;
      $display("FAIL 128: %h * %h = %h, expected %h", x, y, c, exp);
    end
    checks++;
    if (cyc != lat(N)) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, lat(N));
    end
  endtask

  task automatic mul8(input logic [7:0] x, input logic [7:0] y);
    reset8 = 1'b1; start8 = 1'b0;
    @(posedge clk);
    #1;
    reset8 = 1'b0; a8 = x; b8 = y; start8 = 1'b1;
    do begin @(posedge clk); #1; end while (!done8);
    start8 = 1'b0;
    checks++;
    if (c8 !== 16'(x) * 16'(y)) begin
      failures++;
      $display("FAIL 8: %0d * %0d = %0d", x, y, c8);
    end
  endtask

  initial begin
    logic [N-1:0] x, y;
    reset = 1'b1; start = 1'b0; a = '0; b = '0;
    reset8 = 1'b1; start8 = 1'b0; a8 = '0; b8 = '0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 256; i += 5)
      for (int j = 0; j < 256; j += 7) mul8(8'(i), 8'(j));
    mul8(8'hff, 8'hff);
    mul128('0, '0);
    mul128('1, '1);
    mul128(128'd1, '1);
    mul128(128'd670, 128'd670);
    mul128({64'hffff_ffff_ffff_ffff, 64'h1}, {64'h8000_0000_0000_0001, 64'hffff_ffff_ffff_ffff});
    for (int k = 0; k < 10; k++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      y = {$urandom, $urandom, $urandom, $urandom};
      mul128(x, y);
    end
    $display("128-bit product latency: %0d clocks", lat(N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
