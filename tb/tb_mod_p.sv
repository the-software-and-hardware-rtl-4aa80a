// tb_mod_p: checks the modulo unit at its default width (256-bit X,
// 128-bit P) on small values from the exponentiation example (670*670 mod
// 53), on X < P, X = k*P, P = 1, P = 2^128-1 and on random full-width
// operands, each against the simulator's own % operator. The number of
// clocks to finish is checked against the bound 2*256 + 3.
module tb_mod_p;
  localparam int unsigned W = 128;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic           reset, start, finish;
  logic [2*W-1:0] X;
  logic [W-1:0]   P, Y;
  mod_p #(.W(W)) dut (.clk(clk), .reset(reset), .start(start), .X(X), .P(P), .Y(Y), .finish(finish));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [2*W-1:0] x, input logic [W-1:0] p);
    logic [2*W-1:0] exp;
    int cyc;
    exp = x % (2*W)'(p);
    reset = 1'b1; start = 1'b0;
    @(posedge clk);
    #1;
    reset = 1'b0; start = 1'b1; X = x; P = p;
    cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!finish && cyc < 2000);
    start = 1'b0;
    checks++;
    if (Y !== exp[W-1:0]) begin
      failures++;
      $display("FAIL %h mod %h = %h, expected %h", x, p, Y, exp[W-1:0]);
    end
    checks++;
    if (cyc > 2*2*W + 3) begin
      failures++;
      $display("FAIL took %0d clocks", cyc);
    end
  endtask

  initial begin
    logic [2*W-1:0] x;
    logic [W-1:0] p;
    reset = 1'b1; start = 1'b0; X = '0; P = '0;
    repeat (2) @(posedge clk);
    run(256'd448900, 128'd53);
    run(256'd34, 128'd53);
    run(256'd53 * 256'd1000, 128'd53);
    run('1, 128'd1);
    run('1, '1);
    run({128'h0, 128'h5}, 128'h7);
    for (int k = 0; k < 40; k++) begin
      for (int w = 0; w < 8; w++) x[32*w +: 32] = $urandom;
      for (int w = 0; w < 4; w++) p[32*w +: 32] = $urandom;
      if (k % 4 == 1) p = p >> (k % 120);
      if (k % 4 == 2) x = x >> (k % 200);
      if (p == '0) p = 128'd3;
      run(x, p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
