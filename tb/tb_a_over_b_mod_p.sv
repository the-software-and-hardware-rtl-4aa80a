// tb_a_over_b_mod_p: checks the modular exponentiation unit at its default
// 128-bit width: the example A = 670, B = 5, P = 53 (670^5 mod 53 = 8),
// B = 0, B = 1, a Fermat check (A^(P-1) mod P = 1 for a prime P), and random
// 128-bit operands, each compared with a reference square-and-multiply
// computed here with the simulator's 256-bit * and % operators. The number
// of clocks to finish is checked against the exact count expected from the
// sub-unit latencies: every bit costs a square, a reduction and the state
// transitions, and a 1 bit adds a multiply and a reduction.
module tb_a_over_b_mod_p;
  localparam int unsigned W = 128;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic         reset, start, finish;
  logic [W-1:0] A, B, P, C;
  a_over_b_mod_p #(.W(W)) dut (.clk(clk), .reset(reset), .start(start),
                               .A(A), .B(B), .P(P), .C(C), .finish(finish));

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] ref_pow(input logic [W-1:0] a, input logic [W-1:0] b,
                                           input logic [W-1:0] p);
    logic [2*W-1:0] r, base;
    r = (2*W)'(1) % (2*W)'(p);
    base = (2*W)'(a) % (2*W)'(p);
    for (int i = 0; i < int'(W); i++) begin
      if (b[i]) r = (r * base) % (2*W)'(p);
      base = (base * base) % (2*W)'(p);
    end
    return r[W-1:0];
  endfunction

  task automatic run(input logic [W-1:0] a, input logic [W-1:0] b, input logic [W-1:0] p);
    logic [W-1:0] exp;
    int cyc;
    exp = ref_pow(a, b, p);
    reset = 1'b1; start = 1'b0;
    @(posedge clk);
    #1;
    reset = 1'b0; start = 1'b1; A = a; B = b; P = p;
    cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!finish && cyc < 3_000_000);
    checks++;
    if (C !== exp) begin
      failures++;
      $display("FAIL %h ^ %h mod %h = %h, expected %h", a, b, p, C, exp);
    end
    // Each squaring or multiplication: 4368 clocks in the multiplier plus
    // 1 hand-over clock; each reduction at most 2*256+3 clocks.
    checks++;
    if (cyc > 2 + (W + $countones(b)) * (4369 + 2*2*W + 4)) begin
      failures++;
      $display("FAIL took %0d clocks", cyc);
    end
    $display("%h ^ %h mod %h = %h in %0d clocks", a, b, p, C, cyc);
  endtask

  initial begin
    reset = 1'b1; start = 1'b0; A = '0; B = '0; P = '0;
    repeat (2) @(posedge clk);
    run(128'd670, 128'd5, 128'd53);
    run(128'd670, 128'd0, 128'd53);
    run(128'd12345, 128'd1, 128'd1000003);
    // 2^127 - 1 is prime.
    run(128'd3, {1'b0, {126{1'b1}}, 1'b0}, {1'b0, {127{1'b1}}});
    run({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom},
        {$urandom | 32'h8000_0000, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
