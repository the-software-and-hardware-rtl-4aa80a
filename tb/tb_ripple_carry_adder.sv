// tb_ripple_carry_adder: checks the ripple-carry adder at 8 bits
// exhaustively over a and b with cin = 0 and 1, and at 256 bits on random
// and all-ones operands, against the simulator's own addition.
module tb_ripple_carry_adder;
  int checks = 0;
  int failures = 0;

  logic [7:0]   a8, b8;
  logic         cin8;
  logic [8:0]   s8;
  ripple_carry_adder #(.N(8)) dut8 (.a(a8), .b(b8), .cin(cin8), .sum(s8));

  logic [255:0] a256, b256;
  logic         cin256;
  logic [256:0] s256;
  ripple_carry_adder #(.N(256)) dut256 (.a(a256), .b(b256), .cin(cin256), .sum(s256));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          a8 = 8'(i); b8 = 8'(j); cin8 = 1'(c);
          #1;
          checks++;
          if (s8 !== 9'(i) + 9'(j) + 9'(c)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d + %0d + %0d = %0d", i, j, c, s8);
          end
        end
    for (int k = 0; k < 200; k++) begin
      for (int w = 0; w < 8; w++) begin
        a256[32*w +: 32] = $urandom;
        b256[32*w +: 32] = $urandom;
      end
      if (k == 0) begin a256 = '1; b256 = '0; end
      cin256 = (k % 2 == 0);
      #1;
      checks++;
      if (s256 !== 257'(a256) + 257'(b256) + 257'(cin256)) begin
        failures++;
        $display("FAIL 256-bit sum");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
