// tb_aes_key_expand: walks the AES-128 key schedule of the standard's
// example key 2b7e1516 28aed2a6 abf71588 09cf4f3c forward through all ten
// rounds and back again, comparing round keys 1, 2 and 10 with the values
// published with the standard (FIPS-197 Appendix A.1) and checking that
// every backward step returns the previous forward key.
module tb_aes_key_expand;
  int checks = 0;
  int failures = 0;

  logic [127:0] rk, next_rk, prev_rk;
  logic [3:0]   round;
  aes_key_expand dut (.rk(rk), .round(round), .next_rk(next_rk), .prev_rk(prev_rk));

  logic [127:0] keys [11];

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h, expected %h", what, got, exp);
    end
  endtask

  initial begin
    keys[0] = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int i = 1; i <= 10; i++) begin
      rk = keys[i-1]; round = 4'(i);
      #1;
      keys[i] = next_rk;
    end
    check(keys[1], 128'ha0fafe1788542cb123a339392a6c7605, "round key 1");
    check(keys[2], 128'hf2c295f27a96b9435935807a7359f67f, "round key 2");
    check(keys[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "round key 10");
    for (int i = 10; i >= 1; i--) begin
      rk = keys[i]; round = 4'(i);
      #1;
      check(prev_rk, keys[i-1], $sformatf("backward step %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
