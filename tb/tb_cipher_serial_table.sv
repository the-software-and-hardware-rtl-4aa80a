// tb_cipher_serial_table: encrypts the two worked examples published with
// the AES standard (FIPS-197 Appendices B and C.1) and compares the
// ciphertexts; checks that ready is a single-clock pulse arriving at the
// tenth clock edge after the one that samples start, and that ciphertext
// holds its value afterwards.
module tb_cipher_serial_table;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic         rst, start, ready;
  logic [127:0] plaintext, key, ciphertext;
  cipher_serial_table dut (.clk(clk), .rst(rst), .start(start), .plaintext(plaintext),
                           .key(key), .ciphertext(ciphertext), .ready(ready));

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic enc(input logic [127:0] pt, input logic [127:0] k, input logic [127:0] exp);
    int cyc;
    plaintext = pt; key = k; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!ready && cyc < 50);
    checks++;
    if (ciphertext !== exp) begin
      failures++;
      $display("FAIL ciphertext %h, expected %h", ciphertext, exp);
    end
    checks++;
    if (cyc != 10) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
    @(posedge clk); #1;
    checks++;
    if (ready !== 1'b0 || ciphertext !== exp) begin
      failures++;
      $display("FAIL ready not a pulse or output not held");
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; plaintext = '0; key = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    enc(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
        128'h3925841d02dc09fbdc118597196a0b32);
    enc(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
