// tb_aes_peripheral: drives an encrypting and a decrypting AES peripheral
// through their 32-bit word buffers. Encrypts the standard's example
// (FIPS-197 Appendix B) and checks the ciphertext, decrypts it back, and
// round-trips random blocks under random keys through both peripherals.
// Also checks that done drops on start and rises after the core's latency
// (10 clocks for encryption, 21 for decryption, plus the flag register).
module tb_aes_peripheral;
  import crypto_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic             rst;
  word_wr_t         e_wr, d_wr;
  logic             e_start, d_start, e_done, d_done, e_rd, d_rd;
  logic [BUS_W-1:0] e_data, d_data;
  aes_peripheral #(.DECRYPT(1'b0)) enc (.clk(clk), .rst(rst), .wr(e_wr), .start(e_start),
                                        .done(e_done), .rd_en(e_rd), .rd_data(e_data));
  aes_peripheral #(.DECRYPT(1'b1)) dec (.clk(clk), .rst(rst), .wr(d_wr), .start(d_start),
                                        .done(d_done), .rd_en(d_rd), .rd_data(d_data));

  initial begin
    #1_000_000;
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

  // Runs one block through the peripheral selected by decrypt.
  task automatic crypt(input bit decrypt, input logic [127:0] blk, input logic [127:0] key,
                       output logic [127:0] res);
    word_wr_t wr;
    int cyc;
    for (int s = 0; s < 2; s++)
      for (int w = 3; w >= 0; w--) begin
        wr = '{en: 1'b1, sel: 2'(s), data: (s == 0) ? blk[32*w +: 32] : key[32*w +: 32]};
        if (decrypt) d_wr = wr; else e_wr = wr;
        @(posedge clk); #1;
        d_wr.en = 1'b0; e_wr.en = 1'b0;
        @(posedge clk); #1;
      end
    if (decrypt) d_start = 1'b1; else e_start = 1'b1;
    @(posedge clk); #1;
    d_start = 1'b0; e_start = 1'b0;
    checks++;
    if ((decrypt ? d_done : e_done) !== 1'b0) begin
      failures++;
      $display("FAIL done not cleared by start");
    end
    cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!(decrypt ? d_done : e_done) && cyc < 100);
    checks++;
    if (cyc != (decrypt ? 21 : 10) + 1) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
    for (int w = 3; w >= 0; w--) begin
      if (decrypt) d_rd = 1'b1; else e_rd = 1'b1;
      @(posedge clk); #1;
      d_rd = 1'b0; e_rd = 1'b0;
      res[32*w +: 32] = decrypt ? d_data : e_data;
      @(posedge clk); #1;
    end
  endtask

  initial begin
    logic [127:0] ct, pt, blk, key;
    rst = 1'b1; e_wr = '0; d_wr = '0; e_start = 1'b0; d_start = 1'b0; e_rd = 1'b0; d_rd = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    crypt(1'b0, 128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, ct);
    check(ct, 128'h3925841d02dc09fbdc118597196a0b32, "example ciphertext");
    crypt(1'b1, ct, 128'h2b7e151628aed2a6abf7158809cf4f3c, pt);
    check(pt, 128'h3243f6a8885a308d313198a2e0370734, "example plaintext");
    for (int k = 0; k < 8; k++) begin
      blk = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      crypt(1'b0, blk, key, ct);
      crypt(1'b1, ct, key, pt);
      check(pt, blk, "round trip");
      checks++;
      if (ct == blk) begin
        failures++;
        $display("FAIL ciphertext equals plaintext");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
