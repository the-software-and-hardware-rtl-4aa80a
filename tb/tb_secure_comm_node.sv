// tb_secure_comm_node: end-to-end session between two nodes, A and B, at
// the default sizes. The test plays the two processors and the serial link
// between them (a word read from one node is written into the other).
//   1. Both nodes compute their public values RA = alpha^a mod p and
//      RB = alpha^b mod p with p = 2^127 - 1 and random secrets a, b.
//   2. The public values are exchanged and each node computes the shared
//      key K = RB^a mod p (A) and RA^b mod p (B).
//   3. A encrypts message blocks with K, the ciphertext is passed to B and B
//      decrypts it with its own copy of K.
// Checked against independent references: RA, RB and K against a
// square-and-multiply on the simulator's 256-bit arithmetic, KA == KB, the
// standard's AES example (FIPS-197 Appendix B) on A's encryptor, and every
// decrypted block against the message.
// The mechanisms of the design are counted and each must occur: squaring
// steps, multiply steps (exponent bit 1) and skipped multiplies (bit 0),
// modulo subtractions taken and skipped, Karatsuba carry corrections at the
// top level, sub-multiplier waits, buffered word writes and reads, AES
// encryptions and decryptions.
module tb_secure_comm_node;
  import crypto_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  localparam logic [127:0] P_MOD = {1'b0, {127{1'b1}}};
  localparam logic [127:0] ALPHA = 128'd3;

  // Processor-side signals of the two nodes, index 0 = A, 1 = B.
  logic             rst;
  word_wr_t         dh_wr [2], enc_wr [2], dec_wr [2];
  logic             dh_start [2], dh_reset [2], dh_finish [2], dh_rd_en [2];
  logic             enc_start [2], enc_done [2], enc_rd_en [2];
  logic             dec_start [2], dec_done [2], dec_rd_en [2];
  logic [BUS_W-1:0] dh_rd_data [2], enc_rd_data [2], dec_rd_data [2];

  for (genvar n = 0; n < 2; n++) begin : g_node
    secure_comm_node u_node (
      .clk(clk), .rst(rst),
      .dh_wr(dh_wr[n]), .dh_start(dh_start[n]), .dh_reset(dh_reset[n]),
      .dh_finish(dh_finish[n]), .dh_rd_en(dh_rd_en[n]), .dh_rd_data(dh_rd_data[n]),
      .enc_wr(enc_wr[n]), .enc_start(enc_start[n]), .enc_done(enc_done[n]),
      .enc_rd_en(enc_rd_en[n]), .enc_rd_data(enc_rd_data[n]),
      .dec_wr(dec_wr[n]), .dec_start(dec_start[n]), .dec_done(dec_done[n]),
      .dec_rd_en(dec_rd_en[n]), .dec_rd_data(dec_rd_data[n])
    );
  end

  // ---- mechanism counters (node A's internals) ----
  int n_square = 0, n_mult = 0, n_skip = 0, n_sub = 0, n_nosub = 0;
  int n_carry = 0, n_subwait = 0, n_wr = 0, n_rd = 0, n_enc = 0, n_dec = 0;

  always @(posedge clk) begin
    if (!rst) begin
      // Square-and-multiply state machine.
      if (g_node[0].u_node.u_dh.u_exp.state == 3'd2 && g_node[0].u_node.u_dh.u_exp.mod_finish) begin
        n_square++;
        if (g_node[0].u_node.u_dh.u_exp.expo[g_node[0].u_node.u_dh.u_exp.bit_idx]) n_mult++;
        else n_skip++;
      end
      // Modulo unit: subtraction steps taken or skipped.
      if (g_node[0].u_node.u_dh.u_exp.u_mod.state == 2'd2) begin
        if (g_node[0].u_node.u_dh.u_exp.u_mod.no_borrow) n_sub++;
        else n_nosub++;
      end
      // 128-bit Karatsuba level: a half sum carried out of 64 bits.
      if (g_node[0].u_node.u_dh.u_exp.u_mul.state == 4'd6 &&
          (g_node[0].u_node.u_dh.u_exp.u_mul.sx[64] || g_node[0].u_node.u_dh.u_exp.u_mul.sy[64]))
        n_carry++;
      // Waiting on the 64-bit sub-multiplier.
      if (g_node[0].u_node.u_dh.u_exp.u_mul.waiting && !g_node[0].u_node.u_dh.u_exp.u_mul.sub_done)
        n_subwait++;
      if (g_node[0].u_node.u_enc.ready) n_enc++;
      if (g_node[1].u_node.u_dec.ready) n_dec++;
    end
  end

  initial begin
    #400_000_000;
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

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h, expected %h", what, got, exp);
    end
  endtask

  // ---- processor access to one node's peripherals (0 = DH, 1 = enc, 2 = dec) ----
  task automatic write128(input int n, input int per, input logic [1:0] sel, input logic [127:0] v);
    word_wr_t wr;
    for (int w = 3; w >= 0; w--) begin
      wr = '{en: 1'b1, sel: sel, data: v[32*w +: 32]};
      case (per)
        0: dh_wr[n] = wr;
        1: enc_wr[n] = wr;
        default: dec_wr[n] = wr;
      endcase
      @(posedge clk); #1;
      dh_wr[n].en = 1'b0; enc_wr[n].en = 1'b0; dec_wr[n].en = 1'b0;
      @(posedge clk); #1;
      n_wr++;
    end
  endtask

  task automatic read128(input int n, input int per, output logic [127:0] v);
    for (int w = 3; w >= 0; w--) begin
      case (per)
        0: dh_rd_en[n] = 1'b1;
        1: enc_rd_en[n] = 1'b1;
        default: dec_rd_en[n] = 1'b1;
      endcase
      @(posedge clk); #1;
      dh_rd_en[n] = 1'b0; enc_rd_en[n] = 1'b0; dec_rd_en[n] = 1'b0;
      case (per)
        0: v[32*w +: 32] = dh_rd_data[n];
        1: v[32*w +: 32] = enc_rd_data[n];
        default: v[32*w +: 32] = dec_rd_data[n];
      endcase
      @(posedge clk); #1;
      n_rd++;
    end
  endtask

  // Starts an exponentiation on node n; operands already written.
  task automatic dh_go(input int n);
    dh_reset[n] = 1'b1;
    @(posedge clk); #1;
    dh_reset[n] = 1'b0;
    dh_start[n] = 1'b1;
  endtask

  task automatic dh_wait(input int n, output logic [127:0] v);
    while (!dh_finish[n]) begin @(posedge clk); #1; end
    dh_start[n] = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    read128(n, 0, v);
  endtask

  task automatic aes(input int n, input bit decrypt, input logic [127:0] blk,
                     input logic [127:0] key, output logic [127:0] res);
    write128(n, decrypt ? 2 : 1, 2'd0, blk);
    write128(n, decrypt ? 2 : 1, 2'd1, key);
    if (decrypt) dec_start[n] = 1'b1; else enc_start[n] = 1'b1;
    @(posedge clk); #1;
    dec_start[n] = 1'b0; enc_start[n] = 1'b0;
    while (!(decrypt ? dec_done[n] : enc_done[n])) begin @(posedge clk); #1; end
    read128(n, decrypt ? 2 : 1, res);
  endtask

  initial begin
    logic [127:0] sa, sb, ra, rb, ka, kb, kref, ct, pt, msg;
    time t0;
    rst = 1'b1;
    for (int n = 0; n < 2; n++) begin
      dh_wr[n] = '0; enc_wr[n] = '0; dec_wr[n] = '0;
      dh_start[n] = 1'b0; dh_reset[n] = 1'b0; dh_rd_en[n] = 1'b0;
      enc_start[n] = 1'b0; enc_rd_en[n] = 1'b0; dec_start[n] = 1'b0; dec_rd_en[n] = 1'b0;
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    sa = {$urandom, $urandom, $urandom, $urandom} % P_MOD;
    sb = {$urandom, $urandom, $urandom, $urandom} % P_MOD;

    // 1. Public values, both nodes in parallel.
    t0 = $time;
    fork
      begin write128(0, 0, 2'd0, ALPHA); write128(0, 0, 2'd1, sa); write128(0, 0, 2'd2, P_MOD); end
      begin write128(1, 0, 2'd0, ALPHA); write128(1, 0, 2'd1, sb); write128(1, 0, 2'd2, P_MOD); end
    join
    dh_go(0); dh_go(1);
    fork
      dh_wait(0, ra);
      dh_wait(1, rb);
    join
    $display("public values in %0d clocks", ($time - t0) / 10);
    check(ra, ref_pow(ALPHA, sa, P_MOD), "RA");
    check(rb, ref_pow(ALPHA, sb, P_MOD), "RB");

    // 2. Exchange over the link and compute the shared key.
    fork
      write128(0, 0, 2'd0, rb);
      write128(1, 0, 2'd0, ra);
    join
    dh_go(0); dh_go(1);
    fork
      dh_wait(0, ka);
      dh_wait(1, kb);
    join
    kref = ref_pow(ALPHA, 128'(((256'(sa) * 256'(sb)) % 256'(P_MOD - 1))), P_MOD);
    check(ka, kb, "shared key A vs B");
    check(ka, ref_pow(rb, sa, P_MOD), "shared key A");
    check(kb, kref, "shared key vs alpha^(ab)");

    // 3. Standard example, then messages A -> B under the shared key.
    aes(0, 1'b0, 128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, ct);
    check(ct, 128'h3925841d02dc09fbdc118597196a0b32, "example ciphertext");
    for (int m = 0; m < 4; m++) begin
      msg = {$urandom, $urandom, $urandom, $urandom};
      aes(0, 1'b0, msg, ka, ct);
      aes(1, 1'b1, ct, kb, pt);
      check(pt, msg, "message received by B");
    end

    $display("mechanisms: square=%0d multiply=%0d skipped_multiply=%0d mod_sub=%0d mod_nosub=%0d",
             n_square, n_mult, n_skip, n_sub, n_nosub);
    $display("            karatsuba_carry=%0d subwait=%0d word_writes=%0d word_reads=%0d enc=%0d dec=%0d",
             n_carry, n_subwait, n_wr, n_rd, n_enc, n_dec);
    checks++; if (n_square == 0) begin failures++; $display("FAIL no squaring"); end
    checks++; if (n_mult == 0) begin failures++; $display("FAIL no multiply step"); end
    checks++; if (n_skip == 0) begin failures++; $display("FAIL no skipped multiply"); end
    checks++; if (n_sub == 0) begin failures++; $display("FAIL no modulo subtraction"); end
    checks++; if (n_nosub == 0) begin failures++; $display("FAIL no skipped subtraction"); end
    checks++; if (n_carry == 0) begin failures++; $display("FAIL no Karatsuba carry correction"); end
    checks++; if (n_subwait == 0) begin failures++; $display("FAIL no sub-multiplier wait"); end
    checks++; if (n_wr == 0 || n_rd == 0) begin failures++; $display("FAIL no buffer traffic"); end
    checks++; if (n_enc == 0 || n_dec == 0) begin failures++; $display("FAIL no AES operation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
