// cipher_serial_table: iterative AES-128 encryption, one round per clock,
// S-box by table lookup, round keys generated on the fly.
//
// On start the block is whitened with the cipher key (initial AddRoundKey).
// Each of the next ten clocks applies SubBytes (16 S-box lookups),
// ShiftRows (row r rotated left by r bytes), MixColumns (each column times
// {03}x^3+{01}x^2+{01}x+{02} over GF(2^8)) and AddRoundKey with the next
// round key, computed in the same clock by aes_key_expand. The tenth round
// leaves out MixColumns. The ciphertext is then registered and ready pulses
// high for one clock; ciphertext keeps its value until the next result.
// Latency: ready rises at the tenth clock edge after the one that samples
// start.
//
// Interface: clk, rst (synchronous), start (sampled while idle), plaintext,
// key (128 bits each, first byte in bits [127:96+24]); ciphertext, ready.
// The round structure and the module's pins follow the design description;
// the cipher key is a port here so that the key agreed by Diffie-Hellman can
// be used, and the one-round-per-clock schedule is this design's own.
module cipher_serial_table
  import crypto_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [127:0] plaintext,
  input  logic [127:0] key,
  output logic [127:0] ciphertext,
  output logic         ready
);

  logic         busy;
  logic [3:0]   round;
  logic [127:0] state, rk;
  logic [127:0] next_rk, unused_prev;
  logic [127:0] round_out;

  aes_key_expand u_ks (.rk(rk), .round(round), .next_rk(next_rk), .prev_rk(unused_prev));

  always_comb begin
    logic [7:0] s [4][4];
    logic [7:0] t [4][4];
    // SubBytes and ShiftRows: t[r][c] = S(s[r][(c+r) mod 4]).
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        s[r][c] = SBOX[st_byte(state, r, c)];
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        t[r][c] = s[r][(c + r) % 4];
    // MixColumns (skipped in round 10) and AddRoundKey.
    for (int c = 0; c < 4; c++) begin
      logic [7:0] m [4];
      if (round == 4'd10) begin
        for (int r = 0; r < 4; r++) m[r] = t[r][c];
      end else begin
        m[0] = gmul(t[0][c], 4'h2) ^ gmul(t[1][c], 4'h3) ^ t[2][c] ^ t[3][c];
        m[1] = t[0][c] ^ gmul(t[1][c], 4'h2) ^ gmul(t[2][c], 4'h3) ^ t[3][c];
        m[2] = t[0][c] ^ t[1][c] ^ gmul(t[2][c], 4'h2) ^ gmul(t[3][c], 4'h3);
        m[3] = gmul(t[0][c], 4'h3) ^ t[1][c] ^ t[2][c] ^ gmul(t[3][c], 4'h2);
      end
      round_out[127-32*c -: 32] = {m[0], m[1], m[2], m[3]} ^ next_rk[127-32*c -: 32];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      round      <= '0;
      state      <= '0;
      rk         <= '0;
      ciphertext <= '0;
      ready      <= 1'b0;
    end else begin
      ready <= 1'b0;
      if (!busy) begin
        if (start) begin
          state <= plaintext ^ key;
          rk    <= key;
          round <= 4'd1;
          busy  <= 1'b1;
        end
      end else begin
        state <= round_out;
        rk    <= next_rk;
        if (round == 4'd10) begin
          ciphertext <= round_out;
          ready      <= 1'b1;
          busy       <= 1'b0;
        end else begin
          round <= round + 1'b1;
        end
      end
    end
  end

endmodule
