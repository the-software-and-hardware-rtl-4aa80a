// inv_cipher_serial_table: iterative AES-128 decryption, one round per
// clock, inverse S-box by table lookup, round keys generated on the fly.
//
// Decryption needs the round keys last-first. On start the block first runs
// the key schedule forward for ten clocks (phase KEY) to reach the last
// round key, whitens the ciphertext with it, and then runs ten rounds (phase
// RND) that each apply InvShiftRows (row r rotated right by r bytes),
// InvSubBytes, AddRoundKey with the previous round key (obtained by running
// aes_key_expand backwards in the same clock) and InvMixColumns (each column
// times {0b}x^3+{0d}x^2+{09}x+{0e}); the last round leaves InvMixColumns out.
// The plaintext is then registered and ready pulses high for one clock.
// Latency: ready rises at the 21st clock edge after the one that samples
// start (10 key-schedule clocks, 1 whitening clock, 10 rounds).
//
// Interface: clk, rst (synchronous), start (sampled while idle), ciphertext,
// key (128 bits each); plaintext, ready. The inverse round sequence and the
// module's pins follow the design description; the key port and the
// on-the-fly backward key schedule are this design's own.
module inv_cipher_serial_table
  import crypto_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [127:0] ciphertext,
  input  logic [127:0] key,
  output logic [127:0] plaintext,
  output logic         ready
);

  typedef enum logic [1:0] {S_IDLE, S_KEY, S_WHITEN, S_RND} state_t;

  state_t       phase;
  logic [3:0]   round;
  logic [127:0] state, rk, ct_q;
  logic [127:0] next_rk, prev_rk;
  logic [127:0] round_out;

  aes_key_expand u_ks (.rk(rk), .round(round), .next_rk(next_rk), .prev_rk(prev_rk));

  always_comb begin
    logic [7:0] t [4][4];
    // InvShiftRows and InvSubBytes: t[r][c] = S^-1(s[r][(c-r) mod 4]).
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        t[r][c] = INV_SBOX[st_byte(state, r, (c + 4 - r) % 4)];
    // AddRoundKey, then InvMixColumns except in the last round.
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a [4];
      logic [7:0] m [4];
      for (int r = 0; r < 4; r++) a[r] = t[r][c] ^ st_byte(prev_rk, r, c);
      if (round == 4'd1) begin
        for (int r = 0; r < 4; r++) m[r] = a[r];
      end else begin
        m[0] = gmul(a[0], 4'he) ^ gmul(a[1], 4'hb) ^ gmul(a[2], 4'hd) ^ gmul(a[3], 4'h9);
        m[1] = gmul(a[0], 4'h9) ^ gmul(a[1], 4'he) ^ gmul(a[2], 4'hb) ^ gmul(a[3], 4'hd);
        m[2] = gmul(a[0], 4'hd) ^ gmul(a[1], 4'h9) ^ gmul(a[2], 4'he) ^ gmul(a[3], 4'hb);
        m[3] = gmul(a[0], 4'hb) ^ gmul(a[1], 4'hd) ^ gmul(a[2], 4'h9) ^ gmul(a[3], 4'he);
      end
      round_out[127-32*c -: 32] = {m[0], m[1], m[2], m[3]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= S_IDLE;
      round     <= '0;
      state     <= '0;
      rk        <= '0;
      ct_q      <= '0;
      plaintext <= '0;
      ready     <= 1'b0;
    end else begin
      ready <= 1'b0;
      unique case (phase)
        S_IDLE: if (start) begin
          ct_q  <= ciphertext;
          rk    <= key;
          round <= 4'd1;
          phase <= S_KEY;
        end
        S_KEY: begin
          rk <= next_rk;
          if (round == 4'd10) phase <= S_WHITEN;
          else round <= round + 1'b1;
        end
        S_WHITEN: begin
          state <= ct_q ^ rk;
          phase <= S_RND;
        end
        S_RND: begin
          state <= round_out;
          rk    <= prev_rk;
          if (round == 4'd1) begin
            plaintext <= round_out;
            ready     <= 1'b1;
            phase     <= S_IDLE;
          end else begin
            round <= round - 1'b1;
          end
        end
        default: phase <= S_IDLE;
      endcase
    end
  end

endmodule
