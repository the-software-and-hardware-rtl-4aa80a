// aes_key_expand: one step of the AES-128 key schedule, in both directions,
// so the ciphers can produce round keys on the fly instead of storing all
// eleven.
//
// Forward (round key i-1 -> round key i, i = 1..10), words w0..w3:
//   w0' = w0 ^ SubWord(RotWord(w3)) ^ Rcon[i], w1' = w1 ^ w0',
//   w2' = w2 ^ w1', w3' = w3 ^ w2'.
// Backward (round key i -> round key i-1) undoes those four equations:
//   w3 = w3' ^ w2', w2 = w2' ^ w1', w1 = w1' ^ w0',
//   w0 = w0' ^ SubWord(RotWord(w3)) ^ Rcon[i].
// RotWord turns [a0,a1,a2,a3] into [a1,a2,a3,a0]; SubWord applies the S-box
// to each byte; Rcon[i] = {x^(i-1), 00, 00, 00}.
//
// Interface: rk (128-bit round key, word 0 in bits [127:96]), round (i);
// next_rk (round key i from rk = key i-1), prev_rk (key i-1 from rk = key i).
// Purely combinational. The forward rule is the standard key expansion; the
// backward step is this design's way of running the decryption schedule.
module aes_key_expand
  import crypto_pkg::*;
(
  input  logic [127:0] rk,
  input  logic [3:0]   round,
  output logic [127:0] next_rk,
  output logic [127:0] prev_rk
);

  logic [31:0] w0, w1, w2, w3;
  logic [31:0] n0, n1, n2, n3;
  logic [31:0] p0, p1, p2, p3;

  assign {w0, w1, w2, w3} = rk;

  always_comb begin
    n0 = w0 ^ sub_word({w3[23:0], w3[31:24]}) ^ {rcon(round), 24'h0};
    n1 = w1 ^ n0;
    n2 = w2 ^ n1;
    n3 = w3 ^ n2;
    next_rk = {n0, n1, n2, n3};

    p3 = w3 ^ w2;
    p2 = w2 ^ w1;
    p1 = w1 ^ w0;
    p0 = w0 ^ sub_word({p3[23:0], p3[31:24]}) ^ {rcon(round), 24'h0};
    prev_rk = {p0, p1, p2, p3};
  end

endmodule
