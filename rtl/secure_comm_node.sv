// secure_comm_node: the cryptographic hardware of one communicating system.
// Two such nodes, each driven by its own processor and joined by a serial
// link, agree on a 128-bit key by Diffie-Hellman and then exchange a message
// encrypted with AES-128 under that key.
//
// The node holds three independent 32-bit peripherals:
//   dh_*  : Diffie-Hellman unit, C = A^B mod P on 128-bit operands
//           (square-and-multiply over a sequential Karatsuba multiplier and
//           a subtract-based modulo unit);
//   enc_* : AES-128 encryption core with word buffers;
//   dec_* : AES-128 decryption core with word buffers.
// The processor that sequences them, and the serial link, are outside this
// module: their connections are the ports below. A typical session is
// A^a mod P -> send; partner's value^a mod P = shared key -> write key to
// enc/dec -> encrypt a block -> send; the partner decrypts.
//
// Interface: clk, rst (synchronous, active high) and, per peripheral, a
// word_wr_t write port, start, a completion flag, rd_en and rd_data (see
// dh_peripheral and aes_peripheral for the exact sequencing).
module secure_comm_node
  import crypto_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  // Diffie-Hellman unit
  input  word_wr_t         dh_wr,
  input  logic             dh_start,
  input  logic             dh_reset,
  output logic             dh_finish,
  input  logic             dh_rd_en,
  output logic [BUS_W-1:0] dh_rd_data,
  // AES-128 encryption
  input  word_wr_t         enc_wr,
  input  logic             enc_start,
  output logic             enc_done,
  input  logic             enc_rd_en,
  output logic [BUS_W-1:0] enc_rd_data,
  // AES-128 decryption
  input  word_wr_t         dec_wr,
  input  logic             dec_start,
  output logic             dec_done,
  input  logic             dec_rd_en,
  output logic [BUS_W-1:0] dec_rd_data
);

  dh_peripheral u_dh (
    .clk(clk), .rst(rst), .wr(dh_wr), .start(dh_start), .reset(dh_reset),
    .finish(dh_finish), .rd_en(dh_rd_en), .rd_data(dh_rd_data)
  );

  aes_peripheral #(.DECRYPT(1'b0)) u_enc (
    .clk(clk), .rst(rst), .wr(enc_wr), .start(enc_start), .done(enc_done),
    .rd_en(enc_rd_en), .rd_data(enc_rd_data)
  );

  aes_peripheral #(.DECRYPT(1'b1)) u_dec (
    .clk(clk), .rst(rst), .wr(dec_wr), .start(dec_start), .done(dec_done),
    .rd_en(dec_rd_en), .rd_data(dec_rd_data)
  );

endmodule
