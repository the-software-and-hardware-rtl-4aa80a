// aes_peripheral: an AES-128 core (encryption, or decryption when DECRYPT is
// set) as a 32-bit processor peripheral. Two input buffers collect the
// 128-bit data block (wr.sel = 0) and the 128-bit key (wr.sel = 1) from
// 32-bit word writes; the result is captured into an output buffer when the
// core's ready pulse arrives and is read back as four 32-bit words.
//
// Use: write four words of block and of key (one per rising edge of wr.en,
// most significant word first), pulse start for one clock, wait for done
// (set by ready, cleared by the next start), then pulse rd_en four times.
// Latency: 10 rounds (encryption) or 21 clocks (decryption) from start.
//
// Interface: clk, rst (synchronous); wr (word_wr_t); start; done; rd_en,
// rd_data. The buffer arrangement follows the design description; the key
// buffer, the sticky done flag and the word order are this design's own.
module aes_peripheral
  import crypto_pkg::*;
#(
  parameter bit DECRYPT = 1'b0
) (
  input  logic             clk,
  input  logic             rst,
  input  word_wr_t         wr,
  input  logic             start,
  output logic             done,
  input  logic             rd_en,
  output logic [BUS_W-1:0] rd_data
);

  localparam int unsigned WORDS = KEY_W / BUS_W;

  logic [KEY_W-1:0] blk, key, result;
  logic ready;

  in_buffer #(.WORDS(WORDS)) u_buf_blk (.clk(clk), .rst(rst), .en(wr.en && wr.sel == 2'd0),
                                        .data(wr.data), .q(blk));
  in_buffer #(.WORDS(WORDS)) u_buf_key (.clk(clk), .rst(rst), .en(wr.en && wr.sel == 2'd1),
                                        .data(wr.data), .q(key));

  generate
    if (DECRYPT) begin : g_dec
      inv_cipher_serial_table u_core (.clk(clk), .rst(rst), .start(start),
                                      .ciphertext(blk), .key(key),
                                      .plaintext(result), .ready(ready));
    end else begin : g_enc
      cipher_serial_table u_core (.clk(clk), .rst(rst), .start(start),
                                  .plaintext(blk), .key(key),
                                  .ciphertext(result), .ready(ready));
    end
  endgenerate

  always_ff @(posedge clk) begin
    if (rst)        done <= 1'b0;
    else if (start) done <= 1'b0;
    else if (ready) done <= 1'b1;
  end

  out_buffer #(.WORDS(WORDS)) u_obuf (.clk(clk), .rst(rst), .load(ready), .d(result),
                                      .en(rd_en), .data(rd_data));

endmodule
