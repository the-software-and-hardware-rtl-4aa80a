// dh_peripheral: the Diffie-Hellman key exchange unit as a 32-bit processor
// peripheral. Three input buffers collect the 128-bit operands A (base),
// B (exponent) and P (modulus) from 32-bit word writes; a_over_b_mod_p
// computes C = A^B mod P; an output buffer hands C back as 32-bit words.
//
// Use: write four words to each operand (wr.sel = 0 for A, 1 for B, 2 for P,
// one word per rising edge of wr.en, most significant word first), raise
// start, wait for finish, then pulse rd_en four times to read C, most
// significant word first. Raising reset clears the exponentiation unit
// (finish drops) so that start can launch the next computation; the
// operand buffers keep their contents and are cleared only by rst.
//
// Interface: clk, rst (synchronous, whole peripheral); wr (word_wr_t);
// start, reset, finish as on a_over_b_mod_p; rd_en, rd_data.
// The input-buffer / exponentiation / output-buffer arrangement follows the
// design description; the select field and the word order are this
// design's own.
module dh_peripheral
  import crypto_pkg::*;
#(
  parameter int unsigned W = KEY_W
) (
  input  logic             clk,
  input  logic             rst,
  input  word_wr_t         wr,
  input  logic             start,
  input  logic             reset,
  output logic             finish,
  input  logic             rd_en,
  output logic [BUS_W-1:0] rd_data
);

  localparam int unsigned WORDS = W / BUS_W;

  logic [W-1:0] op_a, op_b, op_p, res_c;
  logic finish_q;

  in_buffer #(.WORDS(WORDS)) u_buf_a (.clk(clk), .rst(rst), .en(wr.en && wr.sel == 2'd0),
                                      .data(wr.data), .q(op_a));
  in_buffer #(.WORDS(WORDS)) u_buf_b (.clk(clk), .rst(rst), .en(wr.en && wr.sel == 2'd1),
                                      .data(wr.data), .q(op_b));
  in_buffer #(.WORDS(WORDS)) u_buf_p (.clk(clk), .rst(rst), .en(wr.en && wr.sel == 2'd2),
                                      .data(wr.data), .q(op_p));

  a_over_b_mod_p #(.W(W)) u_exp (
    .clk(clk), .reset(rst || reset), .start(start),
    .A(op_a), .B(op_b), .P(op_p), .C(res_c), .finish(finish)
  );

  // Capture the result into the output buffer when finish rises.
  always_ff @(posedge clk) begin
    if (rst) finish_q <= 1'b0;
    else     finish_q <= finish;
  end

  out_buffer #(.WORDS(WORDS)) u_obuf (.clk(clk), .rst(rst), .load(finish && !finish_q),
                                      .d(res_c), .en(rd_en), .data(rd_data));

endmodule
