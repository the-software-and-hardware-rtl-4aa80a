// in_buffer: widens the 32-bit processor bus to a 128-bit operand. On each
// rising edge of en (detected against its value one clock earlier) the word
// on data is shifted into the low end of a 128-bit register, so after four
// writes the first word written sits in bits [127:96] and the last in [31:0].
//
// Interface: clk, rst (synchronous, clears the register), en, data (32 bits);
// q (128 bits), complete after the fourth rising edge of en.
// The edge-triggered collection of 32-bit words into a 128-bit register
// follows the design description; the word order is this design's own.
module in_buffer
  import crypto_pkg::*;
#(
  parameter int unsigned WORDS = KEY_W / BUS_W
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  input  logic [BUS_W-1:0]       data,
  output logic [WORDS*BUS_W-1:0] q
);

  logic en_q;
  logic en_rise;

  assign en_rise = en & ~en_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      en_q  <= 1'b0;
      q     <= '0;
    end else begin
      en_q <= en;
      if (en_rise) begin
        q <= {q[(WORDS-1)*BUS_W-1:0], data};
      end
    end
  end

endmodule
