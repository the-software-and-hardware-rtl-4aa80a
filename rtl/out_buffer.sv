// out_buffer: narrows a 128-bit result to the 32-bit processor bus. When
// load is high the 128-bit value is captured and the word pointer returns to
// the first word; then each rising edge of en (detected against en one clock
// earlier) puts the next 32-bit portion on data, most significant word
// first, wrapping after the fourth.
//
// Interface: clk, rst (synchronous clear), load, d (128 bits), en;
// data (32 bits), updated on the clock after each rising edge of en.
// The edge-triggered 32-bit readout follows the design description; the
// load pin, word order and wrap-around are this design's own.
module out_buffer
  import crypto_pkg::*;
#(
  parameter int unsigned WORDS = KEY_W / BUS_W
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   load,
  input  logic [WORDS*BUS_W-1:0] d,
  input  logic                   en,
  output logic [BUS_W-1:0]       data
);

  logic [WORDS*BUS_W-1:0]     held;
  logic [$clog2(WORDS)-1:0]   idx;
  logic                       en_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      held <= '0;
      idx  <= '0;
      en_q <= 1'b0;
      data <= '0;
    end else begin
      en_q <= en;
      if (load) begin
        held <= d;
        idx  <= '0;
      end else if (en & ~en_q) begin
        data <= held[(WORDS-1-int'(idx))*BUS_W +: BUS_W];
        idx  <= idx + 1'b1;
      end
    end
  end

endmodule
