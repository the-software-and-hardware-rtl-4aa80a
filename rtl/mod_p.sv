// mod_p: sequential reduction Y = X mod P of a 2W-bit value X by a W-bit
// modulus P (W = 128 by default), done only with subtractions on a
// ripple-carry adder under a small state machine.
//
// The state machine first aligns a copy D of P under the top of X (NORM:
// shift D left one bit per clock while it is below X's top half and its top
// bit is clear), then walks back down (SUB: each clock, subtract D from the
// remainder when the adder's carry says remainder >= D, then halve D). When
// D is back at P and the last subtraction is done, the remainder is the
// minimum non-negative value congruent to X, i.e. X mod P, and finish rises.
// This is the subtract-until-minimum reduction of the design, carried out on
// shifted multiples of P so that it ends after at most 2*(2W) + 2 clocks
// instead of after up to X/P single subtractions.
//
// Interface: reset is a synchronous clear; start (level) begins from idle;
// Y and finish stay valid until the next reset. P = 0 yields Y = X[W-1:0].
// Port names X, Y, clk, reset, start, finish follow the design's module; the
// modulus input P is a port here because the operands are 128-bit values
// supplied at run time.
module mod_p #(
  parameter int unsigned W = 128
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           start,
  input  logic [2*W-1:0] X,
  input  logic [W-1:0]   P,
  output logic [W-1:0]   Y,
  output logic           finish
);

  localparam int unsigned XW = 2 * W;

  typedef enum logic [1:0] {S_IDLE, S_NORM, S_SUB, S_DONE} state_t;

  state_t                state;
  logic [XW-1:0]         rem;
  logic [XW-1:0]         d;
  logic [$clog2(XW+1)-1:0] shifts;

  // Ripple-carry adder used as a subtractor: rem + ~d + 1.
  logic [XW:0] ad_s;
  ripple_carry_adder #(.N(XW)) u_add (.a(rem), .b(~d), .cin(1'b1), .sum(ad_s));

  logic no_borrow;
  assign no_borrow = ad_s[XW];

  always_ff @(posedge clk) begin
    if (reset) begin
      state  <= S_IDLE;
      rem    <= '0;
      d      <= '0;
      shifts <= '0;
      Y      <= '0;
      finish <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          rem    <= X;
          d      <= XW'(P);
          shifts <= '0;
          state  <= (P == '0) ? S_DONE : S_NORM;
        end
        S_NORM: begin
          // Stop once D is the largest multiple 2^k*P that can still be <= X.
          if (d[XW-1] || (d << 1) > rem) state <= S_SUB;
          else begin
            d      <= d << 1;
            shifts <= shifts + 1'b1;
          end
        end
        S_SUB: begin
          if (no_borrow) rem <= ad_s[XW-1:0];
          if (shifts == '0) state <= S_DONE;
          else begin
            d      <= d >> 1;
            shifts <= shifts - 1'b1;
          end
        end
        S_DONE: begin
          Y      <= rem[W-1:0];
          finish <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
