// a_over_b_mod_p: modular exponentiation C = A^B mod P on W-bit operands
// (W = 128 by default), the arithmetic core of the Diffie-Hellman key
// exchange: with A = alpha it computes a public value alpha^a mod p, and
// with A = the partner's public value it computes the shared key.
//
// It runs the left-to-right binary square-and-multiply algorithm:
//   C = 1; for i = W-1 downto 0: C = C*C mod P; if B[i]: C = C*A mod P.
// Each product is formed by the sequential Karatsuba multiplier and reduced
// by the mod_p unit. A state machine sequences the two sub-units through
// their start/done handshakes; each sub-unit is held in reset except while
// the state machine waits on it, so it is cleared after every use.
// Every exponent bit costs one squaring and one reduction, plus one more
// multiplication and reduction when the bit is 1.
//
// Interface: reset is a synchronous clear; start (level) begins from idle;
// C and finish stay valid until the next reset. Pins A, B, C, clk, reset,
// start and finish follow the design's module; the modulus P is a port here.
// The base need not be below P.
module a_over_b_mod_p #(
  parameter int unsigned W = 128
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [W-1:0] A,
  input  logic [W-1:0] B,
  input  logic [W-1:0] P,
  output logic [W-1:0] C,
  output logic         finish
);

  typedef enum logic [2:0] {S_IDLE, S_SQ_MUL, S_SQ_MOD, S_MU_MUL, S_MU_MOD, S_DONE} state_t;

  state_t               state;
  logic [W-1:0]         acc, base, expo, modulus;
  logic [$clog2(W)-1:0] bit_idx;

  // Karatsuba multiplier.
  logic           mul_reset, mul_start, mul_done;
  logic [W-1:0]   mul_b;
  logic [2*W-1:0] mul_c;
  karatsuba_mult #(.N(W)) u_mul (
    .clk(clk), .reset(mul_reset), .start(mul_start),
    .a(acc), .b(mul_b), .c(mul_c), .done(mul_done)
  );

  // Modulo unit.
  logic         mod_reset, mod_start, mod_finish;
  logic [W-1:0] mod_y;
  mod_p #(.W(W)) u_mod (
    .clk(clk), .reset(mod_reset), .start(mod_start),
    .X(mul_c), .P(modulus), .Y(mod_y), .finish(mod_finish)
  );

  assign mul_start = (state == S_SQ_MUL) || (state == S_MU_MUL);
  assign mul_reset = reset || !mul_start;
  assign mul_b     = (state == S_MU_MUL) ? base : acc;
  assign mod_start = (state == S_SQ_MOD) || (state == S_MU_MOD);
  assign mod_reset = reset || !mod_start;

  always_ff @(posedge clk) begin
    if (reset) begin
      state   <= S_IDLE;
      acc     <= '0;
      base    <= '0;
      expo    <= '0;
      modulus <= '0;
      bit_idx <= '0;
      C       <= '0;
      finish  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          acc     <= W'(1);
          base    <= A;
          expo    <= B;
          modulus <= P;
          bit_idx <= $clog2(W)'(W - 1);
          state   <= S_SQ_MUL;
        end
        S_SQ_MUL: if (mul_done) state <= S_SQ_MOD;
        S_SQ_MOD: if (mod_finish) begin
          acc <= mod_y;
          if (expo[bit_idx])        state <= S_MU_MUL;
          else if (bit_idx == '0)   state <= S_DONE;
          else begin
            bit_idx <= bit_idx - 1'b1;
            state   <= S_SQ_MUL;
          end
        end
        S_MU_MUL: if (mul_done) state <= S_MU_MOD;
        S_MU_MOD: if (mod_finish) begin
          acc <= mod_y;
          if (bit_idx == '0) state <= S_DONE;
          else begin
            bit_idx <= bit_idx - 1'b1;
            state   <= S_SQ_MUL;
          end
        end
        S_DONE: begin
          C      <= acc;
          finish <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
