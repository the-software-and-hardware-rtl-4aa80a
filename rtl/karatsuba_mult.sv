// karatsuba_mult: sequential N-bit Karatsuba multiplier (N = 8, 16, ... 128)
// with a 2N-bit product. The default, N = 128, is the multiplier of the
// Diffie-Hellman exponentiation unit.
//
// A state machine reuses ONE N/2-bit Karatsuba multiplier (a kara4 when
// N = 8, otherwise this module one level down) three times and ONE 2N-bit
// ripple-carry adder for all additions and subtractions. With m = N/2,
// x = x1*2^m + x2 and y = y1*2^m + y2:
//   x*y = x1*y1*2^2m + ((x1+x2)*(y1+y2) - x1*y1 - x2*y2)*2^m + x2*y2.
// The half sums are m+1 bits wide; writing x1+x2 = cx*2^m + sx and
// y1+y2 = cy*2^m + sy, the middle product is sx*sy (on the m-bit
// multiplier) plus the corrections cx*sy*2^m, cy*sx*2^m and cx*cy*2^2m.
//
// Sub-multiplier handshake: the sub-unit is held in reset except in the
// three wait states W1, W2, W3, where its start is high; when its done
// rises the product is captured and the state machine moves on, which
// resets the sub-unit again ready for the next product.
// State sequence: W1 x1*y1, SX x1+x2, W2 x2*y2, SY y1+y2, W3 sx*sy,
// C1..C3 corrections, D1 D2 subtractions, R1 assembly, DONE.
// Latency, counted in clock edges from the one that samples start to the one
// that sets done: T(N) = 3*T(N/2) + 12 with T(4) = 12, so T(128) = 4368.
//
// Lint note: when this module is linted on its own, as the top, verilator
// does not expand its self-instance and reports sub_done and sub_c as
// undriven. Under any parent (the exponentiation unit, a testbench) the
// recursion is elaborated in full and the warning does not appear; synthesis
// elaborates it as the top as well. The adder's carry-out bit is unused here
// because every sum fits in 2N bits.
//
// Interface: reset is a synchronous clear; start (level) begins from idle;
// c and done stay valid until the next reset. The recursive structure, one
// sub-multiplier plus one adder per level, the wait-for-done states and the
// reset-after-use of the sub-module follow the design description; the carry
// corrections, state order and the 2N-bit adder width are this design's own.
module karatsuba_mult #(
  parameter int unsigned N = 128
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] c,
  output logic           done
);

  localparam int unsigned M = N / 2;

  typedef enum logic [3:0] {
    S_IDLE, S_W1, S_SX, S_W2, S_SY, S_W3, S_C1, S_C2, S_C3, S_D1, S_D2, S_R1, S_DONE
  } state_t;

  state_t         state;
  logic [N-1:0]   xa, xb;
  logic [N-1:0]   p1, p2;
  logic [2*N-1:0] p3;
  logic [M:0]     sx, sy;

  // Shared N/2-bit sub-multiplier.
  logic           sub_reset, sub_start, sub_done;
  logic [M-1:0]   sub_a, sub_b;
  logic [N-1:0]   sub_c;

  generate
    if (N == 8) begin : g_leaf
      kara4 u_sub (.clk(clk), .reset(sub_reset), .start(sub_start),
                   .a(sub_a), .b(sub_b), .c(sub_c), .done(sub_done));
    end else begin : g_node
      karatsuba_mult #(.N(M)) u_sub (.clk(clk), .reset(sub_reset), .start(sub_start),
                                     .a(sub_a), .b(sub_b), .c(sub_c), .done(sub_done));
    end
  endgenerate

  // Shared 2N-bit ripple-carry adder.
  logic [2*N-1:0] ad_a, ad_b;
  logic           ad_cin;
  logic [2*N:0]   ad_s;
  ripple_carry_adder #(.N(2*N)) u_add (.a(ad_a), .b(ad_b), .cin(ad_cin), .sum(ad_s));

  logic waiting;
  assign waiting   = (state == S_W1) || (state == S_W2) || (state == S_W3);
  assign sub_start = waiting;
  assign sub_reset = reset || !waiting;

  always_comb begin
    sub_a = xa[N-1:M];
    sub_b = xb[N-1:M];
    unique case (state)
      S_W2:    begin sub_a = xa[M-1:0]; sub_b = xb[M-1:0]; end
      S_W3:    begin sub_a = sx[M-1:0]; sub_b = sy[M-1:0]; end
      default: ;
    endcase

    ad_a   = p3;
    ad_b   = '0;
    ad_cin = 1'b0;
    unique case (state)
      S_SX: begin ad_a = (2*N)'(xa[N-1:M]); ad_b = (2*N)'(xa[M-1:0]); end
      S_SY: begin ad_a = (2*N)'(xb[N-1:M]); ad_b = (2*N)'(xb[M-1:0]); end
      S_C1: ad_b = sx[M] ? (2*N)'(sy[M-1:0]) << M : '0;
      S_C2: ad_b = sy[M] ? (2*N)'(sx[M-1:0]) << M : '0;
      S_C3: ad_b = (sx[M] & sy[M]) ? (2*N)'(1) << (2*M) : '0;
      S_D1: begin ad_b = ~(2*N)'(p1); ad_cin = 1'b1; end
      S_D2: begin ad_b = ~(2*N)'(p2); ad_cin = 1'b1; end
      S_R1: begin ad_a = {p1, p2}; ad_b = p3 << M; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= S_IDLE;
      c     <= '0;
      done  <= 1'b0;
      xa    <= '0;
      xb    <= '0;
      p1    <= '0;
      p2    <= '0;
      p3    <= '0;
      sx    <= '0;
      sy    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          xa    <= a;
          xb    <= b;
          state <= S_W1;
        end
        S_W1: if (sub_done) begin p1 <= sub_c; state <= S_SX; end
        S_SX: begin sx <= ad_s[M:0]; state <= S_W2; end
        S_W2: if (sub_done) begin p2 <= sub_c; state <= S_SY; end
        S_SY: begin sy <= ad_s[M:0]; state <= S_W3; end
        S_W3: if (sub_done) begin p3 <= (2*N)'(sub_c); state <= S_C1; end
        S_C1: begin p3 <= ad_s[2*N-1:0]; state <= S_C2; end
        S_C2: begin p3 <= ad_s[2*N-1:0]; state <= S_C3; end
        S_C3: begin p3 <= ad_s[2*N-1:0]; state <= S_D1; end
        S_D1: begin p3 <= ad_s[2*N-1:0]; state <= S_D2; end
        S_D2: begin p3 <= ad_s[2*N-1:0]; state <= S_R1; end
        S_R1: begin
          c     <= ad_s[2*N-1:0];
          done  <= 1'b1;
          state <= S_DONE;
        end
        S_DONE: ;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
