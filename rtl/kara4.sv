// kara4: sequential 4-bit Karatsuba multiplier, the lowest sequential level
// of the Karatsuba tree. One state machine drives a single combinational
// 2-bit multiplier and a single ripple-carry adder, one operation per clock.
//
// With x = x1*4 + x2 and y = y1*4 + y2 (2-bit halves):
//   x*y = x1*y1*16 + ((x1+x2)*(y1+y2) - x1*y1 - x2*y2)*4 + x2*y2.
// The half sums x1+x2 and y1+y2 are 3 bits wide while the multiplier takes
// 2 bits, so with x1+x2 = cx*4 + sx and y1+y2 = cy*4 + sy the middle product
// is built as sx*sy + cx*sy*4 + cy*sx*4 + cx*cy*16 (three extra additions).
//
// State sequence (one clock each): M1 x1*y1, SX x1+x2, M2 x2*y2, SY y1+y2,
// M3 sx*sy, C1..C3 carry corrections, D1 D2 subtract x1*y1 and x2*y2,
// R1 final assembly, then DONE. A product takes 12 clocks after start.
//
// The adder's carry-out bit is unused: every sum fits in 8 bits.
//
// Interface: reset is a synchronous clear that returns the block to idle and
// clears the outputs; start (level) begins a multiplication from idle; c and
// done stay valid in DONE until the next reset. The single multiplier, single
// adder and start/reset/done pins follow the design description; the order of
// the states and the carry corrections are this design's own.
module kara4 (
  input  logic       clk,
  input  logic       reset,
  input  logic       start,
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] c,
  output logic       done
);

  typedef enum logic [3:0] {
    S_IDLE, S_M1, S_SX, S_M2, S_SY, S_M3, S_C1, S_C2, S_C3, S_D1, S_D2, S_R1, S_DONE
  } state_t;

  state_t     state;
  logic [3:0] xa, xb;
  logic [3:0] p1, p2;
  logic [7:0] p3;
  logic [2:0] sx, sy;

  // Shared 2-bit multiplier.
  logic [1:0] m_a, m_b;
  logic [3:0] m_p;
  mult2 u_mult (.a(m_a), .b(m_b), .p(m_p));

  // Shared ripple-carry adder.
  logic [7:0] ad_a, ad_b;
  logic       ad_cin;
  logic [8:0] ad_s;
  ripple_carry_adder #(.N(8)) u_add (.a(ad_a), .b(ad_b), .cin(ad_cin), .sum(ad_s));

  always_comb begin
    m_a = xa[3:2];
    m_b = xb[3:2];
    unique case (state)
      S_M2:    begin m_a = xa[1:0]; m_b = xb[1:0]; end
      S_M3:    begin m_a = sx[1:0]; m_b = sy[1:0]; end
      default: ;
    endcase

    ad_a   = p3;
    ad_b   = 8'h00;
    ad_cin = 1'b0;
    unique case (state)
      S_SX: begin ad_a = {6'b0, xa[3:2]}; ad_b = {6'b0, xa[1:0]}; end
      S_SY: begin ad_a = {6'b0, xb[3:2]}; ad_b = {6'b0, xb[1:0]}; end
      S_C1: ad_b = sx[2] ? {4'b0, sy[1:0], 2'b0} : 8'h00;
      S_C2: ad_b = sy[2] ? {4'b0, sx[1:0], 2'b0} : 8'h00;
      S_C3: ad_b = (sx[2] & sy[2]) ? 8'h10 : 8'h00;
      S_D1: begin ad_b = ~{4'b0, p1}; ad_cin = 1'b1; end
      S_D2: begin ad_b = ~{4'b0, p2}; ad_cin = 1'b1; end
      S_R1: begin ad_a = {p1, p2}; ad_b = {p3[5:0], 2'b0}; end
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
          state <= S_M1;
        end
        S_M1: begin p1 <= m_p;           state <= S_SX; end
        S_SX: begin sx <= ad_s[2:0];     state <= S_M2; end
        S_M2: begin p2 <= m_p;           state <= S_SY; end
        S_SY: begin sy <= ad_s[2:0];     state <= S_M3; end
        S_M3: begin p3 <= {4'b0, m_p};   state <= S_C1; end
        S_C1: begin p3 <= ad_s[7:0];     state <= S_C2; end
        S_C2: begin p3 <= ad_s[7:0];     state <= S_C3; end
        S_C3: begin p3 <= ad_s[7:0];     state <= S_D1; end
        S_D1: begin p3 <= ad_s[7:0];     state <= S_D2; end
        S_D2: begin p3 <= ad_s[7:0];     state <= S_R1; end
        S_R1: begin
          c     <= ad_s[7:0];
          done  <= 1'b1;
          state <= S_DONE;
        end
        S_DONE: ;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
