// ripple_carry_adder: N-bit adder built as a chain of full adders, giving an
// (N+1)-bit result whose top bit is the carry out.
//
// Each bit position is a full adder: s_i = a_i ^ b_i ^ c_i and
// c_(i+1) = a_i&b_i | c_i&(a_i^b_i), the carry rippling from bit 0 upward.
// Subtraction a - b is done by the caller as a + ~b with cin = 1; the carry
// out is then 1 exactly when a >= b (no borrow).
//
// Interface: a, b (N bits), cin; sum (N+1 bits). Purely combinational.
// The full-adder chain and the N+1-bit output follow the design description;
// the carry-in pin, used for subtraction, is an addition of this design.
module ripple_carry_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N:0]   sum
);

  always_comb begin
    logic c;
    c = cin;
    for (int i = 0; i < int'(N); i++) begin
      sum[i] = a[i] ^ b[i] ^ c;
      c      = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
    end
    sum[N] = c;
  end

endmodule
