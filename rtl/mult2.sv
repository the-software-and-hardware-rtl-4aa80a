// mult2: combinational 2-bit by 2-bit multiplier with a 4-bit product, the
// leaf of the Karatsuba multiplier tree.
//
// It forms the two partial products of the schoolbook method,
// a*b[0] and (a*b[1]) << 1, and adds them.
//
// Interface: a, b (2 bits each); p (4 bits). Purely combinational.
module mult2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic [3:0] pp0, pp1;

  always_comb begin
    pp0 = {2'b00, a & {2{b[0]}}};
    pp1 = {1'b0, a & {2{b[1]}}, 1'b0};
    p   = pp0 + pp1;
  end

endmodule
