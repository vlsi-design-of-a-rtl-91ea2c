// pg_gen: block propagate / block generate for one 4-bit slice of the
// 32-bit carry-lookahead adder.
//
// For operand slices x[3:0] and y[3:0] (bit 3 is the most significant):
//   p = (x3+y3)(x2+y2)(x1+y1)(x0+y0)
//   g = x3y3 + (x3+y3)x2y2 + (x3+y3)(x2+y2)x1y1 + (x3+y3)(x2+y2)(x1+y1)x0y0
// Propagate is the inclusive-OR form; a carry into bit 0 reaches the carry
// out of bit 3 when p is high, and the slice itself produces one when g is
// high. In the chip this is a PLA; here it is the same sum of products.
//
// Interface: x, y in; p, g out. Purely combinational; in the pipeline its
// outputs are captured by the third latch.
module pg_gen (
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic       p,
  output logic       g
);
  logic [3:0] t;   // bit propagate (OR)
  logic [3:0] k;   // bit generate (AND)

  always_comb begin
    t = x | y;
    k = x & y;
    p = &t;
    g = k[3] | (t[3] & k[2]) | (t[3] & t[2] & k[1]) | (t[3] & t[2] & t[1] & k[0]);
  end
endmodule
