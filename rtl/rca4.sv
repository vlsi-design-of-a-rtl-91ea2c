// rca4: 4-bit ripple-carry adder slice of the final 32-bit adder.
//
// Adds operand slices x[3:0] and y[3:0] with the slice's carry in, which
// the lookahead unit formed one pipeline stage earlier. The carry out of
// bit 3 is not brought out: the lookahead unit has already produced it for
// the next slice. Built from four full adders in series.
//
// Interface: x, y, ci in; s[3:0] out. Combinational; in the pipeline it sits
// between the fourth latch and the output latch.
module rca4 (
  input  logic [3:0] x,
  input  logic [3:0] y,
  input  logic       ci,
  output logic [3:0] s
);
  logic [4:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < 4; i++) begin : g_bit
    full_adder u_fa (.a(x[i]), .b(y[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end
endmodule
