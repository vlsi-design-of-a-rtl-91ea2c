// full_adder: one-bit 3-input, 2-output adder, the cell every carry-save
// level and every 4-bit ripple adder of the multiplier is built from.
//
// The original cell is a pass-transistor selector adder: the two operand
// inputs are buffered into true and complement rails, and pass transistors
// steer either Cin, its complement or a supply rail onto SUM and COUT. The
// selected values are exactly the truth table of a full adder, which is what
// is written here: SUM = A xor B xor Cin, COUT = majority(A, B, Cin).
//
// Interface: a, b, ci in; s, co out. Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  // When A equals B the sum is Cin and the carry is A; otherwise the sum is
  // the complement of Cin and the carry is Cin (the selector's two cases).
  always_comb begin
    if (a == b) begin
      s  = ci;
      co = a;
    end else begin
      s  = ~ci;
      co = ci;
    end
  end
endmodule
