// pp_matrix: the array of 1x1 multipliers that forms the partial-product
// matrix of a 16x16 two's-complement multiplication.
//
// With multiplier a and multiplicand b, the product is
//   P = sum_{k=0}^{14} 2^k a_k b  +  2^15 a_15 b'  +  2^15 a_15      (mod 2^32)
// where b' is the one's complement of b. Partial product k < 15 is a_k AND
// b_j; partial product 15 is a_15 AND NOT b_j. Each partial product is sign
// extended up to bit 31 by repeating its bit j = 15. The lone 2^15 a_15 term
// is entered as two copies of a_15 in column 13 and one in column 14
// (2*2^13 + 2^14 = 2^15), so no column is taller than 16.
//
// The result is the flat bit vector described in mult_pkg (level 0): column
// by column from column 0, and inside column c partial product 0 first,
// then 1, 2, .., then the inserted a_15 copies. Because the sign-extension
// bits of the low partial products come first in every upper column, the
// first-level adders that see three sign bits repeat identically from
// column to column; a synthesis tool merges those copies, as the chip did by
// building each such adder once.
//
// The chip uses NAND gates (active-low partial products) feeding adders
// with active-low inputs; the logic value delivered is the same AND.
//
// Interface: a[15:0] (multiplier), b[15:0] (multiplicand) in;
// pp[total(0)-1:0] out. Combinational, first part of pipeline stage 1.
module pp_matrix
  import mult_pkg::*;
(
  input  logic [N-1:0]        a,
  input  logic [N-1:0]        b,
  output logic [total(0)-1:0] pp
);
  for (genvar c = 0; c < PW; c++) begin : g_col
    localparam int BASE = offset(0, c);
    localparam int ROWS = (c < N) ? c + 1 : N;

    for (genvar k = 0; k < ROWS; k++) begin : g_row
      localparam int J = (c - k > N - 1) ? N - 1 : c - k;   // sign extension
      if (k < N - 1) begin : g_pos
        assign pp[BASE + k] = a[k] & b[J];
      end else begin : g_neg
        assign pp[BASE + k] = a[N-1] & ~b[J];
      end
    end

    // inserted copies of the multiplier sign bit
    for (genvar e = ROWS; e < height(0, c); e++) begin : g_sign
      assign pp[BASE + e] = a[N-1];
    end
  end
endmodule
