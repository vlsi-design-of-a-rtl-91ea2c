// csa_level: one level of Wallace-tree carry-save reduction.
//
// LEVEL (1..6) selects which level of the plan in mult_pkg this instance
// is. The input is the flat bit vector left by level LEVEL-1, the output
// the flat vector for level LEVEL. In every column c the input bits are
// taken three at a time into full adders; each sum stays in column c and
// each carry goes to column c+1 (the carries of column 31 are dropped, as
// the product has 32 bits). The one or two bits left over are passed on,
// except where the plan calls for a half adder: then the two leftover bits
// go through a full adder with its carry input tied low. Every adder of a
// level works in parallel, so a level costs one full-adder delay.
//
// Output order inside column c: sums of column c's adders, then the
// passed bits (or the half-add sum), then the carries from column c-1.
//
// Interface: din[total(LEVEL-1)-1:0] in, dout[total(LEVEL)-1:0] out.
// Combinational. Levels 1-3 form pipeline stage 1 with the 1x1
// multipliers; levels 4-6 form stage 2.
module csa_level
  import mult_pkg::*;
#(
  parameter int LEVEL = 1
) (
  input  logic [total(LEVEL-1)-1:0] din,
  output logic [total(LEVEL)-1:0]   dout
);
  for (genvar c = 0; c < PW; c++) begin : g_col
    localparam int  F   = fa_count(LEVEL, c);
    localparam int  R   = pass_count(LEVEL, c);
    localparam bit  HA  = ha_used(LEVEL, c);
    localparam int  IB  = offset(LEVEL - 1, c);          // first input bit
    localparam int  OB  = offset(LEVEL, c);              // first output bit
    localparam bit  TOP = (c == PW - 1);
    localparam int  CB  = TOP ? 0 : carry_base(LEVEL, c + 1);  // where carries land

    logic [F:0] co;   // one spare bit so that F = 0 still declares a vector

    for (genvar f = 0; f < F; f++) begin : g_fa
      full_adder u_fa (
        .a (din[IB + 3*f]),
        .b (din[IB + 3*f + 1]),
        .ci(din[IB + 3*f + 2]),
        .s (dout[OB + f]),
        .co(co[f])
      );
      if (!TOP) begin : g_carry
        assign dout[CB + f] = co[f];
      end
    end

    if (HA) begin : g_ha
      full_adder u_ha (
        .a (din[IB + 3*F]),
        .b (din[IB + 3*F + 1]),
        .ci(1'b0),
        .s (dout[OB + F]),
        .co(co[F])
      );
      if (!TOP) begin : g_carry
        assign dout[CB + F] = co[F];
      end
    end else begin : g_pass
      for (genvar r = 0; r < R; r++) begin : g_bit
        assign dout[OB + F + r] = din[IB + 3*F + r];
      end
      assign co[F] = 1'b0;
    end
  end
endmodule
