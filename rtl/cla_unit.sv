// cla_unit: the carry-lookahead unit of the 32-bit final adder, made of a
// low and a high half.
//
// Blocks are the 4-bit slices 0..7 of the adder (slice i holds bits
// 4i+3..4i). g[i] and p[i] are that slice's block generate and propagate
// (G3, G7, .. and P7, P11, .. when named by the slice's top bit). The carry
// into the adder is always zero in a multiplier, so the low half gives
//   C4  = G3
//   C8  = G7  + P7 G3
//   C12 = G11 + P11 G7 + P11 P7 G3
//   C16 = G15 + P15 G11 + P15 P11 G7 + P15 P11 P7 G3
// and the high half, fed with C16, gives
//   C20 = G19 + P19 C16
//   C24 = G23 + P23 G19 + P23 P19 C16
//   C28 = G27 + P27 G23 + P27 P23 G19 + P27 P23 P19 C16.
// The carry out of bit 31 is not formed: a 16x16 product has 32 bits. The
// propagate of slice 0 and both signals of slice 7 are therefore not inputs.
//
// Interface: g[6:0] (slices 0..6), p[6:1] (slices 1..6) in; c[7:1] out,
// where c[i] is the carry into slice i (C4 .. C28). Combinational; in the
// pipeline it sits between the third and fourth latches.
module cla_unit (
  input  logic [6:0] g,
  input  logic [6:1] p,
  output logic [7:1] c
);
  always_comb begin
    // low CLA
    c[1] = g[0];
    c[2] = g[1] | (p[1] & g[0]);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    // high CLA, chained on C16
    c[5] = g[4] | (p[4] & c[4]);
    c[6] = g[5] | (p[5] & g[4]) | (p[5] & p[4] & c[4]);
    c[7] = g[6] | (p[6] & g[5]) | (p[6] & p[5] & g[4]) | (p[6] & p[5] & p[4] & c[4]);
  end
endmodule
