// mult16_pipe: 16x16-bit two's-complement multiplier, pipelined in five
// stages, with a serial scan path through its four intermediate latches.
//
// Datapath (one stage between consecutive latches):
//   stage 1  1x1 multipliers (pp_matrix) and carry-save levels 1-3
//            -> latch 1 (L1_W = 144 bits)
//   stage 2  carry-save levels 4-6, leaving at most two bits per column
//            -> latch 2 (57 bits: the two operands of the final adder,
//               columns holding a single bit contribute one)
//   stage 3  seven 4-bit block P and G generators
//            -> latch 3 (70 bits: the 57 operand bits, G3..G27, P7..P27)
//   stage 4  lookahead unit producing C4..C28
//            -> latch 4 (64 bits: the 57 operand bits, C4..C28)
//   stage 5  eight 4-bit ripple-carry adders
//            -> output latch (32 bits, the product p)
// Each stage is about four full-adder delays long, the length of the
// 4-bit ripple adders of stage 5.
//
// Clocking: every latch is a master/slave pair on a non-overlapping
// two-phase clock. With OP high the masters load from the datapath during
// PHI1 and the slaves pass the value on during PHI2. Operands applied
// before the PHI1 of cycle 1 give their product on p during the PHI2 of
// cycle 5, and a new pair may be applied every cycle. Nothing is reset;
// the first four products after power-up are meaningless.
//
// Scan (level sensitive scan design): with OP low, each PHI1-PHI2 cycle
// shifts latch k one place toward its bit 0; l_in[k-1] enters at the top
// bit and bit 0 appears on l_out[k-1]. A bit entering latch k reaches its
// output after as many cycles as the latch has bits. The output latch is
// not on the scan path and holds the last product while OP is low.
//
// Lint tools report each latch's output as part of a combinational loop:
// the scan path runs from a cell's slave to its neighbour's master. The
// loop is broken by the non-overlapping clock phases (see lssd_latch).
//
// Ports: a (multiplier), b (multiplicand), op, phi1, phi2, l_in[3:0] and
// l_out[3:0] (index k-1 for latch k), p (product). The bit order inside
// latches 1 and 2 is the flat column order of mult_pkg.
module mult16_pipe
  import mult_pkg::*;
(
  input  logic          phi1,
  input  logic          phi2,
  input  logic          op,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic [3:0]    l_in,
  output logic [3:0]    l_out,
  output logic [PW-1:0] p
);
  // ---------------------------------------------------------------- control
  logic normal, shift;

  latch_ctrl u_ctrl (.phi1(phi1), .op(op), .normal(normal), .shift(shift));

  // ---------------------------------------------------------------- stage 1
  logic [total(0)-1:0] lv0;
  logic [total(1)-1:0] lv1;
  logic [total(2)-1:0] lv2;
  logic [total(3)-1:0] lv3;
  logic [L1_W-1:0]     latch1_q;

  pp_matrix u_pp (.a(a), .b(b), .pp(lv0));
  csa_level #(.LEVEL(1)) u_level1 (.din(lv0), .dout(lv1));
  csa_level #(.LEVEL(2)) u_level2 (.din(lv1), .dout(lv2));
  csa_level #(.LEVEL(3)) u_level3 (.din(lv2), .dout(lv3));

  lssd_latch #(.W(L1_W)) u_latch1 (
    .normal(normal), .shift(shift), .phi2(phi2),
    .d(lv3), .sin(l_in[0]), .q(latch1_q), .sout(l_out[0])
  );

  // ---------------------------------------------------------------- stage 2
  logic [total(4)-1:0] lv4;
  logic [total(5)-1:0] lv5;
  logic [total(6)-1:0] lv6;
  logic [L2_W-1:0]     latch2_q;

  csa_level #(.LEVEL(4)) u_level4 (.din(latch1_q), .dout(lv4));
  csa_level #(.LEVEL(5)) u_level5 (.din(lv4), .dout(lv5));
  csa_level #(.LEVEL(6)) u_level6 (.din(lv5), .dout(lv6));

  lssd_latch #(.W(L2_W)) u_latch2 (
    .normal(normal), .shift(shift), .phi2(phi2),
    .d(lv6), .sin(l_in[1]), .q(latch2_q), .sout(l_out[1])
  );

  // ---------------------------------------------------------------- stage 3
  // Spread the 57 operand bits into the two 32-bit adder operands; a column
  // holding a single bit gets a zero in operand y.
  logic [PW-1:0] x2, y2;

  for (genvar c = 0; c < PW; c++) begin : g_unpack2
    assign x2[c] = latch2_q[offset(NLEVELS, c)];
    if (height(NLEVELS, c) == 2) begin : g_two
      assign y2[c] = latch2_q[offset(NLEVELS, c) + 1];
    end else begin : g_one
      assign y2[c] = 1'b0;
    end
  end

  logic [NPG_G-1:0] g3;   // G of slices 0..6
  logic [NPG_G-1:0] p3;   // P of slices 0..6; slice 0's is not used

  for (genvar i = 0; i < NPG_G; i++) begin : g_pg
    pg_gen u_pg (.x(x2[4*i +: 4]), .y(y2[4*i +: 4]), .p(p3[i]), .g(g3[i]));
  end

  logic [L3_W-1:0] latch3_d, latch3_q;

  assign latch3_d = {p3[NPG_G-1:1], g3, latch2_q};

  lssd_latch #(.W(L3_W)) u_latch3 (
    .normal(normal), .shift(shift), .phi2(phi2),
    .d(latch3_d), .sin(l_in[2]), .q(latch3_q), .sout(l_out[2])
  );

  // ---------------------------------------------------------------- stage 4
  logic [NCARRY:1] c4;
  logic [L4_W-1:0] latch4_d, latch4_q;

  cla_unit u_cla (
    .g(latch3_q[L2_W +: NPG_G]),
    .p(latch3_q[L2_W + NPG_G +: NPG_P]),
    .c(c4)
  );

  assign latch4_d = {c4, latch3_q[L2_W-1:0]};

  lssd_latch #(.W(L4_W)) u_latch4 (
    .normal(normal), .shift(shift), .phi2(phi2),
    .d(latch4_d), .sin(l_in[3]), .q(latch4_q), .sout(l_out[3])
  );

  // ---------------------------------------------------------------- stage 5
  logic [PW-1:0] x5, y5, sum5;
  logic [NBLK-1:0] cin5;

  for (genvar c = 0; c < PW; c++) begin : g_unpack5
    assign x5[c] = latch4_q[offset(NLEVELS, c)];
    if (height(NLEVELS, c) == 2) begin : g_two
      assign y5[c] = latch4_q[offset(NLEVELS, c) + 1];
    end else begin : g_one
      assign y5[c] = 1'b0;
    end
  end

  assign cin5 = {latch4_q[L2_W +: NCARRY], 1'b0};

  for (genvar i = 0; i < NBLK; i++) begin : g_add
    rca4 u_add (.x(x5[4*i +: 4]), .y(y5[4*i +: 4]), .ci(cin5[i]), .s(sum5[4*i +: 4]));
  end

  out_latch #(.W(PW)) u_latch5 (.normal(normal), .phi2(phi2), .d(sum5), .q(p));

endmodule
