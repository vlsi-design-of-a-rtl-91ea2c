// latch_ctrl: forms the two load strobes of the scannable pipeline latches
// from clock phase PHI1 and the mode pin OP.
//
//   NORMAL = PHI1 and OP       (parallel load from the datapath)
//   SHIFT  = PHI1 and not OP   (serial load from the neighbouring cell)
//
// In the chip each is a NAND gate followed by an inverter, and OP is
// inverted for the SHIFT gate. Exactly one strobe pulses during each PHI1
// high time and neither pulses while PHI1 is low.
//
// Interface: phi1, op in; normal, shift out. Combinational.
module latch_ctrl (
  input  logic phi1,
  input  logic op,
  output logic normal,
  output logic shift
);
  always_comb begin
    normal = phi1 & op;
    shift  = phi1 & ~op;
  end
endmodule
