// lssd_latch: a W-bit pipeline latch that can be loaded in parallel from
// the datapath or shifted serially, for level sensitive scan testing.
//
// Each bit is a master/slave pair clocked by a non-overlapping two-phase
// clock. The master (the first inverter's stored gate charge in the chip)
// is transparent while NORMAL is high, taking the datapath bit d[i], or
// while SHIFT is high, taking the slave output of its left neighbour
// q[i+1]; the leftmost cell (bit W-1) takes the serial input sin. The slave
// is transparent while PHI2 is high and drives q. NORMAL and SHIFT are PHI1
// gated by OP (see latch_ctrl), so one full PHI1-PHI2 cycle either captures
// d or moves the whole word one place toward bit 0. sout is bit 0, so a bit
// entering at sin leaves at sout W cycles later.
//
// The level-sensitive latches are the intended circuit (a two-phase latch
// design with no edge-triggered storage); they are not inferred by accident.
// Lint tools see the shift path q[i+1] -> m[i] -> q[i] as a combinational
// loop through latches. It is never open end to end: the master opens only
// in PHI1 and the slave only in PHI2, and the two phases never overlap.
//
// Interface: d[W-1:0], sin, normal, shift, phi2 in; q[W-1:0], sout out.
// Timing: d must be stable while NORMAL is high; q changes only while PHI2
// is high. There is no reset: the contents are whatever was last loaded.
module lssd_latch #(
  parameter int W = 8
) (
  input  logic         normal,
  input  logic         shift,
  input  logic         phi2,
  input  logic [W-1:0] d,
  input  logic         sin,
  output logic [W-1:0] q,
  output logic         sout
);
  logic [W-1:0] m;          // master (first inverter) nodes
  logic [W-1:0] shift_in;   // serial input of every cell

  assign shift_in = {sin, q[W-1:1]};

  always_latch begin
    if (normal)      m = d;
    else if (shift)  m = shift_in;
  end

  always_latch begin
    if (phi2) q = m;
  end

  assign sout = q[0];

  // The two strobes come from one PHI1 pulse through complementary OP
  // gating, so they are never high together, and never high with PHI2.
  always_comb begin
    assert (!(normal && shift)) else $error("NORMAL and SHIFT high together");
  end
endmodule
