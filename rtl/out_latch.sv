// out_latch: the W-bit output latch that holds the product on the output
// pins for whatever circuit the multiplier drives.
//
// Same master/slave structure as the scannable pipeline latches but without
// the serial path: the product pins already show its contents. The master
// follows d while NORMAL (PHI1 and OP) is high; the slave follows the master
// while PHI2 is high. Because NORMAL rather than PHI1 opens the master, the
// output pins keep the last product while the other latches are being
// scanned (OP low).
//
// The level-sensitive latches are the intended two-phase circuit.
//
// Interface: d[W-1:0], normal, phi2 in; q[W-1:0] out. q changes only while
// PHI2 is high. No reset.
module out_latch #(
  parameter int W = 32
) (
  input  logic         normal,
  input  logic         phi2,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] m;

  always_latch begin
    if (normal) m = d;
  end

  always_latch begin
    if (phi2) q = m;
  end
endmodule
