// crosstalk_aware: decides, for one wire of the PWM bus, how its two
// neighbours will disturb its next pulse.
//
// All encoders start their pulses on the same bus clock edge and differ only
// in where the pulse falls, so only the falling edge of a wire is exposed to
// crosstalk. A neighbour whose pulse is wider is still switching high while
// this wire falls and stretches it; a neighbour with a narrower pulse falls
// first and shortens it; an idle neighbour, or one sending the same width,
// does nothing.
//
// Inputs are the extended pulse flags of this wire (p1_ext, p2_ext) and of
// the neighbours n-1 and n+1 (p1/p2 ext). Their pair {p2,p1} is the width
// class: 01 = W1, 10 = W2, 11 = W3, 00 = idle. Outputs per neighbour:
//   cx1 = neighbour pulse is wider   (this pulse will be lengthened)
//   cx2 = neighbour pulse is narrower (this pulse will be shortened)
// Combinational; the flags hold as long as the extended pulses do.
// The meaning given to cx1/cx2 is this design's reading of the circuit.
module crosstalk_aware
  import lp_bus_pkg::*;
(
  input  logic p1_ext,     // this wire: D0 switched
  input  logic p2_ext,     // this wire: D1 switched
  input  logic p1_lo,      // neighbour n-1
  input  logic p2_lo,
  input  logic p1_hi,      // neighbour n+1
  input  logic p2_hi,
  output logic cx1_lo,     // n-1 wider
  output logic cx2_lo,     // n-1 narrower
  output logic cx1_hi,     // n+1 wider
  output logic cx2_hi      // n+1 narrower
);
  pw_class_e own, lo, hi;
  always_comb begin
    own = pw_class_e'({p2_ext, p1_ext});
    lo  = pw_class_e'({p2_lo, p1_lo});
    hi  = pw_class_e'({p2_hi, p1_hi});
    // A neighbour only matters when both wires carry a pulse.
    cx1_lo = (own != PW_NONE) && (lo != PW_NONE) && (lo > own);
    cx2_lo = (own != PW_NONE) && (lo != PW_NONE) && (lo < own);
    cx1_hi = (own != PW_NONE) && (hi != PW_NONE) && (hi > own);
    cx2_hi = (own != PW_NONE) && (hi != PW_NONE) && (hi < own);
  end
endmodule
