// repeated_wire: behavioural model of one long on-chip wire broken into
// STAGES segments by inverting repeaters, as a lumped delay.
//
// Not logic that would be built: it stands in for the physical line so the
// time-domain bus can be simulated. Every edge, rising or falling, leaves
// the wire DELAY ticks after it entered; an odd number of inverting
// repeaters would invert the signal, an even number (30, the default)
// does not. Crosstalk is not modelled here: the clock and data wires of the
// time-domain bus are assumed to be equally delayed.
module repeated_wire
  import lp_bus_pkg::*;
#(
  parameter int unsigned STAGES = 30,
  parameter int unsigned DELAY  = TDC_WIRE_TICKS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wire_in,
  output logic wire_out
);
  // The line's state, one bit per tick of flight; DELAY + 1 bits so that
  // DELAY = 1 needs no special case.
  logic [DELAY:0] seg;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) seg <= '0;
    else        seg <= {seg[DELAY-1:0], wire_in};
  end
  assign wire_out = seg[DELAY-1] ^ (STAGES % 2 == 1);
endmodule
