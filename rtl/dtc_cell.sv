// dtc_cell: digital-to-time converter cell, the building block of the
// time-domain encoder and decoder.
//
// A rising edge on tin leaves on tout either at once (din = 0) or DELAY
// ticks later (din = 1). A falling edge on tin always leaves at once.
// Structure, as in the source cell: a slow branch passes (din AND NOT tin)
// through a delay line; the output is tin AND NOT (slow branch). While tin
// is low with din = 1 the slow branch is high; after tin rises it takes
// DELAY ticks for the low to travel through the line and release tout.
// din must be steady from DELAY ticks before a rising tin edge until that
// edge; tin must stay high longer than DELAY for the edge to get through.
// The fast branch's gate delay is taken as zero ticks.
module dtc_cell #(
  parameter int unsigned DELAY = 2
) (
  input  logic clk,     // time-step clock
  input  logic rst_n,
  input  logic din,     // 1: delay the next rising edge
  input  logic tin,     // edge input
  output logic tout     // edge output
);
  logic slow;
  tick_delay #(.DEPTH(DELAY)) u_line (.clk, .rst_n, .d(din & ~tin), .q(slow));
  assign tout = tin & ~slow;
endmodule
