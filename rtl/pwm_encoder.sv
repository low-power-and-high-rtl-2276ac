// pwm_encoder: encodes the switching of two data bits into one pulse.
//
// A switch of D0 alone sends a pulse of width W1, of D1 alone width W2, of
// both width W3 (W1 < W2 < W3); no switch sends nothing. Information lies in
// the transitions of D0/D1, not in their levels.
//
// How: each bit is compared with a delayed copy of itself. D0 XOR
// (D0 through a variable delay of nominal W1) gives pulse p1; D1 XOR (D1
// through a variable delay of nominal W2) gives p2. When both bits switch a
// third pulse p3, the AND of the two switches delayed by W3-W2, is ORed in
// and extends the pulse to W3. wire_in = p1 | p2 | p3. Every pulse rises at
// the tick the data registers change, so all wires of a bus rise together
// and only the falling edge carries width.
//
// The variable delays take the crosstalk trim ctrl: ctrl_inv shortens and
// ctrl_cap lengthens all three widths by the same number of ticks.
// p1_ext/p2_ext are the same switch flags held for EXT ticks, long enough to
// cover the widest trimmed pulse; the crosstalk logic of this wire and of
// its neighbours reads them.
//
// Taking p1 (not its extended copy) into the AND would make W3 depend on
// the shorter W1 pulse; using the extended flag is this design's choice.
// Timing: wire_in rises combinationally in the tick d0/d1 change.
module pwm_encoder
  import lp_bus_pkg::*;
#(
  parameter int unsigned W1  = PWM_W1_TICKS,
  parameter int unsigned W2  = PWM_W2_TICKS,
  parameter int unsigned W3  = PWM_W3_TICKS,
  parameter int unsigned EXT = PWM_EXT_TICKS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         d0,        // registered data bit 0
  input  logic         d1,        // registered data bit 1
  input  vdelay_ctrl_t ctrl,      // crosstalk pre-correction trim
  output logic         p1_ext,
  output logic         p2_ext,
  output logic         wire_in
);
  logic d0_dly, d1_dly, d0_ext, d1_ext;
  logic p1, p2, p3;

  variable_delay #(.NOMINAL(W1)) u_vd0 (.clk, .rst_n, .ctrl, .d(d0), .q(d0_dly));
  variable_delay #(.NOMINAL(W2)) u_vd1 (.clk, .rst_n, .ctrl, .d(d1), .q(d1_dly));
  tick_delay     #(.DEPTH(EXT))  u_x0  (.clk, .rst_n, .d(d0), .q(d0_ext));
  tick_delay     #(.DEPTH(EXT))  u_x1  (.clk, .rst_n, .d(d1), .q(d1_ext));
  tick_delay     #(.DEPTH(W3 - W2)) u_p3 (.clk, .rst_n, .d(p1_ext & p2), .q(p3));

  assign p1      = d0 ^ d0_dly;
  assign p2      = d1 ^ d1_dly;
  assign p1_ext  = d0 ^ d0_ext;
  assign p2_ext  = d1 ^ d1_ext;
  assign wire_in = p1 | p2 | p3;
endmodule
