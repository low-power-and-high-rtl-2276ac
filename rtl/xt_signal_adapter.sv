// xt_signal_adapter: turns the crosstalk flags of one wire into the trim
// codes of the encoder's variable delays (pre-correction).
//
// Each neighbour that will lengthen the pulse (cx1) asks for a pulse
// XT_TRIM ticks shorter, each neighbour that will shorten it (cx2) for one
// XT_TRIM ticks longer. The net correction is applied as ctrl_inv (faster
// line, shorter pulse) or ctrl_cap (slower line, longer pulse); the other
// code stays 0. XT_TRIM is the calibrated per-aggressor edge shift; it is
// set equal to the wire model's crosstalk shift. Combinational.
module xt_signal_adapter
  import lp_bus_pkg::*;
#(
  parameter int unsigned XT_TRIM = PWM_XT_TICKS
) (
  input  logic         cx1_lo,
  input  logic         cx2_lo,
  input  logic         cx1_hi,
  input  logic         cx2_hi,
  output vdelay_ctrl_t ctrl
);
  initial assert (2 * XT_TRIM <= 7) else $error("xt_signal_adapter: XT_TRIM too large for 3-bit codes");

  logic signed [3:0] net;   // aggressors shortening minus lengthening
  always_comb begin
    net = 4'(signed'({1'b0, cx2_lo})) + 4'(signed'({1'b0, cx2_hi}))
        - 4'(signed'({1'b0, cx1_lo})) - 4'(signed'({1'b0, cx1_hi}));
    ctrl = '0;
    if (net > 0)      ctrl.ctrl_cap = 3'(int'(net) * int'(XT_TRIM));
    else if (net < 0) ctrl.ctrl_inv = 3'(-int'(net) * int'(XT_TRIM));
  end
endmodule
