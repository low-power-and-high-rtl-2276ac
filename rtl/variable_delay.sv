// variable_delay: trimmable delay line of the PWM encoder and decoder.
//
// In the circuit this is a chain of inverter/capacitor pairs: the inverters'
// drive strength is set by ctrl_inv[2:0] and the capacitors' value by
// ctrl_cap[2:0], and the number of pairs sets the nominal delay. Here the
// chain is a shift register clocked by the time-step clock and the output is
// taken from a tap:
//     delay = NOMINAL - ctrl_inv + ctrl_cap   ticks.
// A stronger inverter makes the line faster, a larger load slower; one tick
// per code step is this design's choice. NOMINAL must be at least 8 so the
// delay never drops below one tick.
// The trim may change at any time; a change acts on edges that have not yet
// left the line, as in the circuit.
module variable_delay
  import lp_bus_pkg::*;
#(
  parameter int unsigned NOMINAL = PWM_W1_TICKS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  vdelay_ctrl_t ctrl,
  input  logic         d,
  output logic         q
);
  localparam int unsigned LEN = NOMINAL + 7;
  localparam int unsigned TW  = $clog2(LEN + 1);

  initial assert (NOMINAL >= 8) else $error("variable_delay: NOMINAL must be >= 8");

  logic [LEN-1:0] sr;
  logic [TW-1:0]  dly;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[LEN-2:0], d};
  end

  // Delay in ticks; sr[dly-1] is the input dly ticks ago.
  always_comb dly = TW'(NOMINAL) - TW'(ctrl.ctrl_inv) + TW'(ctrl.ctrl_cap);
  assign q = sr[dly - 1'b1];
endmodule
