// pwm_decoder: turns the width of an incoming pulse back into two toggles.
//
// The received pulse passes two variable delays in series. Three latches
// record, for the current pulse: A, a pulse was seen; B, the pulse was still
// high when its copy after the first delay (TH1 ticks) arrived; C, it was
// still high when its copy after both delays (TH2 ticks) arrived. So a pulse
// of up to TH1 ticks is W1, up to TH2 ticks W2, longer W3, and
//     toggle_bit0 = (A & ~B) | C      toggle_bit1 = B.
// On each bus clock edge (strobe bus_rise) the output registers Q0/Q1 invert
// where their toggle bit is set; the reset generator then clears the
// latches. Q follows the encoder's data one bus clock later and starts at 0
// after reset, matching data registers that also reset to 0.
//
// The thresholds lie half-way between the nominal widths (18 and 28 ticks
// for 13/23/33), a choice of this design; the source only says the delays
// correspond to W1 and W2. The decoder's own delays are untrimmed.
module pwm_decoder
  import lp_bus_pkg::*;
#(
  parameter int unsigned TH1 = PWM_TH1_TICKS,
  parameter int unsigned TH2 = PWM_TH2_TICKS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wire_out,   // pulse from the wire
  input  logic bus_rise,   // one-tick strobe at each bus clock rising edge
  output logic q0,
  output logic q1
);
  logic dl1, dl2;
  logic lat_a, lat_b, lat_c;
  logic r0, r1;
  logic toggle_bit0, toggle_bit1;

  variable_delay #(.NOMINAL(TH1))       u_vd1 (.clk, .rst_n, .ctrl('0), .d(wire_out), .q(dl1));
  variable_delay #(.NOMINAL(TH2 - TH1)) u_vd2 (.clk, .rst_n, .ctrl('0), .d(dl1),      .q(dl2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lat_a <= 1'b0;
      lat_b <= 1'b0;
      lat_c <= 1'b0;
    end else begin
      lat_a <= r0 ? 1'b0 : (lat_a | wire_out);
      lat_b <= r1 ? 1'b0 : (lat_b | (wire_out & dl1));
      lat_c <= r1 ? 1'b0 : (lat_c | (wire_out & dl2));
    end
  end

  assign toggle_bit0 = (lat_a & ~lat_b) | lat_c;
  assign toggle_bit1 = lat_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q0 <= 1'b0;
      q1 <= 1'b0;
    end else if (bus_rise) begin
      q0 <= q0 ^ toggle_bit0;
      q1 <= q1 ^ toggle_bit1;
    end
  end

  pwm_reset_gen u_rst (.clk, .rst_n, .q0, .q1, .r0, .r1);

  // Checks, active outside reset: a longer-threshold latch is never set
  // without the shorter one, and no pulse is still arriving when the
  // outputs are updated.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
    end else begin
      a_latch_order: assert (!(lat_c && !lat_b) && !(lat_b && !lat_a));
      a_no_pulse_at_edge: assert (!(bus_rise && wire_out));
    end
  end
endmodule
