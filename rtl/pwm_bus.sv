// pwm_bus: crosstalk-aware pulse-width-modulated bus, 2 data bits per wire.
//
// LANES wires carry 2 x LANES bits. On each bus clock edge the data
// registers load d; per wire, the encoder turns the switching of its two
// bits into one pulse (W1, W2 or W3 wide, or none). All pulses start on the
// same tick, so a wire's falling edge is pushed later by a neighbour with a
// wider pulse and earlier by one with a narrower pulse. The crosstalk logic
// of each wire compares its width with its neighbours' before sending, and
// the adapter trims the encoder's delays to pre-shorten or pre-lengthen the
// pulse by the same amount, so it arrives with its nominal width. The
// decoders measure the widths and toggle the output registers q on the next
// bus clock edge.
//
// Lane i carries d[2i] (D0) and d[2i+1] (D1). q equals d delayed by one bus
// clock (PERIOD ticks): d loaded at edge k appears on q after edge k+1.
// Both registers reset to 0. wire_in/wire_out are brought out to observe the
// pulses. The wires themselves are a behavioural model (xt_wire_bus).
module pwm_bus
  import lp_bus_pkg::*;
#(
  parameter int unsigned LANES  = 3,
  parameter int unsigned PERIOD = PWM_PERIOD_TICKS
) (
  input  logic               clk,         // time-step clock (10 ps)
  input  logic               rst_n,
  input  logic [2*LANES-1:0] d,
  output logic               bus_rise,    // tick of the bus clock edge
  output logic [2*LANES-1:0] q,
  output logic [LANES-1:0]   wire_in,
  output logic [LANES-1:0]   wire_out
);
  logic               bus_clk_unused, fall_unused;
  logic [2*LANES-1:0] d_q;
  logic [LANES-1:0]   p1_ext, p2_ext;

  bus_clock_gen #(.PERIOD(PERIOD)) u_clk (
    .clk, .rst_n, .bus_clk(bus_clk_unused), .rise(bus_rise), .fall(fall_unused));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        d_q <= '0;
    else if (bus_rise) d_q <= d;
  end

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    logic         cx1_lo, cx2_lo, cx1_hi, cx2_hi;
    logic         p1_lo, p2_lo, p1_hi, p2_hi;
    vdelay_ctrl_t ctrl;

    if (i > 0) begin : g_lo
      assign p1_lo = p1_ext[i-1];
      assign p2_lo = p2_ext[i-1];
    end else begin : g_lo_none
      assign p1_lo = 1'b0;
      assign p2_lo = 1'b0;
    end
    if (i < LANES - 1) begin : g_hi
      assign p1_hi = p1_ext[i+1];
      assign p2_hi = p2_ext[i+1];
    end else begin : g_hi_none
      assign p1_hi = 1'b0;
      assign p2_hi = 1'b0;
    end

    crosstalk_aware u_ca (
      .p1_ext(p1_ext[i]), .p2_ext(p2_ext[i]),
      .p1_lo, .p2_lo, .p1_hi, .p2_hi,
      .cx1_lo, .cx2_lo, .cx1_hi, .cx2_hi);

    xt_signal_adapter u_adapt (.cx1_lo, .cx2_lo, .cx1_hi, .cx2_hi, .ctrl);

    pwm_encoder u_enc (
      .clk, .rst_n, .d0(d_q[2*i]), .d1(d_q[2*i+1]), .ctrl,
      .p1_ext(p1_ext[i]), .p2_ext(p2_ext[i]), .wire_in(wire_in[i]));

    pwm_decoder u_dec (
      .clk, .rst_n, .wire_out(wire_out[i]), .bus_rise,
      .q0(q[2*i]), .q1(q[2*i+1]));
  end

  xt_wire_bus #(.LANES(LANES)) u_wires (.clk, .rst_n, .wire_in, .wire_out);
endmodule
