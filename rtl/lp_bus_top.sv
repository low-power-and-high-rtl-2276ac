// lp_bus_top: the two low-power, high-fanout bus techniques side by side.
//
//  * PWM bus: 2 x LANES data bits over LANES wires. Each wire carries the
//    switching of two bits as one of three pulse widths, with crosstalk
//    pre-correction from the neighbouring wires. No clock travels with the
//    data. Time step 10 ps, bus clock 1 GHz.
//  * TDC bus: TDC_N data bits over one data wire plus one clock/reference
//    wire. The word is coded as the delay of a clock edge, in steps of
//    TDC_K x 50 ps, and recovered by a binary-search time-to-digital
//    converter. Time step 50 ps, bus clock 100 MHz.
// The two share nothing but the reset; each has its own time-step clock and
// its own ports. See pwm_bus and tdc_bus for interface timing.
module lp_bus_top
  import lp_bus_pkg::*;
#(
  parameter int unsigned PWM_LANES = 3,
  parameter int unsigned TDC_BITS  = TDC_N,
  parameter int unsigned TDC_STEP  = TDC_K
) (
  input  logic                   rst_n,
  // PWM bus
  input  logic                   pwm_clk,
  input  logic [2*PWM_LANES-1:0] pwm_d,
  output logic                   pwm_bus_rise,
  output logic [2*PWM_LANES-1:0] pwm_q,
  output logic [PWM_LANES-1:0]   pwm_wire_in,
  output logic [PWM_LANES-1:0]   pwm_wire_out,
  // TDC bus
  input  logic                   tdc_clk,
  input  logic [TDC_BITS-1:0]    tdc_din,
  output logic                   tdc_din_taken,
  output logic                   tdc_bus_clk,
  output logic [TDC_BITS-1:0]    tdc_dout,
  output logic                   tdc_dout_valid
);
  pwm_bus #(.LANES(PWM_LANES)) u_pwm (
    .clk(pwm_clk), .rst_n, .d(pwm_d), .bus_rise(pwm_bus_rise), .q(pwm_q),
    .wire_in(pwm_wire_in), .wire_out(pwm_wire_out));

  tdc_bus #(.N(TDC_BITS), .K(TDC_STEP)) u_tdc (
    .clk(tdc_clk), .rst_n, .din(tdc_din), .din_taken(tdc_din_taken),
    .bus_clk(tdc_bus_clk), .dout(tdc_dout), .dout_valid(tdc_dout_valid));
endmodule
