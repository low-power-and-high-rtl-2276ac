// lp_bus_pkg: constants and types shared by the pulse-width-modulated (PWM)
// bus and the time-domain (TDC) bus.
//
// Both buses carry information in the timing of edges rather than in
// voltage levels. This RTL represents time as whole "ticks" of a fast
// time-step clock: every delay element of the circuits is a number of
// ticks. The PWM side uses a 10 ps tick, so its three nominal pulse widths
// of 130, 230 and 330 ps are 13, 23 and 33 ticks and its 1 GHz bus clock
// is 100 ticks. The TDC side uses the 50 ps unit of its LSB time step
// (LSB step = K x 50 ps), so K = 2 gives the 100 ps step.
// The pulse widths, bus clock and LSB step follow the source design; the
// tick granularity, wire delay and crosstalk amounts are this design's
// own choices.
package lp_bus_pkg;

  // ---------------- PWM bus (10 ps ticks) ----------------
  localparam int unsigned PWM_W1_TICKS     = 13;   // short pulse, 130 ps
  localparam int unsigned PWM_W2_TICKS     = 23;   // medium pulse, 230 ps
  localparam int unsigned PWM_W3_TICKS     = 33;   // wide pulse, 330 ps
  localparam int unsigned PWM_PERIOD_TICKS = 100;  // 1 GHz bus clock
  localparam int unsigned PWM_WIRE_TICKS   = 50;   // wire delay, 500 ps (assumed)
  localparam int unsigned PWM_XT_TICKS     = 3;    // edge shift per aggressor, 30 ps (assumed)
  // Extended pulse used by the crosstalk logic: covers the widest trimmed pulse.
  localparam int unsigned PWM_EXT_TICKS    = 40;
  // Decoder thresholds: half-way between neighbouring widths.
  localparam int unsigned PWM_TH1_TICKS    = (PWM_W1_TICKS + PWM_W2_TICKS) / 2;  // 18
  localparam int unsigned PWM_TH2_TICKS    = (PWM_W2_TICKS + PWM_W3_TICKS) / 2;  // 28

  // Which input bits of a wire switched, i.e. which width a pulse carries.
  typedef enum logic [1:0] {
    PW_NONE = 2'b00,   // no switch: wire stays low
    PW_W1   = 2'b01,   // D0 switched
    PW_W2   = 2'b10,   // D1 switched
    PW_W3   = 2'b11    // both switched
  } pw_class_e;

  // Trim of a variable delay: ctrl_inv speeds it up, ctrl_cap slows it down,
  // one tick per code step.
  typedef struct packed {
    logic [2:0] ctrl_inv;
    logic [2:0] ctrl_cap;
  } vdelay_ctrl_t;

  // ---------------- TDC bus (50 ps ticks) ----------------
  localparam int unsigned TDC_N            = 5;    // bus width in bits
  localparam int unsigned TDC_K            = 2;    // LSB step = K x 50 ps = 100 ps
  localparam int unsigned TDC_PERIOD_TICKS = 200;  // 100 MHz bus clock
  localparam int unsigned TDC_WIRE_TICKS   = 10;   // wire delay, 500 ps (assumed)

endpackage
