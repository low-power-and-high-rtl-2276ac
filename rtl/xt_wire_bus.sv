// xt_wire_bus: behavioural model of LANES parallel repeated wires with
// capacitive coupling between neighbours, for pulse traffic.
//
// This is not logic that would be built: it stands in for the long on-chip
// wires (a chain of inverting repeaters with distributed RC segments and
// coupling capacitors to the left and right neighbour) so that the bus
// around it can be simulated. It keeps the wires' ports: one input and one
// output per lane.
//
// Behaviour, in ticks of the time-step clock:
//  * a rising edge leaves the wire DELAY ticks after it entered;
//  * the falling edge is shifted by crosstalk. For each direct neighbour
//    that started a pulse in the same tick: if its pulse falls more than
//    WINDOW ticks after this lane's (a wider pulse) the fall comes XT ticks
//    later; if it falls more than WINDOW ticks earlier (a narrower pulse)
//    the fall comes XT ticks earlier. Neighbours falling within WINDOW
//    ticks switch together with this lane and, like idle ones, leave it
//    alone. Lanes 0 and LANES-1 see one neighbour; the wires beyond the
//    bus are taken as quiet.
// One pulse per lane may be in flight, and all pulses must end before
// their rising edges have crossed the wire (width < DELAY - 2 XT); both
// hold for the PWM bus, where pulses are at most 39 of 100 ticks. The even
// number of inverting repeaters makes the wire non-inverting.
// The window keeps same-width pulses, whose pre-corrections differ by at
// most 2 XT = 6 ticks, from counting as wider or narrower; pulses of
// different nominal widths differ by at least 10 ticks after correction.
module xt_wire_bus
  import lp_bus_pkg::*;
#(
  parameter int unsigned LANES = 3,
  parameter int unsigned DELAY = PWM_WIRE_TICKS,
  parameter int unsigned XT     = PWM_XT_TICKS,
  parameter int unsigned WINDOW = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LANES-1:0] wire_in,
  output logic [LANES-1:0] wire_out
);
  localparam int unsigned CW = $clog2(2 * DELAY + 1);

  logic [LANES-1:0] in_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_d <= '0;
    else        in_d <= wire_in;
  end

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    logic          nb_in_lo, nb_in_hi, nb_fall_lo, nb_fall_hi;
    logic          busy, hi_phase;
    logic          act_lo, act_hi;
    logic [CW-1:0] cnt, w_own, w_lo, w_hi;
    logic          rise, fall;
    int            adj, out_end;

    if (i > 0) begin : g_lo
      assign nb_in_lo   = wire_in[i-1];
      assign nb_fall_lo = in_d[i-1] & ~wire_in[i-1];
    end else begin : g_lo_none
      assign nb_in_lo   = 1'b0;
      assign nb_fall_lo = 1'b0;
    end
    if (i < LANES - 1) begin : g_hi
      assign nb_in_hi   = wire_in[i+1];
      assign nb_fall_hi = in_d[i+1] & ~wire_in[i+1];
    end else begin : g_hi_none
      assign nb_in_hi   = 1'b0;
      assign nb_fall_hi = 1'b0;
    end

    assign rise = wire_in[i] & ~in_d[i];
    assign fall = ~wire_in[i] & in_d[i];

    // cnt counts ticks since this lane's rising edge; the widths of this
    // pulse and of the neighbours' pulses that started with it are recorded
    // as their falling edges go by.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        busy <= 1'b0; hi_phase <= 1'b0; cnt <= '0;
        w_own <= '0; w_lo <= '0; w_hi <= '0;
        act_lo <= 1'b0; act_hi <= 1'b0;
      end else if (rise) begin
        busy     <= 1'b1;
        hi_phase <= 1'b1;
        cnt      <= CW'(1);
        w_own    <= '0;
        w_lo     <= '0;
        w_hi     <= '0;
        act_lo   <= nb_in_lo;
        act_hi   <= nb_in_hi;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (hi_phase && fall) begin
          w_own    <= cnt;
          hi_phase <= 1'b0;
        end
        if (act_lo && nb_fall_lo && w_lo == '0) w_lo <= cnt;
        if (act_hi && nb_fall_hi && w_hi == '0) w_hi <= cnt;
        if (!hi_phase && int'(cnt) + 1 >= out_end) busy <= 1'b0;
      end
    end

    // Falling-edge shift from the neighbours that fall clearly later or
    // clearly earlier than this lane.
    always_comb begin
      adj = 0;
      if (act_lo && int'(w_lo) > int'(w_own) + int'(WINDOW)) adj += int'(XT);
      if (act_lo && int'(w_lo) + int'(WINDOW) < int'(w_own)) adj -= int'(XT);
      if (act_hi && int'(w_hi) > int'(w_own) + int'(WINDOW)) adj += int'(XT);
      if (act_hi && int'(w_hi) + int'(WINDOW) < int'(w_own)) adj -= int'(XT);
      out_end = int'(DELAY) + int'(w_own) + adj;
    end

    assign wire_out[i] = busy && !hi_phase && (int'(cnt) >= int'(DELAY)) && (int'(cnt) < out_end);

    // Every pulse, its own and its neighbours', must have ended before it
    // reaches the far end of the wire.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
      end else if (busy && int'(cnt) >= int'(DELAY) - int'(2 * XT)) begin
        a_width: assert (!hi_phase && !(act_lo && nb_in_lo) && !(act_hi && nb_in_hi));
      end
    end
  end
endmodule
