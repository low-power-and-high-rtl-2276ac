// bus_clock_gen: time base of a bus. Counts time-step ticks and produces the
// bus clock as a waveform, a one-tick strobe in the tick where it rises and
// one in the tick where it falls. The clock is low for the first half of
// each PERIOD ticks and high for the second, so it leaves reset low and its
// first rising edge, PERIOD/2 ticks after reset, is a clean edge. The
// falling strobe is high in the first tick after reset.
module bus_clock_gen #(
  parameter int unsigned PERIOD = 100
) (
  input  logic clk,
  input  logic rst_n,
  output logic bus_clk,
  output logic rise,
  output logic fall
);
  localparam int unsigned CW = $clog2(PERIOD);
  logic [CW-1:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (cnt == CW'(PERIOD - 1)) cnt <= '0;
    else cnt <= cnt + 1'b1;
  end
  assign bus_clk = (cnt >= CW'(PERIOD / 2));
  assign rise    = (cnt == CW'(PERIOD / 2));
  assign fall    = (cnt == '0);
endmodule
