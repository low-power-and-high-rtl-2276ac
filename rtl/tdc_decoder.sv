// tdc_decoder: N-bit binary-search time-to-digital converter.
//
// Inputs are two edges that crossed the wire side by side: td, whose rising
// edge carries the value D (D x K ticks after the bus clock), and ref_in,
// the reference edge encoded from the mid-scale value 2^(N-1) - 1. ref_in
// is first delayed by half an LSB step (HALF ticks) so that the two edges
// never coincide.
//
// Stage N-1 samples NOT td on the rising edge of the reference: 1 if the
// data edge comes later, which is bit N-1 of D. Then both edges pass an
// equal wait delay and a pair of dtc_cells of 2^(i-1) x K ticks: if the bit
// was 1 the reference edge is delayed, otherwise the data edge, which
// halves the remaining interval. Each following stage samples the same
// way, so each stage settles one bit, MSB first. Bits change as their
// stage samples; dout_valid pulses for one tick after the LSB stage has
// sampled, when dout holds the whole word.
//
// Wait delays: a stage's register changes the dtc_cells' din input, which
// must be steady for the cell's delay before the edge arrives. This design
// sizes the wait after stage i as K x 2^(i-1) + K x 2^i + 2 ticks (cell
// delay plus the largest data/reference gap plus margin); the source
// uses inverter chains of fixed length for this. HALF = K/2 needs K >= 2.
module tdc_decoder
  import lp_bus_pkg::*;
#(
  parameter int unsigned N = TDC_N,
  parameter int unsigned K = TDC_K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         td,          // time-domain data edge
  input  logic         ref_in,      // reference edge
  output logic [N-1:0] dout,
  output logic         dout_valid
);
  localparam int unsigned HALF = K / 2;

  initial assert (K >= 2 && N >= 2) else $error("tdc_decoder: needs K >= 2 and N >= 2");

  logic [N-1:0] in_s, clk_s, clk_s_d;
  logic         ref_hold;

  tick_delay #(.DEPTH(HALF)) u_half (.clk, .rst_n, .d(ref_in), .q(ref_hold));

  assign in_s[N-1]  = td;
  assign clk_s[N-1] = ref_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_s_d <= '0;
      dout    <= '0;
    end else begin
      clk_s_d <= clk_s;
      for (int i = 0; i < N; i++)
        if (clk_s[i] && !clk_s_d[i]) dout[i] <= ~in_s[i];
    end
  end

  for (genvar i = N - 1; i >= 1; i--) begin : g_stage
    localparam int unsigned CELL = (2 ** (i - 1)) * K;
    localparam int unsigned WAIT = CELL + (2 ** i) * K + 2;
    logic in_w, clk_w;
    tick_delay #(.DEPTH(WAIT)) u_wait_in  (.clk, .rst_n, .d(in_s[i]),  .q(in_w));
    tick_delay #(.DEPTH(WAIT)) u_wait_clk (.clk, .rst_n, .d(clk_s[i]), .q(clk_w));
    dtc_cell #(.DELAY(CELL)) u_dtc_in  (.clk, .rst_n, .din(~dout[i]), .tin(in_w),  .tout(in_s[i-1]));
    dtc_cell #(.DELAY(CELL)) u_dtc_clk (.clk, .rst_n, .din(dout[i]),  .tin(clk_w), .tout(clk_s[i-1]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout_valid <= 1'b0;
    else        dout_valid <= clk_s[0] && !clk_s_d[0];
  end
endmodule
