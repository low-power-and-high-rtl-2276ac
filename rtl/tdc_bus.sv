// tdc_bus: time-domain bus, N bits over two wires.
//
// The bus clock (PERIOD ticks, high for the first half) drives two
// encoders: one codes the data word as the delay of its rising edge, the
// other codes the fixed mid-scale word 0111..1 and serves as the timing
// reference. Both edges cross equal repeated wires side by side; at the far
// end the binary-search decoder compares them and recovers the word.
//
// Interface: din is loaded into the input register on the bus clock's
// falling edge (din_taken strobes in that tick), so it is steady for half a
// period before the next rising edge starts the conversion; the encoder
// needs 2^(N-1) x K ticks. dout/dout_valid are the decoder's outputs: the
// word loaded at a falling edge appears with dout_valid within the
// following clock period, before the next rising edge. Loading on the
// falling edge is this design's choice.
module tdc_bus
  import lp_bus_pkg::*;
#(
  parameter int unsigned N      = TDC_N,
  parameter int unsigned K      = TDC_K,
  parameter int unsigned PERIOD = TDC_PERIOD_TICKS,
  parameter int unsigned WIRE   = TDC_WIRE_TICKS
) (
  input  logic         clk,          // time-step clock (50 ps)
  input  logic         rst_n,
  input  logic [N-1:0] din,
  output logic         din_taken,
  output logic         bus_clk,
  output logic [N-1:0] dout,
  output logic         dout_valid
);
  localparam logic [N-1:0] REF_WORD = {1'b0, {(N-1){1'b1}}};

  logic         rise_unused;
  logic [N-1:0] din_q;
  logic         td_in, ref_tx, td_out, ref_out;

  bus_clock_gen #(.PERIOD(PERIOD)) u_clk (
    .clk, .rst_n, .bus_clk, .rise(rise_unused), .fall(din_taken));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         din_q <= '0;
    else if (din_taken) din_q <= din;
  end

  dtc_encoder #(.N(N), .K(K)) u_enc_data (.clk, .rst_n, .tin(bus_clk), .din(din_q),    .tout(td_in));
  dtc_encoder #(.N(N), .K(K)) u_enc_ref  (.clk, .rst_n, .tin(bus_clk), .din(REF_WORD), .tout(ref_tx));

  repeated_wire #(.DELAY(WIRE)) u_wire_td  (.clk, .rst_n, .wire_in(td_in),  .wire_out(td_out));
  repeated_wire #(.DELAY(WIRE)) u_wire_ref (.clk, .rst_n, .wire_in(ref_tx), .wire_out(ref_out));

  tdc_decoder #(.N(N), .K(K)) u_dec (.clk, .rst_n, .td(td_out), .ref_in(ref_out), .dout, .dout_valid);

  // The longest code must fit in the clock's high phase.
  initial assert ((2 ** N - 1) * K < PERIOD / 2) else $error("tdc_bus: PERIOD too short for N and K");
endmodule
