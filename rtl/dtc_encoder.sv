// dtc_encoder: N-bit time-domain encoder (digital-to-time converter).
//
// The rising edge of the bus clock tin runs through a chain of N dtc_cells,
// most significant bit first. Cell j delays the edge by 2^j x K ticks when
// din[j] is 1, so the edge leaves tout din x K ticks after it entered:
// the value is coded as the edge's arrival time, one LSB step (K ticks,
// K x 50 ps) per count. Falling edges pass without delay, so the encoded
// pulse narrows as the value grows; the bus clock high time must exceed
// (2^N - 1) x K ticks.
//
// din must be steady from 2^(N-1) x K ticks before the tin rising edge
// until the edge has left the chain (the encoder's setup time); the bus
// loads it on the opposite clock edge. The same module, with din tied to
// the mid-scale value, produces the reference edge.
module dtc_encoder
  import lp_bus_pkg::*;
#(
  parameter int unsigned N = TDC_N,
  parameter int unsigned K = TDC_K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tin,
  input  logic [N-1:0] din,
  output logic         tout
);
  logic [N:0] edge_chain;     // edge_chain[N] = tin, edge_chain[0] = tout
  assign edge_chain[N] = tin;
  for (genvar j = N - 1; j >= 0; j--) begin : g_cell
    dtc_cell #(.DELAY((2 ** j) * K)) u_dtc (
      .clk, .rst_n, .din(din[j]), .tin(edge_chain[j+1]), .tout(edge_chain[j]));
  end
  assign tout = edge_chain[0];
endmodule
