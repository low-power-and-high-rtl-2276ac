// tick_delay: fixed delay element. The output repeats the input DEPTH ticks
// later; DEPTH = 0 is a plain wire. It stands for a chain of inverters whose
// only job is delay (an inverter chain, a wait chain, a wire segment).
// A shift register clocked by the time-step clock, cleared by rst_n.
module tick_delay #(
  parameter int unsigned DEPTH = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else if (DEPTH == 1) begin : g_ff
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) q <= 1'b0;
      else        q <= d;
    end
  end else begin : g_sr
    logic [DEPTH-1:0] sr;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sr <= '0;
      else        sr <= {sr[DEPTH-2:0], d};
    end
    assign q = sr[DEPTH-1];
  end
endmodule
