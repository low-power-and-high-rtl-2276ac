// pwm_reset_gen: reset generator of the PWM decoder.
//
// It watches the decoder outputs Q0 and Q1. In the tick after either output
// has toggled, it raises R0 (clears the "pulse seen" latch) and R1 (clears
// the two "pulse outlasted a threshold" latches), so the latches are empty
// before the next pulse arrives. R0 and R1 are one tick long. System reset
// clears its history. The source design only names this circuit; deriving
// the clear from an output change is this design's choice.
module pwm_reset_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic q0,
  input  logic q1,
  output logic r0,
  output logic r1
);
  logic q0_d, q1_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q0_d <= 1'b0;
      q1_d <= 1'b0;
    end else begin
      q0_d <= q0;
      q1_d <= q1;
    end
  end
  assign r0 = (q0 != q0_d) || (q1 != q1_d);
  assign r1 = r0;
endmodule
