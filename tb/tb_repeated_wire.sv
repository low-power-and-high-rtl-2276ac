// tb_repeated_wire: drives a random waveform into the wire model and checks
// that the output is the input exactly DELAY ticks later, for an even
// repeater count (non-inverting) and an odd one (inverting).
`timescale 1ns/1ps
module tb_repeated_wire;
  localparam int unsigned DELAY = 10;
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0, q_even, q_odd;
  logic hist [0:DELAY];
  int checks = 0, failures = 0;

  repeated_wire #(.STAGES(30), .DELAY(DELAY)) dut_even (.clk, .rst_n, .wire_in(din), .wire_out(q_even));
  repeated_wire #(.STAGES(3),  .DELAY(DELAY)) dut_odd  (.clk, .rst_n, .wire_in(din), .wire_out(q_odd));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= DELAY; i++) hist[i] = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      if (n > DELAY + 1) begin
        checks++;
        if (q_even !== hist[DELAY - 1] || q_odd !== ~hist[DELAY - 1]) begin
          failures++;
          $display("FAIL n=%0d even=%b odd=%b want=%b", n, q_even, q_odd, hist[DELAY - 1]);
        end
      end
      for (int i = DELAY; i > 0; i--) hist[i] = hist[i-1];
      din = ($urandom_range(0, 3) == 0) ? ~din : din;
      hist[0] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
