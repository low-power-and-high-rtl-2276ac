// tb_pwm_reset_gen: toggles Q0/Q1 in random patterns and checks that R0 and
// R1 are high exactly in the tick after a change of either output.
`timescale 1ns/1ps
module tb_pwm_reset_gen;
  logic clk = 1'b0, rst_n = 1'b0, q0 = 1'b0, q1 = 1'b0, r0, r1;
  logic p0 = 1'b0, p1 = 1'b0;
  int checks = 0, failures = 0;

  pwm_reset_gen dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(posedge clk);
      p0 = q0; p1 = q1;          // values the generator just registered
      #1;
      q0 = ($urandom_range(0, 2) == 0) ? ~q0 : q0;
      q1 = ($urandom_range(0, 2) == 0) ? ~q1 : q1;
      #1;
      checks++;
      if (r0 !== ((q0 != p0) || (q1 != p1)) || r1 !== r0) begin
        failures++;
        $display("FAIL n=%0d q=%b%b prev=%b%b r=%b%b", n, q1, q0, p1, p0, r1, r0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
