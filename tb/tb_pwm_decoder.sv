// tb_pwm_decoder: feeds pulses of chosen widths into the decoder between
// bus clock strobes (every 100 ticks) and checks the toggles of Q0/Q1 at
// the next strobe: widths up to 18 ticks toggle Q0 (W1), 19..28 toggle Q1
// (W2), 29 and more toggle both (W3); no pulse toggles nothing. Widths at
// the class edges and the nominal 13/23/33 are all tried.
`timescale 1ns/1ps
module tb_pwm_decoder;
  logic clk = 1'b0, rst_n = 1'b0, wire_out = 1'b0, bus_rise = 1'b0;
  logic q0, q1;
  int checks = 0, failures = 0;

  pwm_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One bus period: strobe, wait START ticks, pulse of WIDTH ticks, rest.
  task automatic period(input int width);
    logic e0, e1;
    e0 = q0 ^ (width > 0 && (width <= 18 || width >= 29));
    e1 = q1 ^ (width >= 19);
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      bus_rise = (t == 0);
      wire_out = (t >= 50) && (t < 50 + width);
    end
    @(negedge clk);
    bus_rise = 1'b1;           // outputs update at this strobe
    @(negedge clk);
    bus_rise = 1'b0;
    checks++;
    if (q0 !== e0 || q1 !== e1) begin
      failures++;
      $display("FAIL width=%0d q=%b%b want=%b%b", width, q1, q0, e1, e0);
    end
    repeat (5) @(negedge clk);
  endtask

  initial begin
    automatic int widths[] = '{13, 23, 33, 0, 1, 18, 19, 28, 29, 39, 7, 17, 27};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    foreach (widths[i]) period(widths[i]);
    for (int n = 0; n < 40; n++) period($urandom_range(0, 40));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
