// tb_bus_clock_gen: runs the default 100-tick generator and a 200-tick one
// for several periods and checks, tick by tick, the clock level (low in the
// first half of each period, high in the second) and that the rise and fall
// strobes sit exactly on its edges.
`timescale 1ns/1ps
module tb_bus_clock_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bc_a, r_a, f_a, bc_b, r_b, f_b;
  int checks = 0, failures = 0;

  bus_clock_gen                u_a (.clk, .rst_n, .bus_clk(bc_a), .rise(r_a), .fall(f_a));
  bus_clock_gen #(.PERIOD(200)) u_b (.clk, .rst_n, .bus_clk(bc_b), .rise(r_b), .fall(f_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int t, input int period, input logic bc, input logic r, input logic f);
    automatic int ph = t % period;
    checks++;
    if (bc != (ph >= period / 2) || r != (ph == period / 2) || f != (ph == 0)) begin
      failures++;
      $display("FAIL period %0d tick %0d: clk=%b rise=%b fall=%b", period, t, bc, r, f);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      #1;
      check(t, 100, bc_a, r_a, f_a);
      check(t, 200, bc_b, r_b, f_b);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
