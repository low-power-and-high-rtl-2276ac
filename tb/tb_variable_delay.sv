// tb_variable_delay: checks that the trimmable delay line delays rising and
// falling edges by NOMINAL - ctrl_inv + ctrl_cap ticks for a set of trims,
// including both extremes, with the trim applied before each edge.
`timescale 1ns/1ps
module tb_variable_delay;
  import lp_bus_pkg::*;
  localparam int unsigned NOM = 13;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0, q;
  vdelay_ctrl_t ctrl = '0;
  int checks = 0, failures = 0;

  variable_delay #(.NOMINAL(NOM)) dut (.clk, .rst_n, .ctrl, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input logic [2:0] inv, input logic [2:0] cap);
    int unsigned n, want;
    ctrl.ctrl_inv = inv;
    ctrl.ctrl_cap = cap;
    want = NOM - int'(inv) + int'(cap);
    repeat (30) @(posedge clk);
    // Flip d between clock edges; count the edges until q follows.
    @(negedge clk); d = ~d; n = 0;
    do begin @(negedge clk); n++; end while (q != d && n < 100);
    checks++;
    if (n != want) begin
      failures++;
      $display("FAIL inv=%0d cap=%0d delay=%0d want=%0d", inv, cap, n, want);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 8; i++) begin
      measure(3'(i), 3'd0);            // rising or falling edge alternately
      measure(3'd0, 3'(i));
    end
    measure(3'd7, 3'd7);
    for (int n = 0; n < 10; n++) measure(3'($urandom_range(0, 7)), 3'($urandom_range(0, 7)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
