// tb_dtc_cell: drives a square wave into the cell with din chosen at
// random each period (changed while tin is high, well before the next
// rising edge) and checks that tout's rising edge comes DELAY ticks after
// tin's when din = 1 and at once when din = 0, and that falling edges are
// never delayed.
`timescale 1ns/1ps
module tb_dtc_cell;
  localparam int unsigned DELAY = 4;
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0, tin = 1'b0, tout;
  int checks = 0, failures = 0, n_delayed = 0, n_direct = 0;

  dtc_cell #(.DELAY(DELAY)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (20) @(negedge clk);
    for (int p = 0; p < 200; p++) begin : per
      automatic int rise_at = -1, fall_at = -1;
      automatic logic want_dly = din;
      // high half: 20 ticks, din changes in the middle
      for (int t = 0; t < 40; t++) begin
        tin = (t < 20);
        if (t == 10) din = 1'($urandom_range(0, 1));
        #1;
        if (t < 20 && tout && rise_at < 0) rise_at = t;
        if (t >= 20 && !tout && fall_at < 0) fall_at = t;
        @(negedge clk);
      end
      checks++;
      if (rise_at != (want_dly ? DELAY : 0) || fall_at != 20) begin
        failures++;
        $display("FAIL p=%0d din=%b rise=%0d fall=%0d", p, want_dly, rise_at, fall_at);
      end
      if (want_dly) n_delayed++; else n_direct++;
    end
    if (n_delayed == 0 || n_direct == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
