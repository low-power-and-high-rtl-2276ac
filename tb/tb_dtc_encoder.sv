// tb_dtc_encoder: for every N-bit value (default N = 5, K = 2) checks that
// the rising edge of the bus clock leaves the encoder value x K ticks late,
// i.e. one 100 ps LSB step per count, and that its falling edge is not
// delayed. din changes just after each falling edge, a half period before
// the next rising edge, which meets the encoder's setup rule.
`timescale 1ns/1ps
module tb_dtc_encoder;
  import lp_bus_pkg::*;
  localparam int unsigned N = TDC_N, K = TDC_K, HALF = TDC_PERIOD_TICKS / 2;
  logic clk = 1'b0, rst_n = 1'b0, tin = 1'b0, tout;
  logic [N-1:0] din = '0;
  int checks = 0, failures = 0;

  dtc_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic period(input logic [N-1:0] v);
    int rise_at = -1, fall_at = -1;
    for (int t = 0; t < 2 * HALF; t++) begin
      tin = (t < HALF);
      if (t == HALF + 1) din = v;     // value for the next period
      #1;
      if (t < HALF && tout && rise_at < 0) rise_at = t;
      if (t >= HALF && !tout && fall_at < 0) fall_at = t;
      @(negedge clk);
    end
    // The value loaded in this period is measured in the next one.
  endtask

  initial begin
    logic [N-1:0] cur;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (50) @(negedge clk);
    period('0);
    for (int v = 0; v < 2 ** N + 20; v++) begin
      automatic int rise_at = -1, fall_at = -1;
      automatic logic [N-1:0] nxt = (v < 2 ** N) ? N'(v) : N'($urandom_range(0, 2 ** N - 1));
      cur = din;
      for (int t = 0; t < 2 * HALF; t++) begin
        tin = (t < HALF);
        if (t == HALF + 1) din = nxt;
        #1;
        if (t < HALF && tout && rise_at < 0) rise_at = t;
        if (t >= HALF && !tout && fall_at < 0) fall_at = t;
        @(negedge clk);
      end
      checks++;
      if (rise_at != int'(cur) * K || fall_at != HALF) begin
        failures++;
        $display("FAIL value=%0d rise=%0d fall=%0d", cur, rise_at, fall_at);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
