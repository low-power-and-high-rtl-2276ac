// tb_tdc_bus: sends every 5-bit word, the worst-case neighbour sequences
// (10000 -> 01111 and the like) and random words over the time-domain bus
// and checks each against the words in the order they were loaded. A word
// loaded on a falling edge of the bus clock is converted from the next
// rising edge and must be delivered (dout_valid) before the rising edge
// after that, i.e. within 1.5 periods of the load: the bus carries one
// word per 100 MHz clock.
`timescale 1ns/1ps
module tb_tdc_bus;
  import lp_bus_pkg::*;
  localparam int unsigned N = TDC_N, P = TDC_PERIOD_TICKS;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] din = '0, dout;
  logic din_taken, bus_clk, dout_valid;
  int checks = 0, failures = 0, sent = 0, got_n = 0;
  logic [N-1:0] words[$];
  logic [N-1:0] loaded[$];
  int load_tick[$];
  int tick = 0;

  tdc_bus dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2 ** N; v++) words.push_back(N'(v));
    for (int b = 1; b < N; b++) begin
      words.push_back(N'(1 << b));
      words.push_back(N'((1 << b) - 1));
    end
    for (int i = 0; i < 40; i++) words.push_back(N'($urandom_range(0, 2 ** N - 1)));
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (1) begin
      #1;
      if (dout_valid) begin
        checks++;
        if (loaded.size() == 0) begin
          failures++;
          $display("FAIL valid with nothing loaded at tick %0d", tick);
        end else begin
          automatic logic [N-1:0] want = loaded.pop_front();
          automatic int lt = load_tick.pop_front();
          got_n++;
          if (dout != want || tick - lt <= int'(P / 2) || tick - lt > int'(P + P / 2)) begin
            failures++;
            $display("FAIL got=%0d want=%0d latency=%0d", dout, want, tick - lt);
          end
        end
      end
      if (din_taken) begin
        // din is captured at the clock edge that ends this tick
        if (words.size() > 0) begin
          din = words.pop_front();
          loaded.push_back(din);
          load_tick.push_back(tick);
          sent++;
        end else if (loaded.size() == 0) break;
      end
      @(negedge clk);
      tick++;
    end
    if (got_n != sent) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
