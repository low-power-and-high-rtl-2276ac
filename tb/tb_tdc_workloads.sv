// tb_tdc_workloads: the time-domain bus at the bus widths and clock rates
// it is rated for, each run side by side on a 50 ps time step with a
// 100 ps LSB step (K = 2):
//   3-bit bus at 400 MHz (PERIOD = 50 ticks),
//   4-bit bus at 200 MHz (PERIOD = 100 ticks),
//   5-bit bus at 100 MHz (PERIOD = 200 ticks, the default).
// Each instance gets every word of its width twice, in counting order, so
// that every transition from a word to the next is also exercised, followed
// by random words. Each received word is checked against the loaded ones in
// order, and each must arrive within 1.5 bus periods of its load, i.e. the
// bus keeps up with one word per clock at that rate.
`timescale 1ns/1ps
module tb_tdc_workloads;
  localparam int NCFG = 3;
  localparam int CFG_N[NCFG]      = '{3, 4, 5};
  localparam int CFG_PERIOD[NCFG] = '{50, 100, 200};
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  bit done[NCFG];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int N = CFG_N[c], P = CFG_PERIOD[c];
    logic [N-1:0] din = '0, dout;
    logic din_taken, bus_clk, dout_valid;

    tdc_bus #(.N(N), .PERIOD(P)) dut (.clk, .rst_n, .din, .din_taken, .bus_clk, .dout, .dout_valid);

    initial begin
      logic [N-1:0] words[$], loaded[$];
      int load_tick[$];
      int tick, sent, got_n;
      tick = 0; sent = 0; got_n = 0;
      done[c] = 0;
      for (int r = 0; r < 2; r++)
        for (int v = 0; v < 2 ** N; v++) words.push_back(N'(v));
      for (int i = 0; i < 40; i++) words.push_back(N'($urandom_range(0, 2 ** N - 1)));
      wait (rst_n);
      while (1) begin
        #1;
        if (dout_valid) begin
          checks++;
          if (loaded.size() == 0) begin
            failures++;
            $display("FAIL %0d-bit: valid with nothing loaded", N);
          end else begin
            automatic logic [N-1:0] want = loaded.pop_front();
            automatic int lt = load_tick.pop_front();
            got_n++;
            if (dout != want || tick - lt <= P / 2 || tick - lt > P + P / 2) begin
              failures++;
              $display("FAIL %0d-bit: got=%0d want=%0d latency=%0d", N, dout, want, tick - lt);
            end
          end
        end
        if (din_taken) begin
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
      $display("%0d-bit bus, %0d ticks per word: %0d words sent, %0d received", N, P, sent, got_n);
      done[c] = 1;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
