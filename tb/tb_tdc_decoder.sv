// tb_tdc_decoder: builds the two edges the decoder expects, the data edge
// D x K ticks and the reference edge (2^(N-1) - 1) x K ticks after the start
// of each 200-tick period, both falling at mid-period, and checks that
// every value 0 .. 2^N - 1 (then random ones) comes out on dout with
// dout_valid, once per period and before the next period's edges.
`timescale 1ns/1ps
module tb_tdc_decoder;
  import lp_bus_pkg::*;
  localparam int unsigned N = TDC_N, K = TDC_K, P = TDC_PERIOD_TICKS;
  localparam int unsigned R = 2 ** (N - 1) - 1;
  logic clk = 1'b0, rst_n = 1'b0, td = 1'b0, ref_in = 1'b0;
  logic [N-1:0] dout;
  logic dout_valid;
  int checks = 0, failures = 0;

  tdc_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (10) @(negedge clk);
    for (int v = 0; v < 2 ** N + 30; v++) begin
      automatic int d = (v < 2 ** N) ? v : $urandom_range(0, 2 ** N - 1);
      automatic int valids = 0, valid_at = -1;
      automatic logic [N-1:0] got = '0;
      for (int t = 0; t < P; t++) begin
        td     = (t >= d * K) && (t < P / 2);
        ref_in = (t >= R * K) && (t < P / 2);
        #1;
        if (dout_valid) begin valids++; valid_at = t; got = dout; end
        @(negedge clk);
      end
      checks++;
      if (valids != 1 || got != N'(d)) begin
        failures++;
        $display("FAIL d=%0d got=%0d valids=%0d at=%0d", d, got, valids, valid_at);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
