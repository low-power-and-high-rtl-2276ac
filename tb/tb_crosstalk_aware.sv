// tb_crosstalk_aware: exhaustive check of the crosstalk flags against a
// reference that ranks the pulse widths W1 < W2 < W3 by the count of
// switches they encode (D0 only = 1, D1 only = 2, both = 3, none = idle).
`timescale 1ns/1ps
module tb_crosstalk_aware;
  logic p1_ext, p2_ext, p1_lo, p2_lo, p1_hi, p2_hi;
  logic cx1_lo, cx2_lo, cx1_hi, cx2_hi;
  int checks = 0, failures = 0;

  crosstalk_aware dut (.*);

  function automatic int rank(input logic p1, input logic p2);
    // width rank: 0 idle, 1 short, 2 medium, 3 wide
    return (p1 && p2) ? 3 : p2 ? 2 : p1 ? 1 : 0;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      int own, lo, hi;
      {p2_hi, p1_hi, p2_lo, p1_lo, p2_ext, p1_ext} = 6'(v);
      #1;
      own = rank(p1_ext, p2_ext);
      lo  = rank(p1_lo, p2_lo);
      hi  = rank(p1_hi, p2_hi);
      checks++;
      if (cx1_lo !== (own > 0 && lo > own) || cx2_lo !== (own > 0 && lo > 0 && lo < own) ||
          cx1_hi !== (own > 0 && hi > own) || cx2_hi !== (own > 0 && hi > 0 && hi < own)) begin
        failures++;
        $display("FAIL v=%0d own=%0d lo=%0d hi=%0d got %b%b%b%b", v, own, lo, hi,
                 cx1_lo, cx2_lo, cx1_hi, cx2_hi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
