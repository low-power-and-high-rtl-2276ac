// tb_xt_signal_adapter: exhaustive check of the trim codes: each
// lengthening neighbour (cx1) must take XT_TRIM ticks off the pulse, each
// shortening one (cx2) add XT_TRIM, so the net trim in ticks is
// ctrl_cap - ctrl_inv = XT_TRIM x (#cx2 - #cx1), with one code at zero.
`timescale 1ns/1ps
module tb_xt_signal_adapter;
  import lp_bus_pkg::*;
  logic cx1_lo, cx2_lo, cx1_hi, cx2_hi;
  vdelay_ctrl_t ctrl;
  int checks = 0, failures = 0;

  xt_signal_adapter #(.XT_TRIM(3)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int want;
      {cx1_lo, cx2_lo, cx1_hi, cx2_hi} = 4'(v);
      #1;
      want = 3 * (int'(cx2_lo) + int'(cx2_hi) - int'(cx1_lo) - int'(cx1_hi));
      checks++;
      if (int'(ctrl.ctrl_cap) - int'(ctrl.ctrl_inv) != want ||
          (ctrl.ctrl_cap != 0 && ctrl.ctrl_inv != 0)) begin
        failures++;
        $display("FAIL v=%b inv=%0d cap=%0d want=%0d", v[3:0], ctrl.ctrl_inv, ctrl.ctrl_cap, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
