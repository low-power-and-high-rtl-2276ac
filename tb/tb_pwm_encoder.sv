// tb_pwm_encoder: switches D0, D1 or both, with a range of crosstalk trims,
// and measures the pulse on wire_in: it must be one single pulse of
// W1/W2/W3 + (ctrl_cap - ctrl_inv) ticks (130/230/330 ps nominal), and the
// extended flags must last EXT ticks. No switch must send nothing.
`timescale 1ns/1ps
module tb_pwm_encoder;
  import lp_bus_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, d0 = 1'b0, d1 = 1'b0;
  vdelay_ctrl_t ctrl = '0;
  logic p1_ext, p2_ext, wire_in;
  int checks = 0, failures = 0;
  int n_w1 = 0, n_w2 = 0, n_w3 = 0, n_idle = 0;

  pwm_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Flip the chosen bits, then count high samples and rising edges.
  task automatic send(input logic s0, input logic s1, input int inv, input int cap);
    int width = 0, rises = 0, w1x = 0, w2x = 0, want;
    logic prev = 1'b0;
    ctrl.ctrl_inv = 3'(inv);
    ctrl.ctrl_cap = 3'(cap);
    @(negedge clk);
    d0 = d0 ^ s0;
    d1 = d1 ^ s1;
    for (int t = 0; t < 80; t++) begin
      #1;
      if (wire_in) width++;
      if (wire_in && !prev) rises++;
      if (p1_ext) w1x++;
      if (p2_ext) w2x++;
      prev = wire_in;
      @(negedge clk);
    end
    want = (!s0 && !s1) ? 0 : (s0 && s1) ? PWM_W3_TICKS : s1 ? PWM_W2_TICKS : PWM_W1_TICKS;
    if (want != 0) want += cap - inv;
    checks++;
    if (width != want || rises != int'(want != 0) ||
        w1x != (s0 ? PWM_EXT_TICKS : 0) || w2x != (s1 ? PWM_EXT_TICKS : 0)) begin
      failures++;
      $display("FAIL s=%b%b inv=%0d cap=%0d width=%0d want=%0d rises=%0d ext=%0d/%0d",
               s1, s0, inv, cap, width, want, rises, w1x, w2x);
    end
    if (want == 0) n_idle++;
    else if (s0 && s1) n_w3++;
    else if (s1) n_w2++;
    else n_w1++;
    repeat (30) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (60) @(negedge clk);
    for (int trim = -6; trim <= 6; trim += 3) begin
      automatic int inv = trim < 0 ? -trim : 0;
      automatic int cap = trim > 0 ? trim : 0;
      send(1, 0, inv, cap);
      send(0, 1, inv, cap);
      send(1, 1, inv, cap);
      send(0, 0, inv, cap);
      send(1, 1, inv, cap);
    end
    for (int n = 0; n < 20; n++)
      send(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)), $urandom_range(0, 7), 0);
    if (n_w1 == 0 || n_w2 == 0 || n_w3 == 0 || n_idle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
