// tb_pwm_workloads: the PWM bus at the sizes it is rated for, both at
// 1 GHz (100 ticks of 10 ps per word), run side by side:
//   4-bit bus on 2 wires (LANES = 2),
//   6-bit bus on 3 wires (LANES = 3, the default).
// Each instance first steps through every switch pattern of its width
// (each word is the previous one XOR the pattern), then takes random
// words. Every bus period it checks that q equals the word loaded one
// period earlier and that each received pulse has the nominal width of the
// bits that switched, i.e. crosstalk was fully pre-corrected.
`timescale 1ns/1ps
module tb_pwm_workloads;
  import lp_bus_pkg::*;
  localparam int NCFG = 2;
  localparam int CFG_LANES[NCFG] = '{2, 3};
  localparam int WORDS = 200;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  bit done[NCFG];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int nominal(input int c);
    return (c == 0) ? 0 : (c == 1) ? PWM_W1_TICKS : (c == 2) ? PWM_W2_TICKS : PWM_W3_TICKS;
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int L = CFG_LANES[g];
    logic [2*L-1:0] d = '0, q;
    logic bus_rise;
    logic [L-1:0] wire_in, wire_out;

    pwm_bus #(.LANES(L)) dut (.clk, .rst_n, .d, .bus_rise, .q, .wire_in, .wire_out);

    initial begin
      logic [2*L-1:0] words[$];
      logic [2*L-1:0] prev_w, cur_w, w;
      int win_out[L];
      int rises, pulses;
      bit check_q;
      prev_w = '0; cur_w = '0; w = '0; rises = 0; pulses = 0; check_q = 0;
      done[g] = 0;
      for (int s = 0; s < 2 ** (2 * L); s++) begin
        w = w ^ (2*L)'(s);
        words.push_back(w);
      end
      for (int i = 0; i < L; i++) win_out[i] = 0;
      wait (rst_n);
      while (rises < WORDS) begin
        #1;
        if (check_q) begin
          checks++;
          if (q != prev_w) begin
            failures++;
            $display("FAIL %0d-bit: q=%b want=%b", 2 * L, q, prev_w);
          end
          check_q = 0;
        end
        for (int i = 0; i < L; i++) win_out[i] += int'(wire_out[i]);
        if (bus_rise) begin
          if (rises > 0)
            for (int i = 0; i < L; i++) begin
              automatic int c = int'(2'(prev_w[2*i +: 2] ^ cur_w[2*i +: 2]));
              checks++;
              if (c != 0) pulses++;
              if (win_out[i] != nominal(c)) begin
                failures++;
                $display("FAIL %0d-bit: lane %0d class %0d received %0d", 2 * L, i, c, win_out[i]);
              end
            end
          for (int i = 0; i < L; i++) win_out[i] = 0;
          prev_w = cur_w;
          d = (words.size() > 0) ? words.pop_front() : (2*L)'($urandom);
          cur_w = d;
          check_q = (rises > 0);
          rises++;
        end
        @(negedge clk);
      end
      if (pulses == 0) failures++;
      $display("%0d-bit bus on %0d wires: %0d words, %0d pulses", 2 * L, L, rises, pulses);
      done[g] = 1;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
