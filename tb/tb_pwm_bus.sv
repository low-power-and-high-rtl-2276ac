// tb_pwm_bus: end-to-end test of the 3-wire (6-bit) PWM bus with its
// coupled-wire model. Random words, preceded by directed ones, are loaded
// on each bus clock edge. Checks, per bus period:
//  * q equals the word loaded one bus clock earlier (1 GHz, one word per
//    100-tick period, one period of latency);
//  * each received pulse has exactly its nominal width (13/23/33 ticks)
//    for the bits that switched, i.e. the crosstalk pre-correction cancels
//    the coupling, and no pulse is sent when nothing switched;
//  * each sent pulse is pre-trimmed by 3 ticks per neighbour: shorter when
//    a neighbour's pulse is wider, longer when it is narrower.
// After the directed words, the bus steps through all 64 switch patterns
// (each word is the previous one XOR the pattern), so every crosstalk
// scenario of the middle wire occurs: its own pulse class against each
// class, or silence, on either side (3 x 4 x 4 = 48 scenarios).
// It counts W1/W2/W3 pulses, idle wires, pre-shortened and pre-lengthened
// pulses and middle-wire scenarios, and fails if any never happened.
`timescale 1ns/1ps
module tb_pwm_bus;
  import lp_bus_pkg::*;
  localparam int LANES = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2*LANES-1:0] d = '0, q;
  logic bus_rise;
  logic [LANES-1:0] wire_in, wire_out;
  int checks = 0, failures = 0;
  int n_w[4] = '{0, 0, 0, 0};
  int n_short = 0, n_long = 0;
  int win_in[LANES], win_out[LANES];
  logic [2*LANES-1:0] prev_w = '0, cur_w = '0;
  int rises = 0;
  int n_scen[4][4][4];                // middle wire: [left][own][right]
  logic [2*LANES-1:0] last_dir;
  logic check_q = 1'b0;
  logic [2*LANES-1:0] directed[$];

  pwm_bus #(.LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cls(input logic [2*LANES-1:0] a, input logic [2*LANES-1:0] b, input int i);
    logic [1:0] s = a[2*i +: 2] ^ b[2*i +: 2];
    return int'(s);                   // 0 none, 1 W1, 2 W2, 3 W3
  endfunction

  function automatic int nominal(input int c);
    return (c == 0) ? 0 : (c == 1) ? PWM_W1_TICKS : (c == 2) ? PWM_W2_TICKS : PWM_W3_TICKS;
  endfunction

  // Judge the period that carried the switch prev_w -> cur_w.
  task automatic judge();
    for (int i = 0; i < LANES; i++) begin
      int c = cls(prev_w, cur_w, i);
      int trim = 0;
      for (int j = i - 1; j <= i + 1; j += 2)
        if (j >= 0 && j < LANES && c != 0) begin
          int cj = cls(prev_w, cur_w, j);
          if (cj != 0 && cj > c) trim -= PWM_XT_TICKS;
          if (cj != 0 && cj < c) trim += PWM_XT_TICKS;
        end
      checks++;
      if (win_out[i] != nominal(c) || win_in[i] != nominal(c) + (c != 0 ? trim : 0)) begin
        failures++;
        $display("FAIL lane %0d class %0d sent %0d received %0d (trim %0d)", i, c, win_in[i], win_out[i], trim);
      end
      n_w[c]++;
      if (i == 1) n_scen[cls(prev_w, cur_w, 0)][c][cls(prev_w, cur_w, 2)]++;
      if (c != 0 && trim < 0) n_short++;
      if (c != 0 && trim > 0) n_long++;
    end
  endtask

  initial begin
    // Directed: every single-lane class, then the middle wire against wider
    // and narrower neighbours.
    directed = '{6'b000001, 6'b000011, 6'b001000, 6'b110000, 6'b010101,
                 6'b101010, 6'b111111, 6'b100111, 6'b011100, 6'b000000};
    last_dir = directed[directed.size() - 1];
    for (int s = 0; s < 64; s++) begin
      last_dir = last_dir ^ 6'(s);
      directed.push_back(last_dir);
    end
    foreach (n_scen[a, b, c]) n_scen[a][b][c] = 0;
    for (int i = 0; i < LANES; i++) begin win_in[i] = 0; win_out[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (rises < 400) begin
      #1;
      if (check_q) begin
        checks++;
        if (q != prev_w) begin
          failures++;
          $display("FAIL q=%b want=%b", q, prev_w);
        end
        check_q = 1'b0;
      end
      for (int i = 0; i < LANES; i++) begin
        win_in[i]  += int'(wire_in[i]);
        win_out[i] += int'(wire_out[i]);
      end
      if (bus_rise) begin
        if (rises > 0) judge();
        for (int i = 0; i < LANES; i++) begin win_in[i] = 0; win_out[i] = 0; end
        prev_w = cur_w;
        d = (directed.size() > 0) ? directed.pop_front() : 6'($urandom_range(0, 63));
        cur_w = d;                    // captured at the edge ending this tick
        check_q = (rises > 0);
        rises++;
      end
      @(negedge clk);
    end
    if (n_w[0] == 0 || n_w[1] == 0 || n_w[2] == 0 || n_w[3] == 0 || n_short == 0 || n_long == 0) begin
      failures++;
      $display("FAIL coverage idle=%0d W1=%0d W2=%0d W3=%0d short=%0d long=%0d",
               n_w[0], n_w[1], n_w[2], n_w[3], n_short, n_long);
    end
    for (int a = 0; a < 4; a++)
      for (int b = 1; b < 4; b++)
        for (int c = 0; c < 4; c++)
          if (n_scen[a][b][c] == 0) begin
            failures++;
            $display("FAIL scenario left=%0d own=%0d right=%0d never seen", a, b, c);
          end
    $display("coverage idle=%0d W1=%0d W2=%0d W3=%0d pre-shortened=%0d pre-lengthened=%0d",
             n_w[0], n_w[1], n_w[2], n_w[3], n_short, n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
