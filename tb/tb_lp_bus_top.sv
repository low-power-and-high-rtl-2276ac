// tb_lp_bus_top: end-to-end test of the whole design at its default sizes:
// the 3-wire (6-bit) PWM bus on a 10 ps time step and the 5-bit TDC bus on
// a 50 ps time step, run at the same time with their clocks in the true
// 1:5 ratio (1 GHz and 100 MHz bus clocks).
//
// PWM side: 300 bus periods of directed then random words. Checks that q
// equals the word loaded one bus clock before, and that every received
// pulse has its nominal width (crosstalk fully pre-corrected). Counts W1,
// W2, W3 pulses, idle wires, pre-shortened and pre-lengthened pulses (a
// sent width below/above nominal).
// TDC side: every 5-bit word, worst-case sequences and random words. Checks
// each received word, in order, and that it arrives within 1.5 bus periods
// of being loaded. Counts, for every decoder stage, the decisions where the
// reference edge was delayed (bit 1) and where the data edge was (bit 0).
// Every counted event must happen at least once.
`timescale 1ns/1ps
module tb_lp_bus_top;
  import lp_bus_pkg::*;
  localparam int LANES = 3, N = TDC_N;
  logic rst_n = 1'b0, pwm_clk = 1'b0, tdc_clk = 1'b0;
  logic [2*LANES-1:0] pwm_d = '0, pwm_q;
  logic pwm_bus_rise;
  logic [LANES-1:0] pwm_wire_in, pwm_wire_out;
  logic [N-1:0] tdc_din = '0, tdc_dout;
  logic tdc_din_taken, tdc_bus_clk, tdc_dout_valid;
  int checks = 0, failures = 0;
  bit pwm_done = 0, tdc_done = 0;

  lp_bus_top dut (.*);

  always #5  pwm_clk = ~pwm_clk;
  always #25 tdc_clk = ~tdc_clk;

  initial begin : watchdog
    repeat (300000) @(posedge pwm_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- PWM side ----------------
  int n_w[4] = '{0, 0, 0, 0};
  int n_short = 0, n_long = 0;

  function automatic int nominal(input int c);
    return (c == 0) ? 0 : (c == 1) ? PWM_W1_TICKS : (c == 2) ? PWM_W2_TICKS : PWM_W3_TICKS;
  endfunction

  initial begin : pwm_side
    int win_in[LANES], win_out[LANES];
    logic [2*LANES-1:0] prev_w, cur_w;
    logic [2*LANES-1:0] directed[$];
    int rises;
    bit check_q;
    directed = '{6'b000001, 6'b000011, 6'b001000, 6'b110000, 6'b010101,
                 6'b101010, 6'b111111, 6'b100111, 6'b011100, 6'b000000};
    prev_w = '0; cur_w = '0; rises = 0; check_q = 0;
    for (int i = 0; i < LANES; i++) begin win_in[i] = 0; win_out[i] = 0; end
    repeat (2) @(posedge pwm_clk);
    @(negedge pwm_clk);
    wait (rst_n);
    while (rises < 300) begin
      #1;
      if (check_q) begin
        checks++;
        if (pwm_q != prev_w) begin
          failures++;
          $display("FAIL pwm q=%b want=%b", pwm_q, prev_w);
        end
        check_q = 0;
      end
      for (int i = 0; i < LANES; i++) begin
        win_in[i]  += int'(pwm_wire_in[i]);
        win_out[i] += int'(pwm_wire_out[i]);
      end
      if (pwm_bus_rise) begin
        if (rises > 0)
          for (int i = 0; i < LANES; i++) begin
            automatic int c = int'(2'(prev_w[2*i +: 2] ^ cur_w[2*i +: 2]));
            checks++;
            if (win_out[i] != nominal(c)) begin
              failures++;
              $display("FAIL pwm lane %0d class %0d received %0d", i, c, win_out[i]);
            end
            n_w[c]++;
            if (c != 0 && win_in[i] < nominal(c)) n_short++;
            if (c != 0 && win_in[i] > nominal(c)) n_long++;
          end
        for (int i = 0; i < LANES; i++) begin win_in[i] = 0; win_out[i] = 0; end
        prev_w = cur_w;
        pwm_d = (directed.size() > 0) ? directed.pop_front() : 6'($urandom_range(0, 63));
        cur_w = pwm_d;
        check_q = (rises > 0);
        rises++;
      end
      @(negedge pwm_clk);
    end
    pwm_done = 1;
  end

  // ---------------- TDC side ----------------
  int n_bit1[N], n_bit0[N];

  initial begin : tdc_side
    logic [N-1:0] words[$];
    logic [N-1:0] loaded[$];
    int load_tick[$];
    int tick, got_n, sent;
    tick = 0; got_n = 0; sent = 0;
    for (int b = 0; b < N; b++) begin n_bit1[b] = 0; n_bit0[b] = 0; end
    for (int v = 0; v < 2 ** N; v++) words.push_back(N'(v));
    for (int b = 1; b < N; b++) begin
      words.push_back(N'(1 << b));
      words.push_back(N'((1 << b) - 1));
    end
    for (int i = 0; i < 30; i++) words.push_back(N'($urandom_range(0, 2 ** N - 1)));
    repeat (2) @(posedge tdc_clk);
    @(negedge tdc_clk) rst_n = 1'b1;
    while (1) begin
      #1;
      if (tdc_dout_valid) begin
        checks++;
        if (loaded.size() == 0) begin
          failures++;
          $display("FAIL tdc valid with nothing loaded");
        end else begin
          automatic logic [N-1:0] want = loaded.pop_front();
          automatic int lt = load_tick.pop_front();
          got_n++;
          for (int b = 0; b < N; b++) if (tdc_dout[b]) n_bit1[b]++; else n_bit0[b]++;
          if (tdc_dout != want || tick - lt <= int'(TDC_PERIOD_TICKS / 2) ||
              tick - lt > int'(TDC_PERIOD_TICKS + TDC_PERIOD_TICKS / 2)) begin
            failures++;
            $display("FAIL tdc got=%0d want=%0d latency=%0d", tdc_dout, want, tick - lt);
          end
        end
      end
      if (tdc_din_taken) begin
        if (words.size() > 0) begin
          tdc_din = words.pop_front();
          loaded.push_back(tdc_din);
          load_tick.push_back(tick);
          sent++;
        end else if (loaded.size() == 0) break;
      end
      @(negedge tdc_clk);
      tick++;
    end
    if (got_n != sent) failures++;
    tdc_done = 1;
  end

  initial begin : finish
    wait (pwm_done && tdc_done);
    if (n_w[0] == 0 || n_w[1] == 0 || n_w[2] == 0 || n_w[3] == 0 || n_short == 0 || n_long == 0)
      failures++;
    for (int b = 0; b < N; b++) if (n_bit1[b] == 0 || n_bit0[b] == 0) failures++;
    $display("pwm: idle=%0d W1=%0d W2=%0d W3=%0d pre-shortened=%0d pre-lengthened=%0d",
             n_w[0], n_w[1], n_w[2], n_w[3], n_short, n_long);
    for (int b = N - 1; b >= 0; b--)
      $display("tdc stage %0d: reference delayed %0d times, data delayed %0d times", b, n_bit1[b], n_bit0[b]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
