// tb_tick_delay: drives random bits into delay elements of depth 0, 1 and 7
// (the depth-1 one at its default) and checks each output against a record
// of the input history, 500 ticks per depth.
`timescale 1ns/1ps
module tb_tick_delay;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0;
  logic q0, q1, q7;
  int checks = 0, failures = 0;
  logic hist[$];

  tick_delay #(.DEPTH(0)) u0 (.clk, .rst_n, .d, .q(q0));
  tick_delay              u1 (.clk, .rst_n, .d, .q(q1));
  tick_delay #(.DEPTH(7)) u7 (.clk, .rst_n, .d, .q(q7));

  always #5 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic past(input int n);
    // value of d n ticks ago; 0 before reset was released
    return (hist.size() > n) ? hist[hist.size() - 1 - n] : 1'b0;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      d = 1'($urandom_range(0, 1));
      hist.push_back(d);
      #1;
      checks += 3;
      if (q0 != past(0)) begin failures++; $display("FAIL depth 0 t=%0d", t); end
      if (q1 != past(1)) begin failures++; $display("FAIL depth 1 t=%0d", t); end
      if (q7 != past(7)) begin failures++; $display("FAIL depth 7 t=%0d", t); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
