// tb_xt_wire_bus: sends aligned pulses of chosen widths on three coupled
// wires and checks each output: rising edge DELAY ticks after the input's,
// width changed by +XT for every direct neighbour with a wider pulse and
// -XT for every neighbour with a narrower one (idle neighbours, and ones
// whose pulse falls within 8 ticks of this one, leave it alone). All
// combinations of widths {0, 13, 23, 33} are tried, then close widths.
`timescale 1ns/1ps
module tb_xt_wire_bus;
  localparam int unsigned DELAY = 50, XT = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] wire_in = '0, wire_out;
  int checks = 0, failures = 0;

  xt_wire_bus #(.LANES(3), .DELAY(DELAY), .XT(XT)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic shot(input int w0, input int w1, input int w2);
    int w[3] = '{w0, w1, w2};
    int first[3] = '{-1, -1, -1};
    int width[3] = '{0, 0, 0};
    for (int t = 0; t < 120; t++) begin
      @(negedge clk);
      for (int i = 0; i < 3; i++) wire_in[i] = (t < w[i]);
      #1;
      for (int i = 0; i < 3; i++) if (wire_out[i]) begin
        if (first[i] < 0) first[i] = t;
        width[i]++;
      end
    end
    for (int i = 0; i < 3; i++) begin
      int want = w[i];
      if (w[i] > 0) for (int j = i - 1; j <= i + 1; j += 2) begin
        if (j >= 0 && j < 3 && w[j] > 0) begin
          if (w[j] > w[i] + 8) want += XT;
          else if (w[j] + 8 < w[i]) want -= XT;
        end
      end
      checks++;
      if (width[i] != want || (want > 0 && first[i] != DELAY)) begin
        failures++;
        $display("FAIL w=%0d/%0d/%0d lane %0d width=%0d want=%0d first=%0d",
                 w0, w1, w2, i, width[i], want, first[i]);
      end
    end
  endtask

  initial begin
    automatic int ws[4] = '{0, 13, 23, 33};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int c = 0; c < 4; c++) shot(ws[a], ws[b], ws[c]);
    // Pulses that fall within the 8-tick window of each other do not couple.
    shot(13, 16, 10);
    shot(23, 29, 20);
    shot(20, 29, 38);
    shot(7, 17, 26);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
