// tb_eo_freq_divider: self-checking test of the clk -> clk_chip divider.
//
// Runs the default divide ratio (10) and an odd one (7) side by side and
// measures, cycle by cycle, the length of each high and low phase of
// clk_chip over 20 periods. For a ratio D the high phase must last
// ceil(D/2) cycles of clk and the low phase floor(D/2). clk_chip must be
// high during reset.
`timescale 1ns / 1ps
module tb_eo_freq_divider;
  logic clk = 0, rst_n;
  logic c10, c7;
  int checks = 0, failures = 0;

  // rst_n falls once at the start so the asynchronous resets see an edge.
  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end

  eo_freq_divider            d10 (.clk, .rst_n, .clk_chip(c10));
  eo_freq_divider #(.DIV(7)) d7  (.clk, .rst_n, .clk_chip(c7));

  always #2 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(int div, ref logic c);
    int hi, lo;
    // align to the start of a high phase
    while (c) @(negedge clk);
    while (!c) @(negedge clk);
    for (int p = 0; p < 20; p++) begin
      hi = 0; lo = 0;
      while (c && hi < 100) begin hi++; @(negedge clk); end
      while (!c && lo < 100) begin lo++; @(negedge clk); end
      checks++;
      if (hi != (div + 1) / 2 || lo != div / 2) begin
        failures++;
        $display("FAIL div %0d: high %0d low %0d", div, hi, lo);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (!(c10 && c7)) begin failures++; $display("FAIL: clk_chip not high in reset"); end
    rst_n = 1;
    fork
      measure(10, c10);
      measure(7, c7);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
