// tb_eo_lfsr: self-checking test of the 15-bit LFSR.
//
// A reference bit sequence is produced from the recurrence of x^15 + x + 1,
// a(n+15) = a(n) ^ a(n+1), starting from the seed bits; at every cycle the
// register must hold a(n+14) .. a(n). The test also checks that the state
// never becomes zero, that no state repeats before 2^15 - 1 steps and that
// the seed comes back after exactly 2^15 - 1 steps (maximal length). A
// second instance with a zero seed must start from 1 instead.
`timescale 1ns / 1ps
module tb_eo_lfsr;
  localparam int N = 15;
  localparam int PERIOD = (1 << N) - 1;
  localparam logic [N-1:0] SEED = 15'h5a3c;

  logic clk = 0, rst_n;

  // rst_n falls once at the start so the asynchronous resets see an edge.
  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  logic [N-1:0] q, q0;
  int checks = 0, failures = 0;

  eo_lfsr #(.SEED(SEED)) dut (.clk, .rst_n, .lfsr_out(q));
  eo_lfsr #(.SEED('0))   dut0 (.clk, .rst_n, .lfsr_out(q0));

  always #2 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seq [PERIOD + N];
  bit seen [1 << N];

  initial begin
    logic [N-1:0] expv;
    int bad_state = 0, bad_seq = 0, repeats = 0;
    for (int i = 0; i < N; i++) seq[i] = SEED[i];
    for (int n = 0; n + N < PERIOD + N; n++) seq[n + N] = seq[n] ^ seq[n + 1];
    repeat (2) @(negedge clk);
    checks++;
    if (q != SEED || q0 != 15'd1) begin
      failures++;
      $display("FAIL: reset state %h / %h", q, q0);
    end
    rst_n = 1;
    for (int n = 0; n < PERIOD; n++) begin
      for (int i = 0; i < N; i++) expv[i] = seq[n + i];
      if (q != expv) bad_seq++;
      if (q == '0) bad_state++;
      if (seen[q]) repeats++;
      seen[q] = 1;
      @(negedge clk);
    end
    checks++; if (bad_seq != 0)  begin failures++; $display("FAIL: %0d states differ from the recurrence", bad_seq); end
    checks++; if (bad_state != 0) begin failures++; $display("FAIL: zero state reached"); end
    checks++; if (repeats != 0)  begin failures++; $display("FAIL: %0d states repeated early", repeats); end
    checks++; if (q != SEED)     begin failures++; $display("FAIL: seed not back after 2^15-1 steps: %h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
