// tb_eo_comparator: self-checking test of the shield comparison module.
//
// Drives random sent bits, returned bits and check enables for many cycles
// and compares mismatch and alarm with a model kept in the testbench:
// mismatch is the registered "enabled and different", alarm is sticky
// from the first mismatch until reset. Runs of matching returns, of
// differences with the check disabled and of real differences are all
// included, and a reset must clear the alarm.
`timescale 1ns / 1ps
module tb_eo_comparator;
  logic clk = 0, rst_n;

  // rst_n falls once at the start so the asynchronous resets see an edge.
  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  logic en, sb, ao, mm, al;
  logic exp_mm, exp_al;
  int checks = 0, failures = 0, raised = 0;

  eo_comparator dut (.clk, .rst_n, .check_en(en), .sent_bit(sb), .a_out(ao), .mismatch(mm), .alarm(al));

  always #2 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int cycles, int p_diff_pct);
    for (int n = 0; n < cycles; n++) begin
      @(negedge clk);
      en = 1'($urandom);
      sb = 1'($urandom);
      ao = (($urandom % 100) < p_diff_pct) ? ~sb : sb;
      @(posedge clk);
      exp_mm = en && (ao != sb);
      exp_al = exp_al || exp_mm;
      #0.5;
      checks++;
      if (mm !== exp_mm || al !== exp_al) begin
        failures++;
        $display("FAIL: en=%b sent=%b back=%b mismatch=%b/%b alarm=%b/%b", en, sb, ao, mm, exp_mm, al, exp_al);
      end
      if (exp_mm) raised++;
    end
  endtask

  initial begin
    en = 0; sb = 0; ao = 0;
    exp_mm = 0; exp_al = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(200, 0);            // intact shield: never an alarm
    checks++; if (al) begin failures++; $display("FAIL: alarm with intact shield"); end
    run(200, 30);           // tampered shield
    checks++; if (!al) begin failures++; $display("FAIL: no alarm after tampering"); end
    @(negedge clk); rst_n = 0; exp_al = 0; exp_mm = 0; en = 0; ao = sb;
    @(negedge clk);
    checks++; if (al || mm) begin failures++; $display("FAIL: reset does not clear alarm"); end
    rst_n = 1;
    run(100, 0);
    checks++; if (raised == 0) begin failures++; $display("FAIL: no mismatch was ever driven"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
