// tb_eo_obfuscation: self-checking test of the obfuscation circuit alone.
//
// With a divide ratio of 6 and the shield model in the loop, it checks at
// every fast-clock cycle that the shield carries lfsr_out[9] while clk_chip
// is high, and, at random instants of the low phase, that it carries the
// ring selected by {lfsr_out[13], lfsr_out[3]}. An intact shield must never
// raise the alarm; a cut shield must raise it within 64 chip cycles, and a
// reset must clear it.
`timescale 1ns / 1ps
module tb_eo_obfuscation;
  import shield_tb_pkg::*;

  logic clk = 0, rst_n;
  logic sh_out, sh_in, clk_chip, mismatch, alarm;
  logic [14:0] lfsr;
  logic [1:0] ro_sel;
  shield_mode_t mode = SH_INTACT;
  int checks = 0, failures = 0, lfsr_cycles = 0, ro_samples = 0;

  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end

  eo_obfuscation #(.CLK_DIV(6), .SEED(15'h1234)) dut (
    .clk, .rst_n, .shield_out(sh_out), .shield_in(sh_in), .clk_chip,
    .mismatch, .alarm, .lfsr_out(lfsr), .ro_sel
  );
  active_shield_model shield (.drive(sh_out), .mode, .forged_bit(1'b0), .a_out(sh_in));

  always #2 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // shield content checks
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (ro_sel != {lfsr[13], lfsr[3]}) begin failures++; $display("FAIL: ro_sel %b", ro_sel); end
    if (clk_chip) begin
      lfsr_cycles++;
      checks++;
      if (sh_out != lfsr[9]) begin failures++; $display("FAIL: shield %b, lfsr_out[9] %b", sh_out, lfsr[9]); end
    end else begin
      #($urandom_range(100, 1800) * 1ps);
      if (!clk_chip) begin
        ro_samples++;
        checks++;
        if (sh_out != dut.u_ro.ro_all[{lfsr[13], lfsr[3]}]) begin
          failures++; $display("FAIL: shield does not carry the selected ring");
        end
      end
    end
  end

  initial begin
    int t;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3000) @(negedge clk);
    checks++; if (alarm) begin failures++; $display("FAIL: alarm with intact shield"); end
    mode = SH_CUT;
    t = 0;
    while (!alarm && t < 64 * 6) begin @(negedge clk); t++; end
    checks++; if (!alarm) begin failures++; $display("FAIL: cut shield not detected"); end
    mode = SH_INTACT;
    rst_n = 0;
    @(negedge clk);
    checks++; if (alarm) begin failures++; $display("FAIL: reset does not clear alarm"); end
    rst_n = 1;
    repeat (500) @(negedge clk);
    checks++; if (alarm) begin failures++; $display("FAIL: alarm after reset with intact shield"); end
    checks++; if (lfsr_cycles == 0 || ro_samples == 0) begin failures++; $display("FAIL: a phase never seen"); end
    $display("lfsr-phase cycles %0d, ro samples %0d, cut detected after %0d cycles", lfsr_cycles, ro_samples, t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
