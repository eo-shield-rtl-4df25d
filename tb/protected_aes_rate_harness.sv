// protected_aes_rate_harness: runs one protected AES chip at a given fast
// clock and divide ratio, for the operating-point testbench.
//
// It generates its own fast clock of period CLK_PS, measures the period of
// clk_chip, performs N_ENC random encryptions (checked by decryption) with
// an intact shield and no alarm, then cuts the shield and expects the alarm
// within 64 chip cycles. When finished it raises done and reports its
// check and failure counts and the measured chip-clock period in ps.
`timescale 1ns / 1ps
module protected_aes_rate_harness
  import shield_tb_pkg::*;
  import aes_ref_pkg::*;
#(
  parameter int CLK_DIV = 10,
  parameter int CLK_PS  = 4000,
  parameter int N_ENC   = 50
) (
  output bit done,
  output int checks,
  output int failures,
  output int chip_period_ps
);
  logic clk = 0, rst_n;
  logic sh_out, sh_in, alarm, mismatch, clk_chip;
  logic aes_start = 0, aes_busy, aes_done;
  logic [127:0] aes_key = '0, aes_pt = '0, aes_ct;
  shield_mode_t mode = SH_INTACT;

  initial begin
    done = 0; checks = 0; failures = 0; chip_period_ps = 0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end

  always #(CLK_PS * 1ps / 2) clk = ~clk;

  protected_aes #(.CLK_DIV(CLK_DIV)) dut (
    .clk, .rst_n, .shield_out(sh_out), .shield_in(sh_in), .alarm, .mismatch, .clk_chip,
    .aes_start, .aes_key, .aes_plaintext(aes_pt), .aes_ciphertext(aes_ct),
    .aes_busy, .aes_done
  );
  active_shield_model shield (.drive(sh_out), .mode, .forged_bit(1'b0), .a_out(sh_in));

  task automatic fail(string s);
    failures++;
    $display("FAIL (div %0d, %0d ps): %s", CLK_DIV, CLK_PS, s);
  endtask

  initial begin
    realtime t0;
    logic [127:0] k, p;
    int edges, t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(posedge clk_chip);
    t0 = $realtime;
    @(posedge clk_chip);
    chip_period_ps = int'(($realtime - t0) * 1000.0);
    checks++;
    if (chip_period_ps != CLK_DIV * CLK_PS) fail($sformatf("chip clock period %0d ps", chip_period_ps));
    for (int n = 0; n < N_ENC; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk_chip);
      aes_key = k; aes_pt = p; aes_start = 1;
      @(negedge clk_chip);
      aes_start = 0;
      edges = 1;
      while (!aes_done && edges < 40) begin @(negedge clk_chip); edges++; end
      checks++;
      if (edges != 11) fail($sformatf("AES took %0d edges", edges));
      checks++;
      if (decrypt(k, aes_ct) != p) fail("wrong ciphertext");
    end
    checks++;
    if (alarm) fail("alarm with intact shield");
    mode = SH_CUT;
    t = 0;
    while (!alarm && t < 64 * CLK_DIV) begin @(negedge clk); t++; end
    checks++;
    if (!alarm) fail("cut shield not detected");
    done = 1;
  end
endmodule
