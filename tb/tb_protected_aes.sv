// tb_protected_aes: end-to-end test of the protected AES chip at its
// default parameters (250 MHz fast clock, divide ratio 10, 25 MHz chip clock).
//
// Phase 1: with an intact shield, 1000 random key/plaintext pairs are
// encrypted; every ciphertext is checked by decrypting it with the
// reference inverse cipher, and every encryption must take 10 chip-clock
// cycles after the start edge. All the while the shield content is watched:
// lfsr_out[9] during the high phase of clk_chip, the selected ring during
// the low phase, and the alarm must stay low.
// Phase 2: each attack of the shield model (cut, short, detour, forged
// signal) is applied after a reset and must raise the alarm within 64
// chip cycles, while an encryption is running.
// Each mechanism (LFSR phase, RO phase with each of the four rings, each
// attack detected) is counted, and one that never happens is a failure.
`timescale 1ns / 1ps
module tb_protected_aes;
  import shield_tb_pkg::*;
  import aes_ref_pkg::*;

  localparam int N_PLAINTEXTS = 1000;

  logic clk = 0, rst_n;
  logic sh_out, sh_in, alarm, mismatch, clk_chip;
  logic aes_start = 0, aes_busy, aes_done;
  logic [127:0] aes_key = '0, aes_pt = '0, aes_ct;
  shield_mode_t mode = SH_INTACT;
  logic forged = 0;
  int checks = 0, failures = 0;
  int lfsr_cycles = 0, ro_phase_samples [4] = '{0, 0, 0, 0}, detected [NUM_MODES];
  int encryptions = 0;
  bit watch_alarm = 1;

  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end

  protected_aes dut (
    .clk, .rst_n, .shield_out(sh_out), .shield_in(sh_in), .alarm, .mismatch, .clk_chip,
    .aes_start, .aes_key, .aes_plaintext(aes_pt), .aes_ciphertext(aes_ct),
    .aes_busy, .aes_done
  );
  active_shield_model shield (.drive(sh_out), .mode, .forged_bit(forged), .a_out(sh_in));

  always #2 clk = ~clk;             // 250 MHz
  always @(posedge clk) forged <= 1'($urandom);

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string s);
    failures++;
    $display("FAIL: %s", s);
  endtask

  // Shield content, every fast-clock cycle.
  always @(negedge clk) if (rst_n) begin
    logic [14:0] l;
    logic [1:0] s;
    l = dut.u_eo.lfsr_out;
    s = {l[13], l[3]};
    if (clk_chip) begin
      lfsr_cycles++;
      checks++;
      if (sh_out != l[9]) fail("shield does not carry lfsr_out[9]");
    end else begin
      #($urandom_range(50, 1900) * 1ps);
      if (!clk_chip) begin
        ro_phase_samples[s]++;
        checks++;
        if (sh_out != dut.u_eo.u_ro.ro_all[s]) fail("shield does not carry the selected ring");
      end
    end
  end

  always @(posedge alarm) if (watch_alarm && mode == SH_INTACT) fail("alarm with intact shield");

  task automatic encrypt(logic [127:0] k, logic [127:0] p, output logic [127:0] c);
    int edges;
    @(negedge clk_chip);
    aes_key = k; aes_pt = p; aes_start = 1;
    @(negedge clk_chip);
    aes_start = 0;
    edges = 1;
    while (!aes_done && edges < 40) begin
      @(negedge clk_chip);
      edges++;
    end
    checks++;
    if (edges != 11) fail($sformatf("AES took %0d chip-clock edges, expected 1 + 10", edges));
    c = aes_ct;
    encryptions++;
  endtask

  initial begin
    logic [127:0] k, p, c;
    int t;
    for (int m = 0; m < NUM_MODES; m++) detected[m] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Phase 1: the workload with an intact shield.
    for (int n = 0; n < N_PLAINTEXTS; n++) begin
      k = (n < 2) ? 128'h000102030405060708090a0b0c0d0e0f : {$urandom, $urandom, $urandom, $urandom};
      p = (n == 0) ? 128'h00112233445566778899aabbccddeeff : {$urandom, $urandom, $urandom, $urandom};
      encrypt(k, p, c);
      checks++;
      if (n == 0 && c != 128'h69c4e0d86a7b0430d8cdb78070b4c55a) fail($sformatf("FIPS-197 C.1: %h", c));
      if (decrypt(k, c) != p) fail($sformatf("encryption %0d wrong: key %h pt %h ct %h", n, k, p, c));
    end
    checks++;
    if (alarm) fail("alarm after the intact-shield workload");

    // Phase 2: every attack, each after a reset.
    for (int m = 1; m < NUM_MODES; m++) begin
      @(negedge clk);
      rst_n = 0;
      mode = SH_INTACT;
      @(negedge clk);
      rst_n = 1;
      checks++;
      if (alarm) fail("reset does not clear the alarm");
      fork
        begin
          logic [127:0] c2;
          encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, c2);
          checks++;
          if (c2 != 128'h3925841d02dc09fbdc118597196a0b32) fail("AES under attack");
        end
      join_none
      repeat (20) @(negedge clk);
      mode = shield_mode_t'(m);
      t = 0;
      while (!alarm && t < 64 * 10) begin
        @(negedge clk);
        t++;
      end
      wait fork;
      checks++;
      if (alarm) detected[m]++;
      else fail($sformatf("attack %s not detected", mode.name()));
      $display("attack %-10s detected after %0d fast-clock cycles", mode.name(), t);
    end

    // Mechanism coverage.
    checks++;
    if (lfsr_cycles == 0) fail("LFSR phase never seen");
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (ro_phase_samples[s] == 0) fail($sformatf("ring %0d never selected", s));
    end
    $display("encryptions %0d, LFSR-phase cycles %0d, RO-phase samples per ring %0d %0d %0d %0d",
             encryptions, lfsr_cycles, ro_phase_samples[0], ro_phase_samples[1],
             ro_phase_samples[2], ro_phase_samples[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
