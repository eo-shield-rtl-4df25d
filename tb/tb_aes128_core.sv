// tb_aes128_core: self-checking test of the iterative AES-128 core.
//
// Encrypts the two worked examples of FIPS-197 (appendix B and C.1) and
// compares with the published ciphertexts, then 200 random key/plaintext
// pairs checked by decrypting with the reference inverse cipher. Done must
// come 10 cycles after the edge that takes start; a start while
// busy must be ignored.
`timescale 1ns / 1ps
module tb_aes128_core;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n, start = 0;

  // rst_n falls once at the start so the asynchronous resets see an edge.
  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  logic [127:0] key, pt, ct;
  logic busy, done;
  int checks = 0, failures = 0;

  aes128_core dut (.clk, .rst_n, .start, .key, .plaintext(pt), .ciphertext(ct), .busy, .done);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic encrypt(logic [127:0] k, logic [127:0] p, output logic [127:0] c);
    int cyc = 0;
    @(negedge clk);
    key = k; pt = p; start = 1;
    @(negedge clk);
    start = 0;
    // a second request while busy is ignored
    pt = ~p; start = 1;
    @(negedge clk);
    start = 0; pt = p;
    cyc = 2;
    while (!done && cyc < 40) begin
      @(negedge clk);
      cyc++;
    end
    // cyc counts the edges from the one that takes start up to the one
    // after which done is seen: the load edge plus the 10 round edges.
    check(cyc == 11, $sformatf("latency %0d edges, expected 1 + 10", cyc));
    c = ct;
  endtask

  initial begin
    logic [127:0] c, k, p;
    key = 0; pt = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, c);
    check(c == 128'h3925841d02dc09fbdc118597196a0b32, $sformatf("FIPS-197 B: %h", c));
    encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, c);
    check(c == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("FIPS-197 C.1: %h", c));
    check(decrypt(128'h000102030405060708090a0b0c0d0e0f, c) == 128'h00112233445566778899aabbccddeeff,
          "reference decryption of C.1");
    for (int n = 0; n < 200; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      encrypt(k, p, c);
      check(decrypt(k, c) == p, $sformatf("random %0d: key %h pt %h ct %h", n, k, p, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
