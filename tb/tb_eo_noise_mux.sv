// tb_eo_noise_mux: exhaustive test of the shield multiplexer.
//
// All eight combinations of clk_chip, the LFSR bit and the RO signal are
// applied several times in random order: the shield must carry the LFSR bit
// while clk_chip is high and the RO signal while it is low.
`timescale 1ns / 1ps
module tb_eo_noise_mux;
  logic sel, lb, ro, y;
  int checks = 0, failures = 0;

  eo_noise_mux dut (.clk_chip(sel), .lfsr_bit(lb), .ro_out(ro), .shield_out(y));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 64; n++) begin
      logic [2:0] v;
      v = (n < 8) ? 3'(n) : 3'($urandom);
      {sel, lb, ro} = v;
      #1;
      checks++;
      if (y !== (v[2] ? v[1] : v[0])) begin
        failures++;
        $display("FAIL: clk_chip=%b lfsr=%b ro=%b -> %b", sel, lb, ro, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
