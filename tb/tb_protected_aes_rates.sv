// tb_protected_aes_rates: the protected AES at its three evaluated
// operating points.
//
// The fast clock runs at 250, 200 and 166.7 MHz with divide ratios 10, 8
// and 7, each in its own harness: the chip clock must come out at 25, 25
// and 23.8 MHz (no integer ratio gives 25 MHz from 166 MHz), 50 random
// encryptions must be correct with no false alarm, and a cut shield must
// be detected at each rate.
`timescale 1ns / 1ps
module tb_protected_aes_rates;
  bit d0, d1, d2;
  int c0, c1, c2, f0, f1, f2, p0, p1, p2;
  int checks = 0, failures = 0;

  protected_aes_rate_harness #(.CLK_DIV(10), .CLK_PS(4000)) r250 (.done(d0), .checks(c0), .failures(f0), .chip_period_ps(p0));
  protected_aes_rate_harness #(.CLK_DIV(8),  .CLK_PS(5000)) r200 (.done(d1), .checks(c1), .failures(f1), .chip_period_ps(p1));
  protected_aes_rate_harness #(.CLK_DIV(7),  .CLK_PS(6000)) r166 (.done(d2), .checks(c2), .failures(f2), .chip_period_ps(p2));

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2 + 3;
    failures = f0 + f1 + f2;
    if (p0 != 40000) begin failures++; $display("FAIL: 250 MHz chip period %0d ps", p0); end
    if (p1 != 40000) begin failures++; $display("FAIL: 200 MHz chip period %0d ps", p1); end
    if (p2 != 42000) begin failures++; $display("FAIL: 166 MHz chip period %0d ps", p2); end
    $display("chip clock periods: %0d ps, %0d ps, %0d ps", p0, p1, p2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
