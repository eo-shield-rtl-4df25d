// protected_aes: an AES-128 chip under EO-shield protection.
//
// The fast clock clk feeds the obfuscation circuit (LFSR, divider, ring
// oscillators, multiplexer and comparator); its divided clock clk_chip is
// the clock of the AES core. The active shield itself is a routed top-metal
// wire, so its two ends leave the module as shield_out and shield_in and
// are joined outside, across the shield. While the AES runs, the shield
// carries alternately the LFSR bit and ring-oscillator noise, and alarm
// reports any mismatch between what was sent into the shield and what came
// back.
//
// Interface: clk, rst_n; shield_out, shield_in; alarm, mismatch; clk_chip
// (the clock of the AES ports); aes_start, aes_key, aes_plaintext,
// aes_ciphertext, aes_busy, aes_done, all in the clk_chip domain.
// The AES ports are sampled on the rising edge of clk_chip.
// The pairing of the obfuscation circuit with a NIST AES clocked by
// clk_chip follows the scheme's protected AES; that the alarm is only
// reported, and does not stop the AES, is a choice of this design.
`timescale 1ns / 1ps
module protected_aes
  import eo_pkg::*;
  import aes_pkg::*;
#(
  parameter int unsigned CLK_DIV = CLK_DIV_DEFAULT
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   shield_out,
  input  logic   shield_in,
  output logic   alarm,
  output logic   mismatch,
  output logic   clk_chip,
  input  logic   aes_start,
  input  block_t aes_key,
  input  block_t aes_plaintext,
  output block_t aes_ciphertext,
  output logic   aes_busy,
  output logic   aes_done
);

  logic [LFSR_W-1:0] lfsr_out;
  ro_sel_t           ro_sel;

  eo_obfuscation #(.CLK_DIV(CLK_DIV)) u_eo (
    .clk        (clk),
    .rst_n      (rst_n),
    .shield_out (shield_out),
    .shield_in  (shield_in),
    .clk_chip   (clk_chip),
    .mismatch   (mismatch),
    .alarm      (alarm),
    .lfsr_out   (lfsr_out),
    .ro_sel     (ro_sel)
  );

  aes128_core u_aes (
    .clk        (clk_chip),
    .rst_n      (rst_n),
    .start      (aes_start),
    .key        (aes_key),
    .plaintext  (aes_plaintext),
    .ciphertext (aes_ciphertext),
    .busy       (aes_busy),
    .done       (aes_done)
  );

endmodule
