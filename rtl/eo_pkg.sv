// eo_pkg: constants shared by the EO-shield obfuscation circuit.
//
// The 15-bit LFSR on the primitive polynomial x^15 + x + 1, the three
// register taps that leave it (bit 9 to the active shield, bits 3 and 13 to
// the ring-oscillator select) and the four ring lengths (3, 5, 7 and 9
// inverters) follow the scheme this RTL implements. The encoding of the
// two select bits onto the four rings is a choice of this design: the
// select value {lfsr_out[13], lfsr_out[3]} indexes RO_STAGES.
`timescale 1ns / 1ps
package eo_pkg;

  localparam int unsigned LFSR_W       = 15;
  localparam int unsigned SHIELD_TAP   = 9;   // lfsr_out[9]  -> shield
  localparam int unsigned RO_SEL_LO    = 3;   // lfsr_out[3]  -> RO select, bit 0
  localparam int unsigned RO_SEL_HI    = 13;  // lfsr_out[13] -> RO select, bit 1
  localparam int unsigned NUM_RO       = 4;

  typedef logic [1:0] ro_sel_t;

  // Inverters in each ring, indexed by the select value.
  localparam int unsigned RO_STAGES [NUM_RO] = '{3, 5, 7, 9};

  // Divide ratio clk -> clk_chip: 250 MHz shield clock over the 25 MHz chip clock.
  localparam int unsigned CLK_DIV_DEFAULT = 10;

endpackage
