// eo_obfuscation: the information-leakage obfuscation circuit of EO-shield.
//
// One fast clock clk runs a 15-bit LFSR and a divider that makes the chip
// clock clk_chip. A multiplexer drives the top-metal active shield: during
// the high phase of clk_chip it sends the pseudo-random bit lfsr_out[9],
// during the low phase the output of one of four ring oscillators, picked
// by lfsr_out[3] and lfsr_out[13]. The current pulses this puts on the long
// shield wire inject EM noise over the protected circuit. The far end of
// the shield comes back as shield_in (A_out) and is compared with the LFSR
// bit during the LFSR phase; a difference sets the sticky alarm.
//
// Interface: clk, rst_n (asynchronous, active low); shield_out and shield_in
// are the two ends of the shield wire; clk_chip for the protected
// circuit; mismatch (one
// clk cycle per failed check), alarm (held until reset); lfsr_out and
// ro_sel for observation.
// Timing: shield_in must follow shield_out within one clk cycle.
// The blocks and their connections follow the scheme; the divide ratio,
// the LFSR seed, the clock edges and the alarm policy are choices of this
// design, documented in each block.
`timescale 1ns / 1ps
module eo_obfuscation
  import eo_pkg::*;
#(
  parameter int unsigned        CLK_DIV  = CLK_DIV_DEFAULT,
  parameter logic [LFSR_W-1:0]  SEED     = 15'h0001,
  parameter int unsigned        T_INV_PS = 60
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              shield_out,
  input  logic              shield_in,
  output logic              clk_chip,
  output logic              mismatch,
  output logic              alarm,
  output logic [LFSR_W-1:0] lfsr_out,
  output ro_sel_t           ro_sel
);

  logic ro_out;
  logic [NUM_RO-1:0] ro_all;

  eo_lfsr #(.WIDTH(LFSR_W), .SEED(SEED)) u_lfsr (
    .clk      (clk),
    .rst_n    (rst_n),
    .lfsr_out (lfsr_out)
  );

  eo_freq_divider #(.DIV(CLK_DIV)) u_div (
    .clk       (clk),
    .rst_n     (rst_n),
    .clk_chip  (clk_chip)
  );

  assign ro_sel = {lfsr_out[RO_SEL_HI], lfsr_out[RO_SEL_LO]};

  eo_ro_generator #(.T_INV_PS(T_INV_PS)) u_ro (
    .sel    (ro_sel),
    .ro_out (ro_out),
    .ro_all (ro_all)
  );

  eo_noise_mux u_mux (
    .clk_chip   (clk_chip),
    .lfsr_bit   (lfsr_out[SHIELD_TAP]),
    .ro_out     (ro_out),
    .shield_out (shield_out)
  );

  eo_comparator u_cmp (
    .clk      (clk),
    .rst_n    (rst_n),
    .check_en (clk_chip),
    .sent_bit (lfsr_out[SHIELD_TAP]),
    .a_out    (shield_in),
    .mismatch (mismatch),
    .alarm    (alarm)
  );

endmodule
