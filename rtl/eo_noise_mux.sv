// eo_noise_mux: chooses what the active shield carries.
//
// While clk_chip is high the shield is driven with the pseudo-random bit
// lfsr_out[9], which the comparator can check when it comes back; while
// clk_chip is low it is driven with RO_out, the fast ring-oscillator
// signal that injects EM noise. The choice is purely combinational, so the
// output switches with clk_chip.
//
// Interface: clk_chip (select), lfsr_bit (lfsr_out[9]), ro_out, shield_out.
// Which signal goes with which phase of clk_chip follows the waveform of
// the scheme (lfsr_out[9] during the high phase, RO_out during the low one).
`timescale 1ns / 1ps
module eo_noise_mux (
  input  logic clk_chip,
  input  logic lfsr_bit,
  input  logic ro_out,
  output logic shield_out
);

  always_comb begin
    if (clk_chip) shield_out = lfsr_bit;
    else          shield_out = ro_out;
  end

endmodule
