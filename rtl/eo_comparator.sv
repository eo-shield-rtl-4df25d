// eo_comparator: real-time check of the active shield.
//
// At each rising edge of clk in which the shield carried the LFSR bit
// (check_en, which is clk_chip, high during the cycle just ended) the
// returned signal A_out is compared with the bit that was sent. A
// difference means the wire was cut, shorted, or rerouted by an attacker;
// it sets mismatch for one cycle and the sticky alarm, which stays high
// until reset. During the ring-oscillator phase nothing is compared,
// because the returned noise cannot be predicted.
//
// Interface: clk, rst_n (asynchronous, active low), check_en, sent_bit
// (lfsr_out[9]), a_out (the far end of the shield), mismatch, alarm.
// Timing: a_out must settle within one clk cycle of sent_bit changing;
// mismatch and alarm rise one clk edge after the faulty cycle.
// Comparing lfsr_out[9] with A_out and raising Alarm follow the scheme;
// restricting the check to the LFSR phase, sampling on clk and holding the
// alarm until reset are choices of this design.
`timescale 1ns / 1ps
module eo_comparator (
  input  logic clk,
  input  logic rst_n,
  input  logic check_en,
  input  logic sent_bit,
  input  logic a_out,
  output logic mismatch,
  output logic alarm
);

  logic diff;

  assign diff = check_en && (a_out != sent_bit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mismatch <= 1'b0;
      alarm    <= 1'b0;
    end else begin
      mismatch <= diff;
      if (diff) alarm <= 1'b1;
    end
  end

endmodule
