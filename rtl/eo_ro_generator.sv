// eo_ro_generator: behavioural model of the ring-oscillator noise source.
//
// This is a behavioural model, not synthesizable logic: a real ring
// oscillator is a loop of an odd number of inverters whose frequency is set
// by the gate delay of the process, which RTL cannot express. The block
// holds four free-running rings of 3, 5, 7 and 9 inverters; a ring of N
// stages with a stage delay T_INV_PS toggles every N * T_INV_PS, so its
// period is 2 * N * T_INV_PS. The two select bits (lfsr_out[3] as sel[0],
// lfsr_out[13] as sel[1]) choose which ring drives ro_out.
//
// Interface: sel[1:0], ro_out, ro_all[3:0] (every ring, for observation).
// Timing: all rings run from time zero; ro_out follows the selected ring
// with no delay. The ring lengths and the two select bits follow the scheme;
// the stage delay, the encoding of sel (value k selects RO_STAGES[k]) and
// the start-up level of each ring are choices of this model.
`timescale 1ns / 1ps
module eo_ro_generator
  import eo_pkg::*;
#(
  parameter int unsigned T_INV_PS = 60
) (
  input  ro_sel_t           sel,
  output logic              ro_out,
  output logic [NUM_RO-1:0] ro_all
);

  for (genvar k = 0; k < NUM_RO; k++) begin : g_ring
    localparam int unsigned HALF_PS = RO_STAGES[k] * T_INV_PS;
    logic ring;
    initial ring = 1'b0;
    always #(HALF_PS * 1ps) ring = ~ring;
    assign ro_all[k] = ring;
  end

  assign ro_out = ro_all[sel];

endmodule
