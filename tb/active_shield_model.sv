// active_shield_model: behavioural model of the top-metal active shield.
//
// This is a behavioural model for testbenches only: the real shield is a
// long routed wire with no logic. The signal put on one end (drive) comes
// out at the other (a_out) after the routing delay DELAY_PS, as a
// transport delay so the ring-oscillator noise passes unchanged. The mode
// input plays one of the attacks listed in shield_tb_pkg. forged_bit is
// the attacker's own signal for SH_FORGED.
`timescale 1ns / 1ps
module active_shield_model
  import shield_tb_pkg::*;
#(
  parameter int DELAY_PS  = 800,
  parameter int DETOUR_PS = 6000
) (
  input  logic         drive,
  input  shield_mode_t mode,
  input  logic         forged_bit,
  output logic         a_out
);
  logic near, far;

  initial begin
    near = 1'b0;
    far  = 1'b0;
  end

  always @(drive) near <= #(DELAY_PS * 1ps) drive;
  always @(drive) far  <= #((DELAY_PS + DETOUR_PS) * 1ps) drive;

  always_comb begin
    unique case (mode)
      SH_INTACT: a_out = near;
      SH_CUT:    a_out = 1'b0;
      SH_SHORT:  a_out = 1'b1;
      SH_DETOUR: a_out = far;
      SH_FORGED: a_out = forged_bit;
      default:   a_out = near;
    endcase
  end
endmodule
