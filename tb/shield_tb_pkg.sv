// shield_tb_pkg: the attack scenarios the active-shield model can play.
//
//   SH_INTACT   the wire carries the signal with its routing delay
//   SH_CUT      the wire is milled through; the open far end reads 0
//   SH_SHORT    the wire is shorted to the supply; the far end reads 1
//   SH_DETOUR   the attacker reroutes the wire around a hole; the longer
//               path adds more than one fast-clock period of delay
//   SH_FORGED   the far end is cut off and driven by the attacker with a
//               pseudo-random bit of their own
`timescale 1ns / 1ps
package shield_tb_pkg;
  typedef enum logic [2:0] {
    SH_INTACT = 3'd0,
    SH_CUT    = 3'd1,
    SH_SHORT  = 3'd2,
    SH_DETOUR = 3'd3,
    SH_FORGED = 3'd4
  } shield_mode_t;
  localparam int NUM_MODES = 5;
endpackage
