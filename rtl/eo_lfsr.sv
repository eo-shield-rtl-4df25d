// eo_lfsr: pseudo-random source of the EO-shield.
//
// A 15-bit Fibonacci LFSR on the primitive polynomial x^15 + x + 1, so it
// runs through all 2^15 - 1 non-zero states before repeating. The state
// holds a window of the bit sequence a(n) with a(n+15) = a(n+1) ^ a(n):
// bit 0 is the oldest bit, the new bit enters at the top and the register
// shifts down by one each cycle of clk. The whole state is brought out as
// lfsr_out; the obfuscation circuit uses bit 9 as the shield data and bits
// 3 and 13 as the ring-oscillator select.
//
// Interface: clk (fast clock), rst_n (asynchronous, active low), lfsr_out.
// Timing: one step per rising edge of clk; after reset the state is SEED.
// The polynomial, the width and the use of bits 3, 9 and 13 follow the
// scheme; the Fibonacci form, the rising clock edge, the reset and the
// seed are choices of this design. A zero SEED would lock the register, so
// it is replaced by 1.
`timescale 1ns / 1ps
module eo_lfsr
  import eo_pkg::*;
#(
  parameter int unsigned          WIDTH = LFSR_W,
  parameter logic [LFSR_W-1:0]    SEED  = 15'h0001
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [WIDTH-1:0]  lfsr_out
);

  localparam logic [WIDTH-1:0] SEED_NZ =
      (SEED[WIDTH-1:0] == '0) ? WIDTH'(1) : SEED[WIDTH-1:0];

  logic feedback;

  // x^15 + x + 1: the new bit is the XOR of the two oldest bits.
  assign feedback = lfsr_out[1] ^ lfsr_out[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr_out <= SEED_NZ;
    else        lfsr_out <= {feedback, lfsr_out[WIDTH-1:1]};
  end

  initial begin
    assert (WIDTH == LFSR_W)
      else $error("eo_lfsr: the feedback taps are those of x^15 + x + 1; WIDTH must be 15");
  end

endmodule
