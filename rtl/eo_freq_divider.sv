// eo_freq_divider: derives the chip clock clk_chip from the fast clock clk.
//
// A counter runs from 0 to DIV-1 on clk. clk_chip is a register that is
// high for the first ceil(DIV/2) clk cycles of each count and low for the
// rest, so its period is DIV cycles of clk and its duty cycle is 50% for an
// even DIV.
//
// Interface: clk, rst_n (asynchronous, active low), clk_chip.
// Timing: clk_chip changes only right after a rising edge of clk; after
// reset it is high and rises again every DIV cycles.
// Dividing clk down to clk_chip follows the scheme; the counter, the duty
// cycle and the default DIV = 10 (a 250 MHz shield clock over the 25 MHz
// chip clock of the evaluated AES) are choices of this design.
`timescale 1ns / 1ps
module eo_freq_divider
  import eo_pkg::*;
#(
  parameter int unsigned DIV = CLK_DIV_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_chip
);

  localparam int unsigned CW   = (DIV > 2) ? $clog2(DIV) : 1;
  localparam int unsigned HIGH = (DIV + 1) / 2;

  logic [CW-1:0] cnt, cnt_next;

  assign cnt_next = (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      clk_chip  <= 1'b1;
    end else begin
      cnt       <= cnt_next;
      clk_chip  <= (cnt_next < CW'(HIGH));
    end
  end

  initial begin
    assert (DIV >= 2) else $error("eo_freq_divider: DIV must be at least 2");
  end

endmodule
