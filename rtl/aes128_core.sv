// aes128_core: iterative AES-128 encryption core, the circuit under protection.
//
// One round per clock. A start pulse loads plaintext XOR key (the initial
// AddRoundKey) and the key; each following cycle applies SubBytes,
// ShiftRows, MixColumns (left out in round 10) and AddRoundKey with a round
// key expanded on the fly from the previous one. The S-box is computed at
// elaboration (see aes_pkg).
//
// Interface: clk (the chip clock), rst_n (asynchronous, active low), start
// (one-cycle request, ignored while busy), key, plaintext, ciphertext
// (valid while done is high), busy, done (one-cycle pulse).
// Timing: done rises 10 cycles after the start cycle; a new start is
// accepted in the cycle done is high.
// That the protected circuit is a NIST-standard AES-128 with 128-bit
// plaintext and key is taken from the scheme's evaluation; the iterative
// one-round-per-cycle architecture and the handshake are choices of this
// design.
`timescale 1ns / 1ps
module aes128_core
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t key,
  input  block_t plaintext,
  output block_t ciphertext,
  output logic   busy,
  output logic   done
);

  block_t      state, rkey, rkey_next, state_next;
  logic [3:0]  round;          // round about to be computed, 1..10
  byte_t       rcon;

  assign rkey_next = next_round_key(rkey, rcon);

  always_comb begin
    block_t t;
    t = shift_rows(sub_bytes(state));
    if (round != 4'd10) t = mix_columns(t);
    state_next = t ^ rkey_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
      rkey  <= '0;
      round <= 4'd0;
      rcon  <= 8'h01;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        state <= state_next;
        rkey  <= rkey_next;
        rcon  <= xtime(rcon);
        if (round == 4'd10) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          round <= round + 4'd1;
        end
      end else if (start) begin
        state <= plaintext ^ key;
        rkey  <= key;
        rcon  <= 8'h01;
        round <= 4'd1;
        busy  <= 1'b1;
      end
    end
  end

  assign ciphertext = state;

  // done is the last cycle of a computation, never one in which it goes on.
  a_done_not_busy: assert property (@(posedge clk) disable iff (!rst_n) !(busy && done))
    else $error("aes128_core: busy and done together");

endmodule
