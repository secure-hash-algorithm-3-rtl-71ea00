// sha3_top: SHA-3 hash engine built around a one-round-per-cycle Keccak-f[1600]
// core whose logic is made of LUT6 primitives.
//
// Data path: message words (64 bits) enter a SIPO that assembles RATE-bit
// blocks; the 1600-bit state register (sha3_state) feeds keccak_round, whose
// result is written back every cycle; the round constant comes from the
// 24x64 ROM addressed by the round counter; the PISO returns the digest 64
// bits per cycle. Control path: sha3_ctrl, an FSM with the round counter.
//
// Sponge phases: initialization clears the state to zero (at reset and after
// each squeeze); absorbing XORs each block into the rate part of the state in
// the first round cycle and runs 24 rounds; squeezing truncates the state to
// OUT_BITS and shifts it out. One block costs 24 cycles, and the next block
// loads while the current one is permuted, so blocks stream back to back.
//
// Interface:
//   load/din/ack : a 64-bit word is taken at a rising edge with load && ack.
//                  Words are Keccak lanes in order: word k of a block is lane
//                  k = 5y+x, bytes little-endian within the word.
//   last         : high with the final word of the final block of a message.
//                  Blocks must already be padded (SHA-3 pad10*1 with domain
//                  bits 01); padding is not done here.
//   hash_valid/hash_out : OUT_BITS/64 (rounded up) consecutive words, lane 0
//                  first, starting the cycle after round 23 of the final block.
// Latency of a one-block message: last word accepted at edge t; the block is
// absorbed in the round-0 cycle after it, the digest's first word is valid
// 25 cycles after edge t. Synchronous active-low reset.
//
// The architecture (SIPO, state register, LUT6-based round, RC ROM, FSM with
// counter, PISO, 64-bit I/O, 24 cycles per block) follows the design it is
// built from; the handshake details, the 'last' input, external padding and
// the merged absorb cycle are this implementation's choices.
module sha3_top
  import sha3_pkg::*;
#(
  parameter int unsigned OUT_BITS = 256,
  localparam int unsigned RATE      = B - 2 * OUT_BITS,
  localparam int unsigned OUT_WORDS = (OUT_BITS + W - 1) / W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] din,
  input  logic         last,
  output logic         ack,
  output logic         hash_valid,
  output logic [W-1:0] hash_out
);

  logic [RATE-1:0] block;
  logic            blk_full, blk_last;
  logic            take, busy, squeeze;
  logic [4:0]      round;
  lane_t           rc;
  state_t          round_in, round_out;

  sipo_in #(.RATE(RATE), .W(W)) u_sipo (
    .clk, .rst_n, .load, .din, .last, .ack,
    .take, .full(blk_full), .block, .blk_last
  );

  sha3_ctrl u_ctrl (
    .clk, .rst_n, .blk_full, .blk_last, .take, .round, .busy, .squeeze
  );

  rc_rom u_rom (.addr(round), .rc);

  sha3_state #(.RATE(RATE)) u_state (
    .clk, .rst_n, .absorb(take), .block, .update(busy), .clear(squeeze),
    .next_state(round_out), .round_in
  );

  keccak_round u_round (.a_in(round_in), .rc, .a_out(round_out));

  piso_out #(.OUT_BITS(OUT_BITS), .W(W)) u_piso (
    .clk, .rst_n, .load(squeeze), .din(round_out[OUT_WORDS*W-1:0]),
    .hash_valid, .hash_out
  );

endmodule
