// sha3_state: the 1600-bit state register of the sponge and its absorb logic.
//
// The register holds the 5x5x64 state matrix (lane (x,y) at bits
// 64*(5y+x) +: 64). It is initialized to all zeros at reset and by 'clear',
// which the controller raises when a message's digest has been squeezed.
// round_in is what the round logic works on: the state itself, or, when
// 'absorb' is high, the state with its first RATE bits XORed with the message
// block and the capacity bits passed on unchanged (block concatenated with
// capacity zeros). 'update' stores next_state, the round result; 'clear' wins
// over 'update'. Synchronous active-low reset. Merging the absorb XOR into the
// round input, instead of spending a cycle on it, is this design's choice.
module sha3_state
  import sha3_pkg::*;
#(
  parameter int unsigned RATE = 1088
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            absorb,
  input  logic [RATE-1:0] block,
  input  logic            update,
  input  logic            clear,
  input  state_t          next_state,
  output state_t          round_in
);

  state_t state;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) state <= '0;
    else if (update)     state <= next_state;
  end

  assign round_in = absorb ? (state ^ {{(B - RATE){1'b0}}, block}) : state;

endmodule
