// sipo_in: serial-in parallel-out input register for message blocks.
//
// Message words of W bits arrive under a Load/Acknowledgment handshake: a word
// is accepted at a rising edge where load and ack are both high. RATE/W words
// make one block; word 0 of a block ends up in block[W-1:0], word k in
// block[W*k +: W], which is Keccak lane k. Once a block is complete, full
// rises and ack falls until the core asserts take (for one cycle), which frees
// the buffer; the next word can be accepted from the following cycle. Because
// the core takes the block in the first of its 24 round cycles, the next block
// fills while the current one is being permuted.
//
// 'last' is sampled with the word that completes a block and is held as
// blk_last: it marks the final block of a message. The buffer role and the
// 64-bit word width follow the design; the handshake rules and the 'last'
// marker are this implementation's choice. Synchronous active-low reset.
module sipo_in #(
  parameter int unsigned RATE = 1088,
  parameter int unsigned W    = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [W-1:0]    din,
  input  logic            last,
  output logic            ack,
  input  logic            take,
  output logic            full,
  output logic [RATE-1:0] block,
  output logic            blk_last
);

  localparam int unsigned NWORDS = RATE / W;
  localparam int unsigned CW     = $clog2(NWORDS + 1);

  logic [CW-1:0] count;
  logic          accept;

  assign ack    = !full;
  assign accept = load && ack;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count    <= '0;
      full     <= 1'b0;
      blk_last <= 1'b0;
      block    <= '0;
    end else if (accept) begin
      block <= {din, block[RATE-1:W]};
      if (count == CW'(NWORDS - 1)) begin
        count    <= '0;
        full     <= 1'b1;
        blk_last <= last;
      end else begin
        count <= count + 1'b1;
      end
    end else if (take) begin
      full <= 1'b0;
    end
  end

  // take is only meaningful while a block is held.
  a_take_full : assert property (@(posedge clk) disable iff (!rst_n) take |-> full)
    else $error("sipo_in: take without a complete block");

endmodule
