// sha3_ctrl: control path of the SHA-3 engine, a finite state machine with a
// round counter.
//
// In IDLE it waits for a complete message block in the input buffer. It then
// enters RUN and computes one round per cycle, the counter 'round' (0..23)
// addressing the round-constant ROM. In round 0 it raises 'take': the block
// is XORed into the state as part of that round and the buffer is freed.
// In round 23 it raises 'squeeze' if that block was the final one of its
// message (its 'last' flag was captured at take), so the result goes to the
// output register and the state is cleared. After round 23 it starts the next
// block at once if one is buffered, else returns to IDLE; a block thus costs
// exactly 24 cycles. 'busy' is high in every round cycle.
// Synchronous active-low reset to IDLE. The state names and the one-cycle
// absorb are this design's choice.
module sha3_ctrl
  import sha3_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       blk_full,
  input  logic       blk_last,
  output logic       take,
  output logic [4:0] round,
  output logic       busy,
  output logic       squeeze
);

  typedef enum logic {IDLE, RUN} fsm_t;

  fsm_t fsm;
  logic cur_last;   // the block being permuted is its message's last
  logic at_end;

  assign busy    = (fsm == RUN);
  assign take    = busy && (round == 5'd0);
  assign at_end  = busy && (round == 5'(ROUNDS - 1));
  assign squeeze = at_end && cur_last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fsm      <= IDLE;
      round    <= '0;
      cur_last <= 1'b0;
    end else begin
      unique case (fsm)
        IDLE: if (blk_full) begin
          fsm   <= RUN;
          round <= '0;
        end
        RUN: begin
          if (take) cur_last <= blk_last;
          if (at_end) begin
            round <= '0;
            if (!blk_full) fsm <= IDLE;
          end else begin
            round <= round + 1'b1;
          end
        end
      endcase
    end
  end

  a_round_range : assert property (@(posedge clk) disable iff (!rst_n)
                                   busy |-> round < 5'(ROUNDS))
    else $error("sha3_ctrl: round counter out of range");

endmodule
