// tb_sha3_ctrl: drives the controller with a model of the input buffer and
// checks, cycle by cycle: take only in round 0, rounds counting 0..23 with
// busy high, squeeze exactly in round 23 of a final block, back-to-back
// blocks with no idle cycle when the next block is ready, and a return to
// idle when none is.
module tb_sha3_ctrl;
  logic clk = 0, rst_n = 0, blk_full = 0, blk_last = 0;
  logic take, busy, squeeze;
  logic [4:0] round;
  int checks = 0, failures = 0;
  int exp_round, blocks_done = 0, squeezes = 0, b2b = 0, idles = 0;
  bit running = 0, lst_q = 0;
  int pending = 0;   // blocks the stimulus will still provide

  sha3_ctrl dut (.clk, .rst_n, .blk_full, .blk_last, .take, .round, .busy, .squeeze);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // Reference: expected behaviour computed before each edge.
  always @(negedge clk) if (rst_n) begin
    if (!running) begin
      ck(!busy && !take && !squeeze, "idle outputs");
      if (blk_full) begin running = 1; exp_round = 0; end
      else idles++;
    end else begin
      ck(busy && round == 5'(exp_round), "round count");
      ck(take == (exp_round == 0), "take in round 0 only");
      if (exp_round == 0) lst_q = blk_last;
      ck(squeeze == (exp_round == 23 && lst_q), "squeeze at round 23 of final block");
      if (squeeze) squeezes++;
      if (exp_round == 23) begin
        blocks_done++;
        if (blk_full) begin exp_round = 0; b2b++; end
        else running = 0;
      end else exp_round++;
    end
  end

  // Buffer model: a block becomes full some cycles after the previous take.
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 12; n++) begin
      repeat ((n % 3 == 0) ? 30 : 3 + n) @(posedge clk);
      #1 blk_full = 1; blk_last = (n % 3 != 1);
      @(posedge clk);
      while (!take) @(posedge clk);
      #1 blk_full = 0;
    end
    repeat (30) @(posedge clk);
    ck(blocks_done == 12, "all blocks permuted");
    ck(squeezes == 8, "one squeeze per final block");
    ck(b2b > 0, "back-to-back blocks happened");
    ck(idles > 0, "idle periods happened");
    $display("blocks=%0d squeezes=%0d back_to_back=%0d", blocks_done, squeezes, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
