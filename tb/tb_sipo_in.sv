// tb_sipo_in: feeds random words with random gaps in load, checks that 17
// accepted words form the block in lane order, that full rises exactly after
// the 17th word, that ack is low (and words are refused) while the block is
// held, that blk_last is the 'last' value given with the 17th word, and that
// take frees the buffer.
module tb_sipo_in;
  localparam int RATE = 1088, W = 64, N = RATE / W;
  logic clk = 0, rst_n = 0, load = 0, last = 0, take = 0;
  logic [W-1:0] din;
  logic ack, full, blk_last;
  logic [RATE-1:0] block, exp_block;
  int checks = 0, failures = 0, refused = 0;

  sipo_in #(.RATE(RATE), .W(W)) dut (.clk, .rst_n, .load, .din, .last, .ack,
                                     .take, .full, .block, .blk_last);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < 6; b++) begin
      automatic bit lst = (b % 2 == 1);
      automatic int k = 0;
      while (k < N) begin
        load = ($urandom % 4) != 0;
        din  = {$urandom, $urandom};
        last = (k == N - 1) ? lst : 1'b0;
        ck(ack == 1'b1 && full == 1'b0, "ack high while filling");
        @(posedge clk);
        if (load) begin exp_block[W * k +: W] = din; k++; end
        #1;
      end
      load = 0;
      ck(full == 1'b1, "full after last word");
      ck(block === exp_block, "block contents");
      ck(blk_last == lst, "blk_last");
      // words offered while full are refused
      repeat (3) begin
        load = 1; din = {$urandom, $urandom};
        ck(ack == 1'b0, "ack low while full");
        @(posedge clk); #1;
        refused++;
      end
      ck(block === exp_block, "block held while full");
      load = 0; take = 1;
      @(posedge clk); #1 take = 0;
      ck(full == 1'b0 && ack == 1'b1, "take frees the buffer");
    end
    ck(refused > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
