// tb_sha3_state: checks the state register. After reset the state reads zero;
// with absorb high round_in is the state XOR the block in the rate part only;
// update stores next_state; clear re-initializes to zero even with update
// high; with neither the state holds.
module tb_sha3_state;
  localparam int RATE = 1088;
  logic clk = 0, rst_n = 0, absorb = 0, update = 0, clear = 0;
  logic [RATE-1:0] block;
  logic [1599:0] next_state, round_in, model;
  int checks = 0, failures = 0;

  sha3_state #(.RATE(RATE)) dut (.clk, .rst_n, .absorb, .block, .update, .clear,
                                 .next_state, .round_in);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    logic [1599:0] exp_in;
    exp_in = absorb ? (model ^ {512'b0, block}) : model;
    checks++;
    if (round_in !== exp_in) begin
      failures++;
      $display("%s: round_in mismatch", what);
    end
  endtask

  initial begin
    for (int k = 0; k < 34; k++) block[32 * k +: 32] = $urandom;
    for (int k = 0; k < 50; k++) next_state[32 * k +: 32] = $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1; model = '0;
    #1 check("after reset");
    for (int n = 0; n < 200; n++) begin
      absorb = $urandom % 2; update = $urandom % 2; clear = ($urandom % 8) == 0;
      for (int k = 0; k < 34; k++) block[32 * k +: 32] = $urandom;
      for (int k = 0; k < 50; k++) next_state[32 * k +: 32] = $urandom;
      #1 check("comb");
      @(posedge clk);
      if (clear) model = '0;
      else if (update) model = next_state;
      #1 absorb = 0;
      #1 check("registered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
