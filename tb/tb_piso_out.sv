// tb_piso_out: loads random 256-bit digests and checks that hash_valid is high
// for exactly 4 consecutive cycles right after the load, with words lane 0
// first; also checks that a load during output restarts with the new digest.
module tb_piso_out;
  localparam int OUT_BITS = 256, W = 64, NW = OUT_BITS / W;
  logic clk = 0, rst_n = 0, load = 0;
  logic [OUT_BITS-1:0] din, cur;
  logic hash_valid;
  logic [W-1:0] hash_out;
  int checks = 0, failures = 0;

  piso_out #(.OUT_BITS(OUT_BITS), .W(W)) dut (.clk, .rst_n, .load, .din, .hash_valid, .hash_out);

  always #5 clk = ~clk;

  initial begin
    #100000;
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
    ck(!hash_valid, "idle after reset");
    for (int n = 0; n < 10; n++) begin
      for (int k = 0; k < 8; k++) din[32 * k +: 32] = $urandom;
      cur = din;
      load = 1; @(posedge clk); #1 load = 0;
      for (int k = 0; k < NW; k++) begin
        ck(hash_valid && hash_out === cur[W * k +: W], "word in order");
        if (n == 9 && k == 1) begin
          for (int j = 0; j < 8; j++) din[32 * j +: 32] = $urandom;
          cur = din; load = 1;
          @(posedge clk); #1 load = 0;
          for (int j = 0; j < NW; j++) begin
            ck(hash_valid && hash_out === cur[W * j +: W], "restarted word");
            @(posedge clk); #1;
          end
          break;
        end
        @(posedge clk); #1;
      end
      ck(!hash_valid, "valid drops after last word");
      repeat (n % 3) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
