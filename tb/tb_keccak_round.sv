// tb_keccak_round: drives the combinational round with random states and
// every round number, compares with the reference round; then chains 24
// rounds on the all-zero state and checks the well-known first lane of
// Keccak-f[1600](0), F1258F7940E1DDE7.
module tb_keccak_round;
  import keccak_ref_pkg::*;
  logic [1599:0] a_in, a_out, exp_out;
  logic [63:0]   rc;
  st_t           s;
  int checks = 0, failures = 0;

  keccak_round dut (.a_in, .rc, .a_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 96; n++) begin
      for (int k = 0; k < 50; k++) a_in[32 * k +: 32] = $urandom;
      rc = round_const(n % 24);
      #1;
      s = from_flat(a_in);
      round_fn(s, n % 24);
      exp_out = to_flat(s);
      checks++;
      if (a_out !== exp_out) begin
        failures++;
        if (failures < 4) $display("round %0d mismatch", n % 24);
      end
    end
    a_in = '0;
    for (int r = 0; r < 24; r++) begin
      rc = round_const(r);
      #1;
      a_in = a_out;
    end
    checks++;
    if (a_in[63:0] !== 64'hF1258F7940E1DDE7) begin
      failures++;
      $display("Keccak-f(0) lane 0 got %h", a_in[63:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
