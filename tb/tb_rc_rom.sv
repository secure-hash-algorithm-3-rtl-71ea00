// tb_rc_rom: reads all 32 addresses of the round-constant ROM and compares
// entries 0..23 with constants generated by the reference LFSR, and 24..31
// with zero.
module tb_rc_rom;
  import keccak_ref_pkg::*;
  logic [4:0]  addr;
  logic [63:0] rc, exp_rc;
  int checks = 0, failures = 0;

  rc_rom dut (.addr, .rc);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) begin
      addr = 5'(a);
      #1;
      exp_rc = (a < 24) ? round_const(a) : 64'h0;
      checks++;
      if (rc !== exp_rc) begin
        failures++;
        $display("RC[%0d] got %h expected %h", a, rc, exp_rc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
