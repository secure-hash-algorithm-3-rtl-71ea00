// tb_lut6_x64: random check of the 64-bit LUT6 operator. With control 0 the
// output must be the XOR of the five input words, with control 1 it must be
// w2 ^ (~w1 & w0) whatever w3 and w4 hold.
module tb_lut6_x64;
  logic [63:0] w [5];
  logic [319:0] i;
  logic control;
  logic [63:0] o, exp_o;
  int checks = 0, failures = 0;

  lut6_x64 dut (.i, .control, .o);

  assign i = {w[4], w[3], w[2], w[1], w[0]};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      for (int k = 0; k < 5; k++) w[k] = {$urandom, $urandom};
      control = n[0];
      #1;
      exp_o = control ? (w[2] ^ (~w[1] & w[0])) : (w[0] ^ w[1] ^ w[2] ^ w[3] ^ w[4]);
      checks++;
      if (o !== exp_o) begin
        failures++;
        if (failures < 5) $display("mismatch control=%b got %h expected %h", control, o, exp_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
