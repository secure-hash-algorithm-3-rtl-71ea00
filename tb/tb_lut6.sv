// tb_lut6: exhaustive check of the LUT6 with the SHA-3 INIT value. For all
// 64 input combinations the output must equal the 5-input XOR of i0..i4 when
// i5 = 0, and the chi function i2 ^ (~i1 & i0) when i5 = 1.
module tb_lut6;
  logic [5:0] in;
  logic       o, exp_o;
  int checks = 0, failures = 0;

  lut6 dut (.i0(in[0]), .i1(in[1]), .i2(in[2]), .i3(in[3]), .i4(in[4]), .i5(in[5]), .o);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      in = 6'(v);
      #1;
      exp_o = in[5] ? (in[2] ^ (~in[1] & in[0])) : ^in[4:0];
      checks++;
      if (o !== exp_o) begin
        failures++;
        $display("mismatch at input %b: got %b expected %b", in, o, exp_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
