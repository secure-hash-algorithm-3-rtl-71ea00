// rc_rom: the 24 x 64-bit round-constant ROM of Keccak-f[1600].
//
// An asynchronous read-only table (a distributed ROM on an FPGA) addressed by
// the round number 0..23; its word is XORed into lane (0,0) by the iota step
// of that round. The values are the round constants of the Keccak / FIPS 202
// specification, RC[i] = sum over j=0..6 of rc(j + 7i) << (2^j - 1), where
// rc(t) is the output of the x^8+x^6+x^5+x^4+1 LFSR. Addresses 24..31 read 0.
// Combinational, no clock.
module rc_rom (
  input  logic [4:0]  addr,
  output logic [63:0] rc
);

  always_comb begin
    unique case (addr)
      5'd0 : rc = 64'h0000000000000001;
      5'd1 : rc = 64'h0000000000008082;
      5'd2 : rc = 64'h800000000000808A;
      5'd3 : rc = 64'h8000000080008000;
      5'd4 : rc = 64'h000000000000808B;
      5'd5 : rc = 64'h0000000080000001;
      5'd6 : rc = 64'h8000000080008081;
      5'd7 : rc = 64'h8000000000008009;
      5'd8 : rc = 64'h000000000000008A;
      5'd9 : rc = 64'h0000000000000088;
      5'd10: rc = 64'h0000000080008009;
      5'd11: rc = 64'h000000008000000A;
      5'd12: rc = 64'h000000008000808B;
      5'd13: rc = 64'h800000000000008B;
      5'd14: rc = 64'h8000000000008089;
      5'd15: rc = 64'h8000000000008003;
      5'd16: rc = 64'h8000000000008002;
      5'd17: rc = 64'h8000000000000080;
      5'd18: rc = 64'h000000000000800A;
      5'd19: rc = 64'h800000008000000A;
      5'd20: rc = 64'h8000000080008081;
      5'd21: rc = 64'h8000000000008080;
      5'd22: rc = 64'h0000000080000001;
      5'd23: rc = 64'h8000000080008008;
      default: rc = 64'h0;
    endcase
  end

endmodule
