// lut6_x64: 64 LUT6 primitives side by side, all with the same INIT, forming
// a 64-bit wide bitwise operator on up to five 64-bit words.
//
// LUT number k takes bit k of each of the five input words, word j
// (i[64*j+63 : 64*j]) driving LUT input j, and the shared control bit on its
// most significant input. With the default INIT:
//   control = 0 : o = w0 ^ w1 ^ w2 ^ w3 ^ w4         (theta, iota)
//   control = 1 : o = w2 ^ (~w1 & w0), w3/w4 ignored (chi)
// Unused words are tied to zero by the user. The bit-to-word wiring follows
// the architecture this core is built on; which LUT pin gets which word, and
// control on the MSB pin, complete it. Combinational, no clock.
module lut6_x64
  import sha3_pkg::*;
#(
  parameter logic [63:0] INIT = LUT_INIT
) (
  input  logic [5*W-1:0] i,
  input  logic           control,
  output logic [W-1:0]   o
);

  for (genvar k = 0; k < W; k++) begin : g_lut
    lut6 #(.INIT(INIT)) u_lut (
      .i0(i[k]),
      .i1(i[W + k]),
      .i2(i[2*W + k]),
      .i3(i[3*W + k]),
      .i4(i[4*W + k]),
      .i5(control),
      .o (o[k])
    );
  end

endmodule
