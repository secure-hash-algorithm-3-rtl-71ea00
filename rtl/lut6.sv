// lut6: a 6-input, 1-output look-up table.
//
// The output is the bit of the 64-bit INIT parameter selected by the address
// {i5,i4,i3,i2,i1,i0}; i5 is the most significant input. This is the
// function of the FPGA LUT6 primitive (two LUT5 halves selected by i5),
// written as a generic lookup so that it simulates and synthesizes without a
// vendor library. The default INIT is the value used throughout this SHA-3
// core: with i5 = 0 the LUT is a 5-input XOR of i0..i4, with i5 = 1 it
// computes chi, o = i2 ^ (~i1 & i0), and ignores i3 and i4.
// Purely combinational.
module lut6 #(
  parameter logic [63:0] INIT = 64'hD2D2D2D296696996
) (
  input  logic i0,
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  input  logic i5,
  output logic o
);

  assign o = INIT[{i5, i4, i3, i2, i1, i0}];

endmodule
