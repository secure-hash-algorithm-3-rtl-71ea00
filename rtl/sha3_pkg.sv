// Shared constants and helpers for the SHA-3 (Keccak-f[1600]) engine.
//
// The 1600-bit state is a 5x5 matrix of 64-bit lanes A[x,y]. Everywhere in
// this design lane (x,y) sits at bits 64*(5*y+x)+63 .. 64*(5*y+x) of a flat
// 1600-bit vector, which is also the order in which message words are loaded
// and digest words leave. The rho rotation offsets are those of the Keccak /
// FIPS 202 specification. The LUT6 INIT value is the one this architecture
// uses: its lower half is a 5-input XOR, its upper half computes chi.
package sha3_pkg;

  localparam int unsigned W      = 64;          // lane width
  localparam int unsigned LANES  = 25;          // 5 x 5 lanes
  localparam int unsigned B      = W * LANES;   // 1600-bit state
  localparam int unsigned ROUNDS = 24;          // rounds of Keccak-f[1600]

  localparam logic [63:0] LUT_INIT = 64'hD2D2D2D296696996;

  typedef logic [W-1:0] lane_t;
  typedef logic [B-1:0] state_t;

  // Flat index of lane (x,y); both coordinates are taken modulo 5.
  function automatic int unsigned lane_idx(int x, int y);
    return 5 * ((y % 5 + 5) % 5) + ((x % 5 + 5) % 5);
  endfunction

  // rho rotation offsets r[x,y], lane index 5*y+x.
  localparam int unsigned RHO_OFF [LANES] = '{
     0,  1, 62, 28, 27,
    36, 44,  6, 55, 20,
     3, 10, 43, 25, 39,
    41, 45, 15, 21,  8,
    18,  2, 61, 56, 14
  };

  // Rotate a lane left (towards the MSB) by n bits.
  function automatic lane_t rotl(lane_t v, int unsigned n);
    return (n % W == 0) ? v : ((v << (n % W)) | (v >> (W - n % W)));
  endfunction

endpackage
