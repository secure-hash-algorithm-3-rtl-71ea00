// keccak_round: one round of the Keccak-f[1600] permutation, combinational.
//
// All bitwise logic of the round is done by 61 copies of lut6_x64, the 64-LUT6
// operator whose control bit selects a 5-input XOR (0) or chi (1):
//   theta, eq. C : 5 copies,  C[x]   = A[x,0]^A[x,1]^A[x,2]^A[x,3]^A[x,4]
//   theta, eq. D : 5 copies,  D[x]   = C[x-1] ^ ROT(C[x+1],1)
//   theta, apply : 25 copies, A[x,y] = A[x,y] ^ D[x]
//   rho and pi   : wiring,    B[y,2x+3y] = ROT(A[x,y], r[x,y])
//   chi          : 25 copies, A[x,y] = B[x,y] ^ (~B[x+1,y] & B[x+2,y])
//   iota         : 1 copy,    A[0,0] = A[0,0] ^ RC
// Indices are modulo 5 and ROT is a left rotation. Words a copy does not need
// are tied to zero. For chi the INIT value fixes the order: word 2 carries
// B[x,y], word 1 B[x+1,y] and word 0 B[x+2,y].
//
// The whole round settles within one clock cycle; the caller registers the
// result, so a permutation takes 24 cycles. C and D are internal nets, not
// registers. The step structure follows the LUT6-based architecture; the rho
// offsets and round constants come from the Keccak specification.
//
// Interface: a_in / a_out are 1600-bit states, lane (x,y) at
// bits 64*(5y+x)+63 .. 64*(5y+x); rc is the round constant of this round.
module keccak_round
  import sha3_pkg::*;
(
  input  state_t a_in,
  input  lane_t  rc,
  output state_t a_out
);

  lane_t a     [LANES];  // input lanes
  lane_t c     [5];      // column parities
  lane_t d     [5];      // theta offsets
  lane_t at    [LANES];  // after theta
  lane_t b     [LANES];  // after rho and pi
  lane_t ac    [LANES];  // after chi
  lane_t aout  [LANES];  // after iota

  localparam lane_t ZERO = '0;

  for (genvar l = 0; l < LANES; l++) begin : g_unpack
    assign a[l] = a_in[W*l +: W];
  end

  // theta: column parity C[x]
  for (genvar x = 0; x < 5; x++) begin : g_c
    lut6_x64 u_c (
      .i      ({a[lane_idx(x, 4)], a[lane_idx(x, 3)], a[lane_idx(x, 2)],
                a[lane_idx(x, 1)], a[lane_idx(x, 0)]}),
      .control(1'b0),
      .o      (c[x])
    );
  end

  // theta: D[x] = C[x-1] ^ ROT(C[x+1], 1)
  for (genvar x = 0; x < 5; x++) begin : g_d
    lut6_x64 u_d (
      .i      ({ZERO, ZERO, ZERO, rotl(c[(x + 1) % 5], 1), c[(x + 4) % 5]}),
      .control(1'b0),
      .o      (d[x])
    );
  end

  // theta: A[x,y] ^= D[x]; then rho and pi as wiring
  for (genvar y = 0; y < 5; y++) begin : g_ty
    for (genvar x = 0; x < 5; x++) begin : g_tx
      lut6_x64 u_t (
        .i      ({ZERO, ZERO, ZERO, d[x], a[lane_idx(x, y)]}),
        .control(1'b0),
        .o      (at[lane_idx(x, y)])
      );
      assign b[lane_idx(y, 2 * x + 3 * y)] =
          rotl(at[lane_idx(x, y)], RHO_OFF[lane_idx(x, y)]);
    end
  end

  // chi
  for (genvar y = 0; y < 5; y++) begin : g_chy
    for (genvar x = 0; x < 5; x++) begin : g_chx
      lut6_x64 u_chi (
        .i      ({ZERO, ZERO, b[lane_idx(x, y)], b[lane_idx(x + 1, y)],
                  b[lane_idx(x + 2, y)]}),
        .control(1'b1),
        .o      (ac[lane_idx(x, y)])
      );
    end
  end

  // iota on lane (0,0); the other lanes pass on unchanged
  lut6_x64 u_iota (
    .i      ({ZERO, ZERO, ZERO, rc, ac[0]}),
    .control(1'b0),
    .o      (aout[0])
  );
  for (genvar l = 1; l < LANES; l++) begin : g_pass
    assign aout[l] = ac[l];
  end

  for (genvar l = 0; l < LANES; l++) begin : g_pack
    assign a_out[W*l +: W] = aout[l];
  end

endmodule
