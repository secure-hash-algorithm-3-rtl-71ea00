// keccak_ref_pkg: a behavioural reference model of Keccak-f[1600] and SHA-3
// for the testbenches, written independently of the RTL.
//
// The state is an unpacked 5x5 array of 64-bit lanes indexed [x][y]. The rho
// offsets are generated by the walk (x,y) -> (y, 2x+3y) starting at (1,0)
// with offset (t+1)(t+2)/2, and the round constants by the rc(t) LFSR with
// polynomial x^8+x^6+x^5+x^4+1, as in the Keccak specification. sha3 hashes
// a byte message with pad10*1 and the SHA-3 domain bits (01).
package keccak_ref_pkg;

  typedef logic [63:0] lane_t;
  typedef lane_t st_t [5][5];
  typedef byte unsigned bytes_t [];

  function automatic lane_t rol(lane_t v, int n);
    n = n % 64;
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  function automatic bit rc_bit(int t);
    logic [7:0] r = 8'h01;
    if (t % 255 == 0) return 1'b1;
    for (int i = 1; i <= t % 255; i++) begin
      logic fb = r[7];
      r = {r[6:0], 1'b0};
      r[0] ^= fb; r[4] ^= fb; r[5] ^= fb; r[6] ^= fb;
    end
    return r[0];
  endfunction

  function automatic lane_t round_const(int ir);
    lane_t v = '0;
    for (int j = 0; j <= 6; j++)
      if (rc_bit(j + 7 * ir)) v[(1 << j) - 1] = 1'b1;
    return v;
  endfunction

  function automatic int rho_offset(int x, int y);
    int cx = 1, cy = 0, nx;
    if (x == 0 && y == 0) return 0;
    for (int t = 0; t < 24; t++) begin
      if (cx == x && cy == y) return ((t + 1) * (t + 2) / 2) % 64;
      nx = cy; cy = (2 * cx + 3 * cy) % 5; cx = nx;
    end
    return -1;
  endfunction

  function automatic void round_fn(ref st_t a, input int ir);
    lane_t c [5], d [5];
    st_t   bb;
    for (int x = 0; x < 5; x++) c[x] = a[x][0] ^ a[x][1] ^ a[x][2] ^ a[x][3] ^ a[x][4];
    for (int x = 0; x < 5; x++) d[x] = c[(x + 4) % 5] ^ rol(c[(x + 1) % 5], 1);
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) a[x][y] ^= d[x];
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++)
      bb[y][(2 * x + 3 * y) % 5] = rol(a[x][y], rho_offset(x, y));
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++)
      a[x][y] = bb[x][y] ^ (~bb[(x + 1) % 5][y] & bb[(x + 2) % 5][y]);
    a[0][0] ^= round_const(ir);
  endfunction

  function automatic void permute(ref st_t a);
    for (int ir = 0; ir < 24; ir++) round_fn(a, ir);
  endfunction

  // Flat 1600-bit vector, lane (x,y) at bits 64*(5y+x) +: 64.
  function automatic logic [1599:0] to_flat(st_t a);
    logic [1599:0] f;
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) f[64 * (5 * y + x) +: 64] = a[x][y];
    return f;
  endfunction

  function automatic st_t from_flat(logic [1599:0] f);
    st_t a;
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) a[x][y] = f[64 * (5 * y + x) +: 64];
    return a;
  endfunction

  // SHA-3 padding: append 0x06 ... 0x80 up to a multiple of rate_bytes.
  function automatic bytes_t pad(bytes_t msg, int rate_bytes);
    bytes_t p;
    int n = (msg.size() / rate_bytes + 1) * rate_bytes;
    p = new[n];
    foreach (p[i]) p[i] = (i < msg.size()) ? msg[i] : 8'h00;
    p[msg.size()] ^= 8'h06;
    p[n - 1]      ^= 8'h80;
    return p;
  endfunction

  // Little-endian 64-bit word k of a padded byte string.
  function automatic lane_t word_of(bytes_t p, int k);
    lane_t w;
    for (int i = 0; i < 8; i++) w[8 * i +: 8] = p[8 * k + i];
    return w;
  endfunction

  // Digest as out_bits/64 lanes (lane 0 first in bits 63:0).
  function automatic logic [511:0] sha3(bytes_t msg, int out_bits);
    int     rb = (1600 - 2 * out_bits) / 8;
    bytes_t p  = pad(msg, rb);
    st_t    a;
    logic [1599:0] f;
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) a[x][y] = '0;
    for (int blk = 0; blk < p.size() / rb; blk++) begin
      for (int k = 0; k < rb / 8; k++)
        a[k % 5][k / 5] ^= word_of(p, blk * rb / 8 + k);
      permute(a);
    end
    f = to_flat(a);
    return f[511:0];
  endfunction

endpackage
